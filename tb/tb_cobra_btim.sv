// tb_cobra_btim: fills random lines through the fill port and looks up
// random addresses, comparing hit and line contents with a model that keeps
// tags, valid bits and data per line. Also checks that a line being filled
// does not hit until its last word is written, and that reset empties it.
module tb_cobra_btim;
  import cobra_pkg::*;
  localparam int AW = 16, LINES = 16, LS = 4;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] ta, fill_ta;
  logic hit, fill_start, fill_we, fill_last;
  instr_t line [LS];
  logic [1:0] fill_off;
  instr_t fill_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cobra_btim #(.AW(AW), .LINES(LINES), .LINE_SIZE(LS)) dut (.*);

  logic          mv [LINES];
  logic [AW-1:0] mt [LINES];
  instr_t        md [LINES][LS];

  // a small set of addresses so lines are hit, missed and replaced
  function automatic logic [AW-1:0] pick();
    return 16'({$urandom_range(3), 4'($urandom)});
  endfunction

  task automatic lookup(logic [AW-1:0] a);
    int i = int'(a[3:0]);
    logic exp_hit;
    ta = a;
    #1;
    exp_hit = mv[i] && mt[i] == a;
    checks++;
    if (hit !== exp_hit) begin failures++; $display("lookup %h: hit %b expected %b", a, hit, exp_hit); end
    if (exp_hit) for (int w = 0; w < LS; w++) begin
      checks++;
      if (line[w] !== md[i][w]) begin failures++; $display("lookup %h word %0d: %h expected %h", a, w, line[w], md[i][w]); end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < LINES; i++) mv[i] = 0;
    fill_start = 0; fill_we = 0; fill_last = 0; fill_off = 0; fill_data = 0; fill_ta = 0; ta = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [AW-1:0] a = pick();
      int li = int'(a[3:0]);
      @(negedge clk);
      lookup(pick());
      fill_start = 1; fill_ta = a;
      @(posedge clk);
      mv[li] = 0;
      @(negedge clk);
      fill_start = 0;
      for (int w = 0; w < LS; w++) begin
        instr_t d = $urandom;
        // a gap now and then, as when the memory word is late
        while ($urandom_range(3) == 0) begin
          fill_we = 0;
          lookup(a);
          @(negedge clk);
        end
        fill_we = 1; fill_off = 2'(w); fill_last = (w == LS - 1); fill_data = d;
        lookup(a);
        @(posedge clk);
        md[li][w] = d;
        if (w == LS - 1) begin mv[li] = 1; mt[li] = a; end
        @(negedge clk);
      end
      fill_we = 0; fill_last = 0;
      for (int k = 0; k < 4; k++) lookup(pick());
      lookup(a);
    end
    rst_n = 0;
    #1 rst_n = 1;
    for (int i = 0; i < LINES; i++) mv[i] = 0;
    for (int k = 0; k < 50; k++) lookup(pick());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
