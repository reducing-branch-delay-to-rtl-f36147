// tb_cobra_ras: random pushes and pops on the return-address LIFO compared
// with a circular-stack model of the same depth, including overflow.
module tb_cobra_ras;
  localparam int AW = 16, D = 8;
  logic clk = 0, rst_n = 0, push, pop, empty;
  logic [AW-1:0] push_addr, top;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cobra_ras #(.AW(AW), .DEPTH(D)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] m [D];
    int sp = 0, cnt = 0;
    for (int i = 0; i < D; i++) m[i] = '0;
    push = 0; pop = 0; push_addr = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks += 2;
      if (top !== m[sp]) begin failures++; $display("top %h expected %h", top, m[sp]); end
      if (empty !== (cnt == 0)) begin failures++; $display("empty %b, count %0d", empty, cnt); end
      // bias towards pushes in the first half so the stack overflows
      push = ($urandom_range(99) < ((i < 1500) ? 65 : 40));
      pop  = !push && $urandom_range(1);
      push_addr = 16'($urandom);
      @(posedge clk);
      if (push) begin sp = (sp + 1) % D; m[sp] = push_addr; if (cnt < D) cnt++; end
      else if (pop) begin sp = (sp + D - 1) % D; if (cnt > 0) cnt--; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
