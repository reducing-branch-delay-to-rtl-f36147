// tb_cobra_iseq: drives random line loads, flushes, memory words and pops
// (never more than the outputs show valid) and compares h0/h1 with a queue
// model: held words in order, then the word on the memory bus.
module tb_cobra_iseq;
  import cobra_pkg::*;
  localparam int LS = 4, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic flush, load, mem_valid, h0_valid, h1_valid, overflow;
  instr_t line [LS];
  instr_t mem_data, h0, h1;
  logic [1:0] pop;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cobra_iseq #(.LINE_SIZE(LS), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t q [$];
    logic e0, e1;
    int seen_pop2_bus = 0;
    flush = 0; load = 0; mem_valid = 0; mem_data = 0; pop = 0;
    for (int w = 0; w < LS; w++) line[w] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      flush = ($urandom_range(15) == 0);
      load  = flush && $urandom_range(1);
      for (int w = 0; w < LS; w++) line[w] = $urandom;
      mem_valid = (q.size() < DEPTH) && $urandom_range(2) != 0;
      mem_data  = $urandom;
      #1;
      e0 = q.size() >= 1;
      e1 = q.size() >= 2 || (q.size() == 1 && mem_valid);
      checks += 2;
      if (h0_valid !== e0 || (e0 && h0 !== q[0])) begin
        failures++; $display("h0 %b %h expected %b %h", h0_valid, h0, e0, e0 ? q[0] : 0);
      end
      if (h1_valid !== e1 || (e1 && h1 !== (q.size() >= 2 ? q[1] : mem_data))) begin
        failures++; $display("h1 wrong (%b %h)", h1_valid, h1);
      end
      pop = !e0 ? 2'd0 : (e1 && $urandom_range(2) == 0) ? 2'd2 : 2'($urandom_range(1));
      if (pop == 2 && q.size() == 1) seen_pop2_bus++;
      @(posedge clk);
      if (flush) begin
        q = {};
        if (load) for (int w = 0; w < LS; w++) q.push_back(line[w]);
      end else begin
        if (mem_valid) q.push_back(mem_data);
        repeat (pop) void'(q.pop_front());
      end
    end
    checks++;
    if (seen_pop2_bus == 0) begin failures++; $display("h1 never taken from the bus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
