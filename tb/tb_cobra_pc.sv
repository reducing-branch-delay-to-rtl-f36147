// tb_cobra_pc: the PC loads a target or advances by 0, 1 or 2, compared
// with a counter kept in the testbench; reset value checked.
module tb_cobra_pc;
  localparam int AW = 16;
  logic clk = 0, rst_n = 0, load;
  logic [AW-1:0] ta, pc;
  logic [1:0] step;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cobra_pc #(.AW(AW), .RESET_ADDR(16'h0123)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] model;
    load = 0; ta = 0; step = 0;
    #12;
    checks++;
    if (pc !== 16'h0123) begin failures++; $display("reset pc %h", pc); end
    rst_n = 1;
    model = 16'h0123;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = ($urandom_range(9) == 0);
      ta = 16'($urandom);
      step = 2'($urandom_range(2));
      @(posedge clk);
      model = load ? ta : model + 16'(step);
      #1;
      checks++;
      if (pc !== model) begin failures++; $display("pc %h expected %h", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
