// tb_cobra_tac: checks the target address computation against an
// arithmetic reference: upper bits of the branch address moved by -1/0/+1
// as (s, c) say, joined to the target LSBs; X4 passes a computed target
// when bt is set; the second output is the target plus the line size.
module tb_cobra_tac;
  localparam int AW = 16, LSBW = 12, LS = 4;
  logic [AW-LSBW-1:0] msb_pc;
  logic s, c, bt;
  logic [LSBW-1:0] lsb_ta;
  logic [AW-1:0] computed_ta, ta, ta_plus_line;
  int checks = 0, failures = 0;

  cobra_tac #(.AW(AW), .LSBW(LSBW), .LINE_SIZE(LS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_ta, hi;
    for (int i = 0; i < 2000; i++) begin
      msb_pc = 4'($urandom); s = 1'($urandom); c = 1'($urandom); bt = 1'($urandom);
      lsb_ta = 12'($urandom); computed_ta = 16'($urandom);
      if (i < 4) begin msb_pc = (i < 2) ? 4'hF : 4'h0; c = 1; s = i[0]; bt = 0; end
      #1;
      hi = int'(msb_pc) + (c ? (s ? -1 : 1) : 0);
      exp_ta = bt ? int'(computed_ta) : ((hi & 'hF) << 12) | int'(lsb_ta);
      checks += 2;
      if (ta !== 16'(exp_ta)) begin
        failures++;
        $display("ta=%h expected %h", ta, 16'(exp_ta));
      end
      if (ta_plus_line !== 16'(exp_ta + LS)) begin
        failures++;
        $display("ta+line=%h expected %h", ta_plus_line, 16'(exp_ta + LS));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
