// tb_cobra_branch_detect: random instructions; a branch is reported exactly
// when the slot is valid and bit 31 is set, and the fields come out of the
// documented bit positions.
module tb_cobra_branch_detect;
  import cobra_pkg::*;
  logic valid;
  instr_t instr;
  bdec_t dec;
  int checks = 0, failures = 0;

  cobra_branch_detect dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      valid = 1'($urandom);
      instr = $urandom;
      #1;
      checks++;
      if (dec.is_branch !== (valid & instr[31]) ||
          dec.kind !== bkind_e'(instr[30:29]) || dec.cond !== cond_e'(instr[28:26]) ||
          dec.s !== instr[25] || dec.c !== instr[24] || dec.rs !== instr[23:20] ||
          dec.bt !== (instr[30:29] == 2'b10 || instr[30:29] == 2'b11)) begin
        failures++;
        $display("instr %h valid %b: decoded %p", instr, valid, dec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
