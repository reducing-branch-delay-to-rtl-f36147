// cobra_branch_detect: early branch detection circuit.
//
// Looks at the instruction that follows, in sequence, the one entering the
// ALU stage and tells the IU whether it is a branch. As the document
// suggests for a RISC encoding, detection is a test of one opcode bit (bit
// 31); the remaining fields are split out for the TAC and the branch
// resolution logic. bt marks branches whose target does not come from the
// instruction (returns and computed jumps). An invalid slot never reports a
// branch. Purely combinational.
module cobra_branch_detect
  import cobra_pkg::*;
(
  input  logic   valid,
  input  instr_t instr,
  output bdec_t  dec
);

  always_comb begin
    dec.is_branch = valid && instr[31];
    dec.kind      = bkind_e'(instr[30:29]);
    dec.cond      = cond_e'(instr[28:26]);
    dec.s         = instr[25];
    dec.c         = instr[24];
    dec.rs        = instr[23:20];
    dec.bt        = instr[30];   // RET and JR
  end

endmodule
