// cobra_tac: target address computation (TAC).
//
// For a PC-relative branch the instruction carries the least-significant
// LSBW bits of the target itself, so those bits are usable at once (for
// example to index the BTIM) while an adder forms the upper bits:
// MSB(Ta) = MSB(PC) + adj, where adj is +1 (c=1, s=0), -1 (c=1, s=1) or 0
// (c=0). Multiplexer X4, steered by bt, replaces the result by the target
// of a computed branch (from the EU or the return LIFO). A second adder
// produces Ta + line size, the address where the external-memory burst
// resumes after a BTIM hit. The structure (adder, X4, line-size adder)
// follows the document; the exact meaning of s and c as a -1/0/+1
// adjustment is this design's reading of the two bits.
//
// Purely combinational: outputs are valid in the cycle the inputs are.
module cobra_tac #(
  parameter int unsigned AW        = 16,  // instruction address width (words)
  parameter int unsigned LSBW      = 12,  // target LSBs held in the instruction
  parameter int unsigned LINE_SIZE = 4    // BTIM line size S in instructions
) (
  input  logic [AW-LSBW-1:0] msb_pc,       // upper bits of the branch address
  input  logic               s,            // sign of the displacement
  input  logic               c,            // carry into the upper bits
  input  logic [LSBW-1:0]    lsb_ta,       // target LSBs from the instruction
  input  logic [AW-1:0]      computed_ta,  // target from EU or LIFO
  input  logic               bt,           // 1: computed branch
  output logic [AW-1:0]      ta,           // target address
  output logic [AW-1:0]      ta_plus_line  // target address + line size
);

  logic [AW-LSBW-1:0] adj;
  logic [AW-LSBW-1:0] msb_ta;

  always_comb begin
    if (!c)     adj = '0;
    else if (s) adj = '1;                       // -1
    else        adj = {{(AW-LSBW-1){1'b0}}, 1'b1}; // +1
    msb_ta = msb_pc + adj;
    ta     = bt ? computed_ta : {msb_ta, lsb_ta};   // X4
    ta_plus_line = ta + AW'(LINE_SIZE);
  end

endmodule
