// cobra_pc: PC block of the instruction unit (multiplexer X, PC register and
// incrementer).
//
// The PC holds the address of the instruction that X1 will hand to the EU
// next (the head of the sequencer). Each cycle it either loads the target
// address Ta of a taken branch, or advances by the number of instructions
// removed from the stream (0, 1 or 2 - two when a not-taken branch is
// skipped together with the instruction before it). Its upper bits feed the
// TAC. The X / PC / +1 structure is the document's; the 0-2 step and the
// reset address are this design's choices. Registered output.
module cobra_pc #(
  parameter int unsigned AW         = 16,
  parameter int unsigned RESET_ADDR = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] ta,
  input  logic [1:0]    step,
  output logic [AW-1:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pc <= AW'(RESET_ADDR);
    else if (load) pc <= ta;
    else           pc <= pc + AW'(step);
  end

endmodule
