// cobra_ras: hardware return-address stack (LIFO) of the instruction unit.
//
// A CALL pushes its return address and a RET takes its target from the top
// of the stack, both inside the IU and in parallel with the EU, so calls
// and returns cost no EU cycle. The document assumes this stack is present
// but gives no depth or overflow rule: DEPTH is this design's choice, and
// the stack is circular, so an overflow silently drops the oldest entry and
// an underflow returns a stale value. `top` is the current top of stack
// (combinational); push and pop take effect at the clock edge, and a
// simultaneous push and pop replaces the top.
module cobra_ras #(
  parameter int unsigned AW    = 16,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  input  logic          pop,
  output logic [AW-1:0] top,
  output logic          empty
);

  logic [AW-1:0] stack [DEPTH];
  logic [PW-1:0] sp;      // index of the top entry
  logic [PW:0]   count;   // saturating occupancy, for `empty`

  assign top   = stack[sp];
  assign empty = (count == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) stack[i] <= '0;
    end else begin
      if (push && pop) begin
        stack[sp] <= push_addr;
      end else if (push) begin
        stack[PW'((32'(sp) + 1) % DEPTH)] <= push_addr;
        sp <= PW'((32'(sp) + 1) % DEPTH);
        if (count != (PW+1)'(DEPTH)) count <= count + 1'b1;
      end else if (pop) begin
        sp <= PW'((32'(sp) + DEPTH - 1) % DEPTH);
        if (count != 0) count <= count - 1'b1;
      end
    end
  end

endmodule
