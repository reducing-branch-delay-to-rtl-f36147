// cobra_extmem_model: behavioural model of the external instruction memory
// with a burst-mode protocol (not synthesizable; used by the testbenches).
//
// A request (`req`, `addr`) sampled at a clock edge ends any burst in
// progress and starts a new one. The first word is on `valid`/`data` in the
// LATENCY-th cycle counting the request cycle as cycle 0; after that one
// consecutive word follows every cycle until the next request. `words`
// counts the words delivered (external traffic).
module cobra_extmem_model
  import cobra_pkg::*;
#(
  parameter int unsigned AW      = 16,
  parameter int unsigned LATENCY = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic [AW-1:0] addr,
  output logic          valid,
  output instr_t        data,
  output int unsigned   words
);

  instr_t        mem [2**AW];
  logic          active;
  int unsigned   wait_n;
  logic [AW-1:0] ptr;

  assign valid = active && (wait_n == 0);
  assign data  = mem[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      wait_n <= 0;
      ptr    <= '0;
      words  <= 0;
    end else if (req) begin
      active <= 1'b1;
      wait_n <= LATENCY - 1;
      ptr    <= addr;
    end else if (active) begin
      if (wait_n != 0) wait_n <= wait_n - 1;
      else begin
        ptr   <= ptr + 1'b1;
        words <= words + 1;
      end
    end
  end

endmodule
