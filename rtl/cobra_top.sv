// cobra_top: processor front end with zero-cost branches (COBRA) - the
// instruction unit with its BTIM wired to a two-stage execution unit.
//
// The IU supplies one data-manipulation instruction per cycle to the EU and
// executes all branches itself, in parallel; the EU returns the condition
// codes of the instruction in its ALU stage (same cycle) and the register
// value a computed jump needs. The external instruction memory, which the
// document takes as given, is outside: its burst port is brought out.
// Defaults: 256 BTIM lines of 4 instructions (the document's chosen line
// size for a 3-cycle memory), 16-bit word addresses, 12 target LSBs in a
// branch, an 8-entry return LIFO, and an EU whose ALU is the second
// pipeline stage, so that branches have no delay slot. EU_PRE_ALU_STAGES
// deepens the EU (for example 2 for a D-OF-ALU-WR pipeline); the
// instructions issued in the cycles before a branch then act as its
// EU_PRE_ALU_STAGES delay slots. Retirement (WR stage) and a register read
// port are brought out for observation, and the IU's event strobes for
// performance counting.
module cobra_top
  import cobra_pkg::*;
#(
  parameter int unsigned AW         = 16,
  parameter int unsigned LSBW       = 12,
  parameter int unsigned LINES      = 256,
  parameter int unsigned LINE_SIZE  = 4,
  parameter int unsigned RAS_DEPTH  = 8,
  parameter int unsigned RESET_ADDR = 0,
  parameter int unsigned EU_PRE_ALU_STAGES = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  // external memory, burst mode
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  input  logic          mem_valid,
  input  instr_t        mem_data,
  // observation
  output logic          ret_valid,
  output logic [AW-1:0] ret_pc,
  output instr_t        ret_instr,
  input  logic [3:0]    dbg_raddr,
  output logic [DW-1:0] dbg_rdata,
  output iu_events_t    ev
);

  logic          issue_valid;
  instr_t        issue_instr;
  logic [AW-1:0] issue_pc;
  cc_t           cc_next;
  logic [3:0]    jr_rs;
  logic [DW-1:0] jr_val;

  cobra_iu #(
    .AW(AW), .LSBW(LSBW), .LINES(LINES), .LINE_SIZE(LINE_SIZE),
    .RAS_DEPTH(RAS_DEPTH), .RESET_ADDR(RESET_ADDR)
  ) u_iu (
    .clk, .rst_n, .issue_valid, .issue_instr, .issue_pc, .cc_next,
    .jr_rs, .jr_val, .mem_req, .mem_addr, .mem_valid, .mem_data, .ev
  );

  cobra_eu #(.AW(AW), .PRE_ALU_STAGES(EU_PRE_ALU_STAGES)) u_eu (
    .clk, .rst_n, .issue_valid, .issue_instr, .issue_pc, .cc_next,
    .jr_rs, .jr_val, .ret_valid, .ret_pc, .ret_instr, .dbg_raddr, .dbg_rdata
  );

endmodule
