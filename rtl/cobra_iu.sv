// cobra_iu: COBRA instruction unit (IU) with a branch target instruction
// memory (BTIM).
//
// The IU fetches instructions, removes every branch from the stream it
// sends to the EU, and executes branches in parallel with the EU. Each
// cycle the ALU stage executes instruction h0 (chosen by X1) while the early
// branch detector examines the next instruction h1 (X2). If h1 is a branch:
//  * the TAC forms its target Ta (upper-bit adder, or a computed target from
//    the EU register file or the return LIFO) and the BTIM is searched with
//    Ta in the same cycle - the prefetch of the taken path;
//  * the condition codes that h0 is producing in the ALU decide, at the end
//    of the cycle, between the two prefetched paths. Not taken: the branch
//    is skipped and the instruction after it follows h0 with no gap. Taken
//    and BTIM hit: the whole target line enters the line register and its
//    first instruction goes to the EU in the next cycle, so the branch costs
//    no cycle and needs no delay slot; the external-memory burst restarts at
//    Ta + line size (multiplexer X3). Taken and miss: the burst restarts at
//    Ta and its first LINE_SIZE words are written into the BTIM line.
// A branch that becomes h0 before it could be examined (the first
// instruction of a sequence, or a branch arriving from memory right behind
// its predecessor) is resolved with the current condition codes while a NOP
// enters the EU. A taken branch met while a line is still being filled waits
// until the fill ends. CALL pushes its return address on the LIFO and RET
// pops its target from it, both without using the EU.
//
// All of the above follows the document for a pipeline whose ALU is the
// second stage (zero delay slots). The fetch-queue form of the line/Delay
// registers, the stall rule's exact cycle, the return address (CALL + 1,
// there being no delay slot) and the reset behaviour (a burst from
// RESET_ADDR that also fills its line) are this design's choices.
//
// External memory: `mem_req`/`mem_addr` are sampled at a clock edge and
// start a burst there, ending any burst in progress; the memory then returns
// consecutive words on `mem_valid`/`mem_data`, one per cycle, the first one
// MEM_LATENCY cycles after the request cycle. Every valid word belongs to
// the latest request.
module cobra_iu
  import cobra_pkg::*;
#(
  parameter int unsigned AW         = 16,
  parameter int unsigned LSBW       = 12,
  parameter int unsigned LINES      = 256,
  parameter int unsigned LINE_SIZE  = 4,
  parameter int unsigned RAS_DEPTH  = 8,
  parameter int unsigned RESET_ADDR = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  // to / from the EU
  output logic            issue_valid,
  output instr_t          issue_instr,
  output logic [AW-1:0]   issue_pc,
  input  cc_t             cc_next,     // condition codes at the end of this cycle
  output logic [3:0]      jr_rs,
  input  logic [DW-1:0]   jr_val,
  // external memory, burst mode
  output logic            mem_req,
  output logic [AW-1:0]   mem_addr,
  input  logic            mem_valid,
  input  instr_t          mem_data,
  // event strobes
  output iu_events_t      ev
);

  localparam int unsigned OFFW = (LINE_SIZE > 1) ? $clog2(LINE_SIZE) : 1;

  // ---------------------------------------------------------------- state
  logic            booted;
  logic            fill_active;
  logic [OFFW-1:0] fill_cnt;
  logic [AW-1:0]   pc;

  // ---------------------------------------------------------- sequencer
  logic       h0_valid, h1_valid, overflow;
  instr_t     h0, h1;
  logic [1:0] pop;
  logic       flush, load;
  instr_t     btim_line [LINE_SIZE];

  cobra_iseq #(.LINE_SIZE(LINE_SIZE)) u_iseq (
    .clk, .rst_n, .flush, .load, .line(btim_line),
    .mem_valid, .mem_data, .pop,
    .h0_valid, .h0, .h1_valid, .h1, .overflow
  );

  // ---------------------------------------------- early branch detection
  bdec_t d0, d1;
  cobra_branch_detect u_det0 (.valid(h0_valid), .instr(h0), .dec(d0));
  cobra_branch_detect u_det1 (.valid(h1_valid), .instr(h1), .dec(d1));

  // X1: a non-branch h0 enters the ALU stage, otherwise a NOP
  always_comb begin
    issue_valid = booted && h0_valid && !d0.is_branch;
    issue_instr = issue_valid ? h0 : '0;
    issue_pc    = pc;
  end

  // the branch under analysis: h0 itself (late) or h1 (early, via X2)
  logic      br_late, br_early, br_any;
  bdec_t     bd;
  instr_t    binstr;
  logic [AW-1:0] baddr;
  always_comb begin
    br_late  = booted && d0.is_branch;
    br_early = booted && issue_valid && d1.is_branch;
    br_any   = br_late || br_early;
    bd       = br_late ? d0 : d1;
    binstr   = br_late ? h0 : h1;
    baddr    = br_late ? pc : pc + 1'b1;
  end

  // ------------------------------------------------------- LIFO and TAC
  logic [AW-1:0] ras_top, ta, ta_plus_line, computed_ta;
  logic          ras_empty, ras_push, ras_pop;

  cobra_ras #(.AW(AW), .DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n, .push(ras_push), .push_addr(baddr + 1'b1), .pop(ras_pop),
    .top(ras_top), .empty(ras_empty)
  );

  assign jr_rs       = bd.rs;
  assign computed_ta = (bd.kind == BK_RET) ? ras_top : jr_val[AW-1:0];

  cobra_tac #(.AW(AW), .LSBW(LSBW), .LINE_SIZE(LINE_SIZE)) u_tac (
    .msb_pc(baddr[AW-1:LSBW]), .s(bd.s), .c(bd.c), .lsb_ta(binstr[LSBW-1:0]),
    .computed_ta, .bt(bd.bt), .ta, .ta_plus_line
  );

  // --------------------------------------------------------------- BTIM
  logic fill_start, fill_we, fill_last, hit;
  logic [AW-1:0] fill_ta;

  cobra_btim #(.AW(AW), .LINES(LINES), .LINE_SIZE(LINE_SIZE)) u_btim (
    .clk, .rst_n, .ta, .hit, .line(btim_line),
    .fill_start, .fill_ta, .fill_we, .fill_off(fill_cnt), .fill_last,
    .fill_data(mem_data)
  );

  // -------------------------------------------------- branch resolution
  logic taken, stall, go;
  always_comb begin
    taken = br_any && cond_true(bd.cond, cc_next);
    stall = taken && fill_active;       // finish the line fill first
    go    = taken && !fill_active;      // take the branch now

    flush = go;
    load  = go && hit;

    // words removed from the stream this cycle
    if (!booted || go)                 pop = 2'd0;
    else if (br_late)                  pop = stall ? 2'd0 : 2'd1;
    else if (issue_valid)              pop = (br_early && !stall) ? 2'd2 : 2'd1;
    else                               pop = 2'd0;

    // X3: address of the burst that a taken branch starts
    mem_req  = !booted || go;
    mem_addr = !booted ? AW'(RESET_ADDR) : (hit ? ta_plus_line : ta);

    fill_start = !booted || (go && !hit);
    fill_ta    = !booted ? AW'(RESET_ADDR) : ta;
    fill_we    = fill_active && mem_valid;
    fill_last  = fill_cnt == OFFW'(LINE_SIZE - 1);

    ras_push = go && (bd.kind == BK_CALL);
    ras_pop  = go && (bd.kind == BK_RET);
  end

  cobra_pc #(.AW(AW), .RESET_ADDR(RESET_ADDR)) u_pc (
    .clk, .rst_n, .load(go), .ta, .step(pop), .pc
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      booted      <= 1'b0;
      fill_active <= 1'b0;
      fill_cnt    <= '0;
    end else begin
      booted <= 1'b1;
      if (fill_start) begin
        fill_active <= 1'b1;
        fill_cnt    <= '0;
      end else if (fill_we) begin
        fill_cnt <= fill_cnt + 1'b1;
        if (fill_last) fill_active <= 1'b0;
      end
    end
  end

  // --------------------------------------------------------------- events
  always_comb begin
    ev               = '0;
    ev.issue         = issue_valid;
    ev.bubble        = booted && !issue_valid;
    ev.br_early      = br_early && !stall;
    ev.br_late       = br_late && !stall;
    ev.br_taken_hit  = go && hit;
    ev.br_taken_miss = go && !hit;
    ev.br_not_taken  = br_any && !taken;
    ev.fill_stall    = stall;
    ev.call_push     = ras_push;
    ev.ret_pop       = ras_pop;
    ev.computed      = go && (bd.kind == BK_JR);
  end

  // no memory word may be lost: the burst cannot be held back
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !overflow)
    else $error("cobra_iu: fetch queue overflow");

endmodule
