// cobra_iseq: instruction sequencer of the IU - line register, Delay
// register, and the X1/X2 selection.
//
// Holds the instructions of the current sequence that have been fetched but
// not yet sent on, in order. Two sources fill it:
//  * the line register: on a taken branch whose target line hits in the
//    BTIM, the whole line is loaded in parallel (`load`, `line`);
//  * the external-memory burst: a word on `mem_valid`/`mem_data` is held
//    (the Delay register role) until it is sent to the EU.
// `flush` (any taken branch) discards everything held and the memory word
// of that cycle, which belongs to the abandoned path.
//
// Outputs: h0 is the instruction X1 sends to the ALU stage this cycle; h1 is
// the one after it (X2), examined by the branch detector. h0 only ever comes
// from a register, so a memory word reaches the EU one cycle after it
// arrives; h1 may be taken straight from the memory bus, so a branch arriving
// from memory is still seen one instruction early. `pop` (0, 1 or 2) removes
// instructions from the front at the clock edge: 2 when h1 was a branch that
// is dropped from the stream (the document's "counter incremented by two").
//
// The document draws X1/X2 as multiplexers over fixed line-register slots
// steered by a counter; here the same selection is a small shifting queue of
// DEPTH entries, which also absorbs memory words that arrive before the
// line register is used up (DEPTH is this design's choice). `overflow`
// flags a memory word lost because the queue was full.
module cobra_iseq
  import cobra_pkg::*;
#(
  parameter int unsigned LINE_SIZE = 4,
  parameter int unsigned DEPTH     = 2 * LINE_SIZE,
  localparam int unsigned CW       = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        load,
  input  instr_t      line [LINE_SIZE],
  input  logic        mem_valid,
  input  instr_t      mem_data,
  input  logic [1:0]  pop,
  output logic        h0_valid,
  output instr_t      h0,
  output logic        h1_valid,
  output instr_t      h1,
  output logic        overflow
);

  instr_t        q [DEPTH];
  logic [CW-1:0] count;

  // combined stream: held entries followed by the word on the memory bus
  always_comb begin
    h0_valid = (count != 0);
    h0       = q[0];
    if (count >= 2) begin
      h1_valid = 1'b1;
      h1       = q[1];
    end else begin
      h1_valid = (count == 1) && mem_valid;
      h1       = mem_data;
    end
  end

  logic          mem_used;
  logic [CW-1:0] after_pop;
  always_comb begin
    mem_used  = (CW'(pop) > count);           // pop of 2 took h1 from the bus
    after_pop = mem_used ? '0 : count - CW'(pop);
    overflow  = !flush && mem_valid && !mem_used && (after_pop == CW'(DEPTH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (flush) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      if (load) for (int i = 0; i < LINE_SIZE; i++) q[i] <= line[i];
      count <= load ? CW'(LINE_SIZE) : '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (i + int'(pop) < DEPTH) q[i] <= q[i + int'(pop)];
        if (CW'(i) == after_pop) q[i] <= mem_data;
      end
      count <= after_pop + CW'(mem_valid && !mem_used && !overflow);
    end
  end

endmodule
