// cobra_btim: branch target instruction memory (BTIM).
//
// A direct-mapped store of LINES lines. Each line holds the first LINE_SIZE
// instructions of a branch-target sequence, i.e. of the instructions that
// start at a taken branch's target address Ta (shorter sequences are padded
// with the instructions that follow in memory). The mapping unit, the
// direct mapping, the tags with their comparator and the one-cycle access
// of a whole line follow the document; the index/tag split and the fill
// port are this design's choices.
//
// Lookup (combinational, same cycle): the line index is Ta[IDXW-1:0], the
// tag is Ta[AW-1:IDXW]; `hit` is valid && tag match, and `line` is the whole
// line, word 0 first.
//
// Fill (synchronous): `fill_start` with `fill_ta` invalidates the line that
// Ta maps to and records Ta; then each `fill_we` writes the next word
// (offset `fill_off`) of that line; `fill_we` with `fill_last` also writes
// the tag and sets the valid bit, so a partly loaded line never hits.
// Valid bits are cleared by reset; tags and data are not.
module cobra_btim
  import cobra_pkg::*;
#(
  parameter int unsigned AW        = 16,
  parameter int unsigned LINES     = 256,
  parameter int unsigned LINE_SIZE = 4,
  localparam int unsigned IDXW     = $clog2(LINES),
  localparam int unsigned OFFW     = (LINE_SIZE > 1) ? $clog2(LINE_SIZE) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic [AW-1:0]        ta,
  output logic                 hit,
  output instr_t               line [LINE_SIZE],
  // fill
  input  logic                 fill_start,
  input  logic [AW-1:0]        fill_ta,
  input  logic                 fill_we,
  input  logic [OFFW-1:0]      fill_off,
  input  logic                 fill_last,
  input  instr_t               fill_data
);

  instr_t                data  [LINES][LINE_SIZE];
  logic [AW-IDXW-1:0]    tags  [LINES];
  logic [LINES-1:0]      valid;
  logic [AW-1:0]         cur_ta;   // Ta of the line being filled

  logic [IDXW-1:0] idx;
  logic [IDXW-1:0] fidx;

  assign idx  = ta[IDXW-1:0];
  assign fidx = cur_ta[IDXW-1:0];

  always_comb begin
    hit = valid[idx] && (tags[idx] == ta[AW-1:IDXW]);
    for (int w = 0; w < LINE_SIZE; w++) line[w] = data[idx][w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      cur_ta <= '0;
    end else if (fill_start) begin
      valid[fill_ta[IDXW-1:0]] <= 1'b0;
      cur_ta                   <= fill_ta;
    end else if (fill_we && fill_last) begin
      valid[fidx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fill_we && !fill_start) begin
      data[fidx][fill_off] <= fill_data;
      if (fill_last) tags[fidx] <= cur_ta[AW-1:IDXW];
    end
  end

endmodule
