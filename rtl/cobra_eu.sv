// cobra_eu: execution unit (EU) - a minimal two-stage integer pipeline.
//
// The EU executes only data-manipulation instructions; the IU never sends it
// a branch. Stage ALU reads operands (forwarded from the WR stage), computes
// the result and the condition codes; stage WR writes the register file.
// With the IU's fetch as stage one, the ALU is the second pipeline stage,
// the configuration for which the document's branches need no delay slot.
// The document leaves the EU's design open (it shows only a sample
// pipeline), so the instruction set, the register file (NREG x DW, r0 = 0)
// and the flag rules (Z, N, C; C = carry out of add, or no borrow on
// subtract; logic ops clear C) are this design's choices.
//
// PRE_ALU_STAGES inserts that many register stages (e.g. decode and operand
// fetch, as in a D-OF-ALU-WR pipeline) between issue and the ALU stage.
// The IU is unchanged: it still resolves a branch with the condition codes
// of the ALU stage, so the PRE_ALU_STAGES instructions issued just before a
// branch become its delay slots (N - 2 slots when the ALU is stage N) and
// must not change the condition codes or the register a computed jump
// reads - the compiler's job under the delayed-branch technique. The
// default 0 is the configuration the design is built around. Operands are
// read in the ALU stage, so the extra stages add no data hazards.
//
// Timing: `cc_next` and the computed-jump port `jr_val` are combinational
// and already include the effect of the instruction now in the ALU stage,
// which is what lets the IU resolve a branch in the same cycle as the
// instruction that sets its condition codes. Retirement is reported from the
// WR stage, one cycle after the ALU stage.
module cobra_eu
  import cobra_pkg::*;
#(
  parameter int unsigned AW             = 16,
  parameter int unsigned PRE_ALU_STAGES = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    issue_valid,
  input  instr_t                  issue_instr,
  input  logic [AW-1:0]           issue_pc,
  output cc_t                     cc_next,
  input  logic [3:0]              jr_rs,
  output logic [DW-1:0]           jr_val,
  // WR stage, for tracing
  output logic                    ret_valid,
  output logic [AW-1:0]           ret_pc,
  output instr_t                  ret_instr,
  // register read port for inspection
  input  logic [3:0]              dbg_raddr,
  output logic [DW-1:0]           dbg_rdata
);

  logic [DW-1:0] rf [NREG];
  cc_t           cc;

  // optional stages before the ALU (delay registers)
  logic          alu_valid;
  instr_t        alu_instr;
  logic [AW-1:0] alu_pc;

  if (PRE_ALU_STAGES == 0) begin : g_direct
    assign alu_valid = issue_valid;
    assign alu_instr = issue_instr;
    assign alu_pc    = issue_pc;
  end else begin : g_pre
    logic          pv [PRE_ALU_STAGES];
    instr_t        pi [PRE_ALU_STAGES];
    logic [AW-1:0] pp [PRE_ALU_STAGES];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < PRE_ALU_STAGES; i++) begin
          pv[i] <= 1'b0; pi[i] <= '0; pp[i] <= '0;
        end
      end else begin
        pv[0] <= issue_valid; pi[0] <= issue_instr; pp[0] <= issue_pc;
        for (int i = 1; i < PRE_ALU_STAGES; i++) begin
          pv[i] <= pv[i-1]; pi[i] <= pi[i-1]; pp[i] <= pp[i-1];
        end
      end
    end
    assign alu_valid = pv[PRE_ALU_STAGES-1];
    assign alu_instr = pi[PRE_ALU_STAGES-1];
    assign alu_pc    = pp[PRE_ALU_STAGES-1];
  end

  // WR stage register
  logic          wr_valid, wr_we;
  logic [3:0]    wr_rd;
  logic [DW-1:0] wr_data;

  function automatic logic [DW-1:0] rd_fwd(logic [3:0] r);
    if (r == 4'd0)                        return '0;
    else if (wr_valid && wr_we && wr_rd == r) return wr_data;
    else                                  return rf[r];
  endfunction

  op_e           op;
  logic [3:0]    rd, rs1, rs2;
  logic [DW-1:0] a, b, imm, res;
  logic          we, setcc, cout;

  always_comb begin
    op   = op_e'(alu_instr[30:27]);
    rd   = alu_instr[26:23];
    rs1  = alu_instr[22:19];
    rs2  = alu_instr[18:15];
    imm  = DW'($signed(alu_instr[14:0]));
    a    = rd_fwd(rs1);
    b    = rd_fwd(rs2);
    res  = '0;
    cout = 1'b0;
    we   = 1'b0;
    setcc = 1'b0;
    unique case (op)
      OP_ADD:  begin {cout, res} = {1'b0, a} + {1'b0, b};     we = 1'b1; setcc = 1'b1; end
      OP_SUB:  begin {cout, res} = {1'b0, a} + {1'b0, ~b} + 1'b1; we = 1'b1; setcc = 1'b1; end
      OP_AND:  begin res = a & b; we = 1'b1; setcc = 1'b1; end
      OP_OR:   begin res = a | b; we = 1'b1; setcc = 1'b1; end
      OP_XOR:  begin res = a ^ b; we = 1'b1; setcc = 1'b1; end
      OP_ADDI: begin {cout, res} = {1'b0, a} + {1'b0, imm};   we = 1'b1; setcc = 1'b1; end
      OP_CMP:  begin {cout, res} = {1'b0, a} + {1'b0, ~b} + 1'b1; setcc = 1'b1; end
      OP_CMPI: begin {cout, res} = {1'b0, a} + {1'b0, ~imm} + 1'b1; setcc = 1'b1; end
      OP_MOVI: begin res = imm; we = 1'b1; end
      default: ;
    endcase
    we    = we && alu_valid && (rd != 4'd0);
    setcc = setcc && alu_valid;
    if (setcc) cc_next = '{z: (res == '0), n: res[DW-1], c: cout};
    else       cc_next = cc;
    // computed-jump target, including the instruction now in the ALU stage
    if (jr_rs == 4'd0)               jr_val = '0;
    else if (we && rd == jr_rs)      jr_val = res;
    else                             jr_val = rd_fwd(jr_rs);
    dbg_rdata = rf[dbg_raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cc        <= '0;
      wr_valid  <= 1'b0;
      wr_we     <= 1'b0;
      wr_rd     <= '0;
      wr_data   <= '0;
      ret_valid <= 1'b0;
      ret_pc    <= '0;
      ret_instr <= '0;
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else begin
      cc        <= cc_next;
      wr_valid  <= alu_valid;
      wr_we     <= we;
      wr_rd     <= rd;
      wr_data   <= res;
      ret_valid <= alu_valid;
      ret_pc    <= alu_pc;
      ret_instr <= alu_instr;
      if (wr_valid && wr_we) rf[wr_rd] <= wr_data;
    end
  end

endmodule
