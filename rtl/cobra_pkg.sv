// cobra_pkg: shared types, constants and instruction encoding for the
// COBRA zero-branch-delay processor front end.
//
// The instruction unit (IU) handles every control-transfer instruction on its
// own and hands only data-manipulation instructions to the execution unit
// (EU). That split follows the document. The 32-bit encoding below is this
// design's own choice; the document only requires branches to be
// recognisable from very few opcode bits:
//
//   bit 31 = 1 : branch, handled entirely by the IU
//     [30:29] kind   00 relative Bcc, 01 CALL (relative), 10 RET (top of
//                    the return stack), 11 JR (computed, target = EU reg rs)
//     [28:26] cond   condition on the EU condition codes (cond_e)
//     [25]    s      sign bit of the branch displacement
//     [24]    c      carry bit: the target's upper bits differ from the
//                    branch's upper bits by one (+1 if s=0, -1 if s=1)
//     [23:20] rs     register holding the target for JR
//     [LSBW-1:0]     least-significant bits of the target address
//   bit 31 = 0 : EU instruction
//     [30:27] op, [26:23] rd, [22:19] rs1, [18:15] rs2, [14:0] signed imm
package cobra_pkg;

  localparam int unsigned IW = 32;   // instruction width
  localparam int unsigned DW = 32;   // EU data width
  localparam int unsigned NREG = 16; // EU registers, r0 reads as zero

  typedef logic [IW-1:0] instr_t;

  typedef enum logic [1:0] {
    BK_REL  = 2'b00,
    BK_CALL = 2'b01,
    BK_RET  = 2'b10,
    BK_JR   = 2'b11
  } bkind_e;

  typedef enum logic [2:0] {
    CC_AL = 3'd0,  // always
    CC_EQ = 3'd1,  // Z
    CC_NE = 3'd2,  // !Z
    CC_LT = 3'd3,  // N
    CC_GE = 3'd4,  // !N
    CC_CS = 3'd5,  // C
    CC_CC = 3'd6,  // !C
    CC_NV = 3'd7   // never
  } cond_e;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,  // rd = rs1 + rs2, sets cc
    OP_SUB  = 4'd2,  // rd = rs1 - rs2, sets cc
    OP_AND  = 4'd3,  // rd = rs1 & rs2, sets cc
    OP_OR   = 4'd4,  // rd = rs1 | rs2, sets cc
    OP_XOR  = 4'd5,  // rd = rs1 ^ rs2, sets cc
    OP_ADDI = 4'd6,  // rd = rs1 + imm, sets cc
    OP_CMP  = 4'd7,  // rs1 - rs2, cc only
    OP_CMPI = 4'd8,  // rs1 - imm, cc only
    OP_MOVI = 4'd9   // rd = imm, cc unchanged
  } op_e;

  // Condition codes written by the EU ALU stage.
  typedef struct packed {
    logic z;
    logic n;
    logic c;
  } cc_t;

  // Decoded view of a branch instruction (early branch detection output).
  typedef struct packed {
    logic       is_branch;
    bkind_e     kind;
    cond_e      cond;
    logic       s;
    logic       c;
    logic [3:0] rs;
    logic       bt;       // computed branch: target comes from EU or LIFO
  } bdec_t;

  // Event strobes of the IU, one cycle wide, for performance counting.
  typedef struct packed {
    logic issue;          // a non-branch instruction entered the EU
    logic bubble;         // a NOP entered the EU
    logic br_early;       // branch analysed one instruction ahead (X2)
    logic br_late;        // branch analysed when already next in line
    logic br_taken_hit;   // taken branch, target line found in BTIM
    logic br_taken_miss;  // taken branch, BTIM miss
    logic br_not_taken;   // branch not taken, removed from the stream
    logic fill_stall;     // taken branch waits for a line fill to end
    logic call_push;      // return address pushed on the LIFO
    logic ret_pop;        // target taken from the LIFO
    logic computed;       // target supplied by the EU register file
  } iu_events_t;

  function automatic logic cond_true(cond_e cond, cc_t cc);
    unique case (cond)
      CC_AL:   return 1'b1;
      CC_EQ:   return cc.z;
      CC_NE:   return !cc.z;
      CC_LT:   return cc.n;
      CC_GE:   return !cc.n;
      CC_CS:   return cc.c;
      CC_CC:   return !cc.c;
      default: return 1'b0;
    endcase
  endfunction

endpackage
