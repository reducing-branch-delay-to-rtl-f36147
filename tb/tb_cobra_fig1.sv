// tb_cobra_fig1: the processor with a deeper EU - decode and operand-fetch
// stages ahead of the ALU (IF, D, OF, ALU, WR), so the ALU is the fourth
// stage and every branch has two delay slots. Programs are built as the
// delayed-branch technique requires: the two instructions just before each
// branch change neither the condition codes nor the computed-jump
// register. With that rule, sequential semantics hold, and an instruction-
// level reference model checks every retired instruction and the final
// registers. Directed checks: a resident loop of 7 instructions (compare,
// two delay-slot moves, ...) still runs at 7 cycles per iteration, and a
// program that breaks the rule (a compare in a delay slot) is shown to
// branch on the older condition codes.
module tb_cobra_fig1;
  import cobra_pkg::*;

  localparam int unsigned AW = 16, LATENCY = 3, RAS_DEPTH = 8, MAXRET = 3000, K = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          mem_req, mem_valid, ret_valid;
  logic [AW-1:0] mem_addr, ret_pc;
  instr_t        mem_data, ret_instr;
  logic [3:0]    dbg_raddr;
  logic [DW-1:0] dbg_rdata;
  iu_events_t    ev;
  int unsigned   words;

  cobra_top #(.EU_PRE_ALU_STAGES(K)) dut (
    .clk, .rst_n, .mem_req, .mem_addr, .mem_valid, .mem_data,
    .ret_valid, .ret_pc, .ret_instr, .dbg_raddr, .dbg_rdata, .ev
  );
  cobra_extmem_model #(.AW(AW), .LATENCY(LATENCY)) u_mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .valid(mem_valid), .data(mem_data), .words
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  instr_t prog [2**AW];
  function automatic instr_t alu(op_e op, int rd, int rs1, int rs2, int imm);
    return {1'b0, op, 4'(rd), 4'(rs1), 4'(rs2), 15'(imm)};
  endfunction
  function automatic instr_t br(bkind_e k, cond_e c, int baddr, int ta, int rs = 0);
    int dm = (ta >> 12) - (baddr >> 12);
    return {1'b1, k, c, (dm < 0), (dm != 0), 4'(rs), 8'h00, 12'(ta)};
  endfunction

  logic [AW-1:0] exp_pc [MAXRET];
  instr_t        exp_in [MAXRET];
  int            exp_n;
  logic          exp_complete;
  logic [DW-1:0] ref_rf [NREG];

  task automatic ref_run();
    logic [AW-1:0] pc = '0;
    logic [DW-1:0] rf [NREG];
    logic z = 0, n = 0, c = 0;
    logic [AW-1:0] stk [RAS_DEPTH];
    int sp = 0;
    for (int i = 0; i < NREG; i++) rf[i] = '0;
    for (int i = 0; i < RAS_DEPTH; i++) stk[i] = '0;
    exp_n = 0;
    for (int step = 0; step < 200000 && exp_n < MAXRET; step++) begin
      instr_t ins = prog[pc];
      if (ins[31]) begin
        logic t;
        logic [AW-1:0] ta;
        case (ins[28:26])
          0: t = 1; 1: t = z; 2: t = !z; 3: t = n; 4: t = !n;
          5: t = c; 6: t = !c; default: t = 0;
        endcase
        case (ins[30:29])
          2'b10: ta = stk[sp];
          2'b11: ta = rf[ins[23:20]][AW-1:0];
          default: begin
            int hi = int'(pc) >> 12;
            if (ins[24]) hi = ins[25] ? hi - 1 : hi + 1;
            ta = AW'((hi << 12) | int'(ins[11:0]));
          end
        endcase
        if (t && ta == pc && ins[30:29] == 2'b00) break;
        if (t) begin
          if (ins[30:29] == 2'b01) begin sp = (sp + 1) % RAS_DEPTH; stk[sp] = pc + 1; end
          if (ins[30:29] == 2'b10) sp = (sp + RAS_DEPTH - 1) % RAS_DEPTH;
          pc = ta;
        end else pc = pc + 1;
      end else begin
        logic [DW-1:0] a, b, im, r;
        logic [DW:0] w;
        int op = int'(ins[30:27]);
        a  = rf[ins[22:19]];
        b  = rf[ins[18:15]];
        im = {{(DW-15){ins[14]}}, ins[14:0]};
        exp_pc[exp_n] = pc; exp_in[exp_n] = ins; exp_n++;
        pc = pc + 1;
        case (op)
          1, 2, 6, 7, 8: begin
            if (op == 1) w = {1'b0, a} + {1'b0, b};
            else if (op == 6) w = {1'b0, a} + {1'b0, im};
            else if (op == 8) w = {1'b0, a} + {1'b0, ~im} + 1;
            else w = {1'b0, a} + {1'b0, ~b} + 1;
            r = w[DW-1:0]; c = w[DW]; z = (r == 0); n = r[DW-1];
            if (op != 7 && op != 8 && ins[26:23] != 0) rf[ins[26:23]] = r;
          end
          3, 4, 5: begin
            r = (op == 3) ? (a & b) : (op == 4) ? (a | b) : (a ^ b);
            c = 0; z = (r == 0); n = r[DW-1];
            if (ins[26:23] != 0) rf[ins[26:23]] = r;
          end
          9: if (ins[26:23] != 0) rf[ins[26:23]] = im;
          default: ;
        endcase
      end
    end
    exp_complete = (exp_n < MAXRET);
    for (int i = 0; i < NREG; i++) ref_rf[i] = rf[i];
  endtask

  int got_n;
  int cyc_of [MAXRET];
  logic running = 1'b0;
  always @(posedge clk) if (running && ret_valid && (got_n < exp_n || exp_complete)) begin
    checks++;
    if (got_n >= exp_n || ret_pc !== exp_pc[got_n] || ret_instr !== exp_in[got_n]) begin
      failures++;
      if (failures < 10) $display("retire #%0d: pc=%h expected %h", got_n, ret_pc, exp_pc[got_n]);
    end
    if (got_n < MAXRET) cyc_of[got_n] = cycle;
    got_n++;
  end

  task automatic run_prog(string name, int max_cycles);
    int c0;
    ref_run();
    rst_n = 1'b0;
    for (int i = 0; i < 2**AW; i++) u_mem.mem[i] = prog[i];
    got_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1; running = 1'b1; c0 = cycle;
    while (got_n < exp_n && cycle - c0 < max_cycles) @(posedge clk);
    repeat (20) @(posedge clk);
    running = 1'b0;
    checks++;
    if (exp_complete ? (got_n != exp_n) : (got_n < exp_n)) begin
      failures++; $display("%s: retired %0d, expected %0d", name, got_n, exp_n);
    end
    if (exp_complete) for (int i = 0; i < NREG; i++) begin
      dbg_raddr = 4'(i);
      #1;
      checks++;
      if (dbg_rdata !== ref_rf[i]) begin
        failures++; $display("%s: r%0d = %h, expected %h", name, i, dbg_rdata, ref_rf[i]);
      end
    end
    $display("%s: %0d instructions in %0d cycles", name, got_n, cycle - c0);
  endtask


  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    dbg_raddr = '0;
    // ---- directed: a counted loop with two delay slots per branch
    for (int i = 0; i < 2**AW; i++) prog[i] = '0;
    a = 0;
    prog[a++] = alu(OP_MOVI, 1, 0, 0, 0);
    prog[a++] = alu(OP_MOVI, 2, 0, 0, 12);
    prog[a++] = alu(OP_MOVI, 3, 0, 0, 0);
    prog[a++] = alu(OP_MOVI, 4, 0, 0, 0);
    prog[a++] = br(BK_REL, CC_AL, a, 'h0100);
    a = 'h0100;
    prog[a++] = alu(OP_ADDI, 3, 3, 0, 5);
    prog[a++] = alu(OP_ADD, 4, 4, 3, 0);
    prog[a++] = alu(OP_XOR, 5, 4, 3, 0);
    prog[a++] = alu(OP_ADDI, 1, 1, 0, 1);
    prog[a++] = alu(OP_CMP, 0, 1, 2, 0);
    prog[a++] = alu(OP_MOVI, 13, 0, 0, 1);             // delay slot
    prog[a++] = alu(OP_MOVI, 14, 0, 0, 2);             // delay slot
    prog[a++] = br(BK_REL, CC_NE, a, 'h0100);
    prog[a++] = alu(OP_MOVI, 6, 0, 0, 77);
    prog[a] = br(BK_REL, CC_AL, a, a);
    run_prog("loop", 3000);
    for (int it = 2; it < 11; it++) begin
      checks++;
      if (cyc_of[4 + 7 * (it + 1)] - cyc_of[4 + 7 * it] != 7) begin
        failures++;
        $display("loop pass %0d took %0d cycles, expected 7", it,
                 cyc_of[4 + 7 * (it + 1)] - cyc_of[4 + 7 * it]);
      end
    end

    // ---- a compare inside a delay slot is not seen by the branch
    for (int i = 0; i < 2**AW; i++) prog[i] = '0;
    a = 0;
    prog[a++] = alu(OP_MOVI, 1, 0, 0, 3);
    prog[a++] = alu(OP_CMPI, 0, 1, 0, 3);              // z = 1
    prog[a++] = alu(OP_MOVI, 2, 0, 0, 9);
    prog[a++] = alu(OP_MOVI, 3, 0, 0, 9);
    prog[a++] = alu(OP_MOVI, 4, 0, 0, 9);
    prog[a++] = alu(OP_CMPI, 0, 1, 0, 4);              // z = 0, but in a delay slot
    prog[a++] = alu(OP_MOVI, 5, 0, 0, 9);
    prog[a++] = br(BK_REL, CC_EQ, a, 'h0040);          // sees z = 1: taken
    prog[a++] = alu(OP_MOVI, 7, 0, 0, 1);
    prog[a] = br(BK_REL, CC_AL, a, a);
    prog['h40] = alu(OP_MOVI, 8, 0, 0, 1);
    prog['h41] = br(BK_REL, CC_AL, 'h41, 'h41);
    rst_n = 1'b0;
    for (int i = 0; i < 2**AW; i++) u_mem.mem[i] = prog[i];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (100) @(posedge clk);
    dbg_raddr = 4'd8;
    #1;
    checks++;
    if (dbg_rdata !== 32'd1) begin failures++; $display("delay-slot compare changed the branch"); end
    dbg_raddr = 4'd7;
    #1;
    checks++;
    if (dbg_rdata !== 32'd0) begin failures++; $display("fall-through path executed"); end

    // ---- random programs obeying the delay-slot rule
    for (int s = 1; s <= 4; s++) begin
      int starts [64];
      int nb = 40;
      void'($urandom(s * 31337));
      for (int i = 0; i < 2**AW; i++) prog[i] = '0;
      a = 'h0F40;
      for (int b = 0; b < nb; b++) begin
        starts[b] = a;
        a += 3 + 3 + 1 + 3;   // upper bound of a block, fixed spacing
      end
      prog[0] = br(BK_REL, CC_AL, 0, starts[0]);
      for (int b = 0; b < nb; b++) begin
        int len = $urandom_range(1, 3);
        int r = $urandom_range(99);
        int t = starts[$urandom_range(nb - 1)];
        a = starts[b];
        if (b == 0) prog[a++] = alu(OP_MOVI, 15, 0, 0, starts[1]);
        for (int j = 0; j < len; j++)
          prog[a++] = alu(op_e'($urandom_range(1, 6)), $urandom_range(1, 12),
                          $urandom_range(12), $urandom_range(12), $urandom_range(-20, 20));
        if ($urandom_range(3) == 0)
          prog[a++] = alu(OP_MOVI, 15, 0, 0, starts[$urandom_range(nb - 1)]);
        prog[a++] = alu(OP_CMPI, 0, $urandom_range(1, 12), 0, $urandom_range(-20, 20));
        prog[a++] = alu(OP_MOVI, 13, 0, 0, b);          // delay slot
        prog[a++] = alu(OP_MOVI, 14, 0, 0, len);        // delay slot
        if (r < 60)      prog[a++] = br(BK_REL, cond_e'($urandom_range(7)), a, t);
        else if (r < 75) prog[a++] = br(BK_CALL, cond_e'($urandom_range(6)), a, t);
        else if (r < 88) prog[a++] = br(BK_RET, cond_e'($urandom_range(6)), a, 0);
        else             prog[a++] = br(BK_JR, cond_e'($urandom_range(6)), a, 0, 15);
        // fall through to the next block
        if (b + 1 < nb) while (a < starts[b + 1]) prog[a++] = alu(OP_MOVI, 12, 0, 0, a);
      end
      run_prog($sformatf("random%0d", s), 100000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
