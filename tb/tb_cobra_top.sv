// tb_cobra_top: end-to-end test of the COBRA processor at its default
// parameters (256 BTIM lines of 4 instructions, 3-cycle burst memory).
//
// Programs are generated here: one directed program (a counted loop,
// a sequence longer than a line, calls/returns, a computed jump, a branch
// straight after a BTIM miss, back-to-back branches) and several random
// programs placed across a 4096-word boundary so that the target-address
// carry/sign bits are used. An instruction-level reference model, written
// independently of the RTL, executes each program with zero delay slots and
// lists the non-branch instructions in order; every instruction retired by
// the EU is compared with that list, and so are the final registers.
// Timing checks: once its line is in the BTIM, each iteration of the
// directed loop (6 instructions + a taken branch) takes exactly 6 cycles
// (zero-cost branch), and a taken branch that misses costs exactly
// LATENCY empty EU cycles. Every IU mechanism must occur at least once.
module tb_cobra_top;
  import cobra_pkg::*;

  localparam int unsigned AW = 16;
  localparam int unsigned LATENCY = 3;
  localparam int unsigned RAS_DEPTH = 8;
  localparam int unsigned MAXRET = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          mem_req, mem_valid;
  logic [AW-1:0] mem_addr;
  instr_t        mem_data;
  logic          ret_valid;
  logic [AW-1:0] ret_pc;
  instr_t        ret_instr;
  logic [3:0]    dbg_raddr;
  logic [DW-1:0] dbg_rdata;
  iu_events_t    ev;
  int unsigned   words;

  cobra_top dut (
    .clk, .rst_n, .mem_req, .mem_addr, .mem_valid, .mem_data,
    .ret_valid, .ret_pc, .ret_instr, .dbg_raddr, .dbg_rdata, .ev
  );

  cobra_extmem_model #(.AW(AW), .LATENCY(LATENCY)) u_mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr),
    .valid(mem_valid), .data(mem_data), .words
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ encoding
  instr_t prog [2**AW];

  function automatic instr_t alu(op_e op, int rd, int rs1, int rs2, int imm);
    return {1'b0, op, 4'(rd), 4'(rs1), 4'(rs2), 15'(imm)};
  endfunction
  function automatic instr_t br(bkind_e k, cond_e c, int baddr, int ta, int rs = 0);
    int dm;
    logic s, cy;
    dm = (ta >> 12) - (baddr >> 12);
    cy = (dm != 0);
    s  = (dm < 0);
    if (dm > 1 || dm < -1) $fatal(1, "target out of reach");
    return {1'b1, k, c, s, cy, 4'(rs), 8'h00, 12'(ta)};
  endfunction

  // ------------------------------------------------------ reference model
  logic [AW-1:0] exp_pc [MAXRET];
  instr_t        exp_in [MAXRET];
  int            exp_n;
  logic          exp_complete;   // the program halted before MAXRET
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
        if (t && ta == pc && ins[30:29] == 2'b00) break;   // halt loop
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
        exp_pc[exp_n] = pc;
        exp_in[exp_n] = ins;
        exp_n++;
        pc = pc + 1;
        case (op)
          1, 2, 6, 7, 8: begin
            if (op == 1) w = {1'b0, a} + {1'b0, b};
            else if (op == 6) w = {1'b0, a} + {1'b0, im};
            else if (op == 8) w = {1'b0, a} + {1'b0, ~im} + 1;
            else w = {1'b0, a} + {1'b0, ~b} + 1;
            r = w[DW-1:0]; c = w[DW];
            z = (r == 0); n = r[DW-1];
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

  // --------------------------------------------------------- programs
  task automatic clear_prog();
    for (int i = 0; i < 2**AW; i++) prog[i] = '0;
  endtask

  // halt: branch to itself, always taken, never retires anything
  task automatic put_halt(int a);
    prog[a] = br(BK_REL, CC_AL, a, a);
  endtask

  localparam int LOOP_TOP = 'h0100;
  localparam int LOOP_N   = 6;

  task automatic directed_prog();
    int a;
    clear_prog();
    prog[0] = br(BK_REL, CC_AL, 0, 'h0040);            // branch as first instruction
    a = 'h0040;
    prog[a++] = alu(OP_MOVI, 1, 0, 0, 0);              // r1 = 0 (counter)
    prog[a++] = alu(OP_MOVI, 2, 0, 0, 10);             // r2 = 10 iterations
    prog[a++] = alu(OP_MOVI, 3, 0, 0, 'h0300);         // r3 = JR target
    prog[a++] = alu(OP_MOVI, 14, 0, 0, -1);            // line fill done by now
    prog[a++] = br(BK_REL, CC_AL, a, LOOP_TOP);        // to the loop
    // loop: 6 instructions + conditional branch back
    a = LOOP_TOP;
    prog[a++] = alu(OP_ADDI, 4, 4, 0, 3);
    prog[a++] = alu(OP_ADD, 5, 5, 4, 0);
    prog[a++] = alu(OP_XOR, 6, 5, 4, 0);
    prog[a++] = alu(OP_OR, 7, 6, 1, 0);
    prog[a++] = alu(OP_ADDI, 1, 1, 0, 1);
    prog[a++] = alu(OP_CMP, 0, 1, 2, 0);
    prog[a++] = br(BK_REL, CC_NE, a, LOOP_TOP);
    prog[a++] = br(BK_CALL, CC_AL, a, 'h0200);         // back-to-back branches
    prog[a++] = alu(OP_SUB, 8, 5, 4, 0);
    prog[a++] = br(BK_JR, CC_AL, a, 0, 3);             // computed: r3
    // subroutine: calls a nested one, returns
    a = 'h0200;
    prog[a++] = alu(OP_ADDI, 9, 9, 0, 7);
    prog[a++] = br(BK_REL, CC_EQ, a, 'h0000);          // not taken
    prog[a++] = br(BK_CALL, CC_AL, a, 'h0210);         // miss, soon after a miss
    prog[a++] = alu(OP_AND, 10, 9, 5, 0);
    prog[a++] = br(BK_RET, CC_AL, a, 0);
    a = 'h0210;
    prog[a++] = alu(OP_ADDI, 11, 11, 0, -5);
    prog[a++] = br(BK_RET, CC_GE, a, 0);               // not taken (negative)
    prog[a++] = alu(OP_ADDI, 11, 11, 0, 100);
    prog[a++] = br(BK_RET, CC_GE, a, 0);               // taken
    // JR target: a long sequence, with not-taken branches in it
    a = 'h0300;
    for (int i = 0; i < 12; i++) begin
      prog[a++] = alu(OP_ADDI, 12, 12, 0, i);
      if (i % 3 == 2) prog[a++] = br(BK_REL, CC_CS, a, 'h0000);
    end
    prog[a++] = alu(OP_MOVI, 13, 0, 0, 1);
    put_halt(a);
  endtask

  localparam int RBASE = 'h0F00;
  localparam int RSIZE = 'h0200;

  task automatic random_prog(int seed);
    int a, k, t;
    int unsigned r;
    void'($urandom(seed));
    clear_prog();
    prog[0] = br(BK_REL, CC_AL, 0, RBASE);
    for (a = RBASE; a < RBASE + RSIZE; a++) begin
      r = $urandom_range(99);
      t = RBASE + int'($urandom_range(RSIZE - 1));
      if (r < 55) begin
        k = $urandom_range(9);
        if (k == 0) k = 6;
        prog[a] = alu(op_e'(k), $urandom_range(1, 12), $urandom_range(12),
                      $urandom_range(12), $urandom_range(-40, 40));
      end else if (r < 60)
        prog[a] = alu(OP_MOVI, 15, 0, 0, RBASE + int'($urandom_range(RSIZE - 1)));
      else if (r < 82)
        prog[a] = br(BK_REL, cond_e'($urandom_range(7)), a, t);
      else if (r < 88)
        prog[a] = br(BK_CALL, cond_e'($urandom_range(6)), a, t);
      else if (r < 91)
        prog[a] = br(BK_RET, cond_e'($urandom_range(6)), a, 0);
      else
        prog[a] = br(BK_JR, cond_e'($urandom_range(6)), a, 0, 15);
    end
    // r15 must always hold a target inside the region
    prog[RBASE] = alu(OP_MOVI, 15, 0, 0, RBASE + 1);
    put_halt(RBASE + RSIZE);
  endtask

  // ------------------------------------------------------- checking
  int got_n;
  int cyc_of [MAXRET];
  int unsigned evcnt [11];
  logic running = 1'b0;

  always @(posedge clk) if (running && rst_n) begin
    if (ret_valid && (got_n < exp_n || exp_complete)) begin
      checks++;
      if (got_n >= exp_n || ret_pc !== exp_pc[got_n] || ret_instr !== exp_in[got_n]) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH retire #%0d: pc=%h instr=%h expected pc=%h instr=%h",
                   got_n, ret_pc, ret_instr, exp_pc[got_n], exp_in[got_n]);
      end
      if (got_n < MAXRET) cyc_of[got_n] = cycle;
      got_n++;
    end
    evcnt[0]  += ev.issue;        evcnt[1]  += ev.bubble;
    evcnt[2]  += ev.br_early;     evcnt[3]  += ev.br_late;
    evcnt[4]  += ev.br_taken_hit; evcnt[5]  += ev.br_taken_miss;
    evcnt[6]  += ev.br_not_taken; evcnt[7]  += ev.fill_stall;
    evcnt[8]  += ev.call_push;    evcnt[9]  += ev.ret_pop;
    evcnt[10] += ev.computed;
  end

  task automatic run_prog(string name, int max_cycles);
    int c0;
    ref_run();
    rst_n = 1'b0;
    for (int i = 0; i < 2**AW; i++) u_mem.mem[i] = prog[i];
    got_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    running = 1'b1;
    c0 = cycle;
    while (got_n < exp_n && cycle - c0 < max_cycles) @(posedge clk);
    repeat (20) @(posedge clk);
    running = 1'b0;
    checks++;
    if (exp_complete ? (got_n != exp_n) : (got_n < exp_n)) begin
      failures++;
      $display("%s: retired %0d instructions, expected %0d", name, got_n, exp_n);
    end
    if (exp_complete) for (int i = 0; i < NREG; i++) begin
      dbg_raddr = 4'(i);
      #1;
      checks++;
      if (dbg_rdata !== ref_rf[i]) begin
        failures++;
        $display("%s: r%0d = %h, expected %h", name, i, dbg_rdata, ref_rf[i]);
      end
    end
    $display("%s: %0d instructions in %0d cycles, %0d memory words", name, got_n,
             cycle - c0, words);
  endtask

  // watchdog
  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_iter, iter_len;
    dbg_raddr = '0;
    for (int i = 0; i < 11; i++) evcnt[i] = 0;

    directed_prog();
    run_prog("directed", 5000);
    // loop timing: retirements 4.. are the loop body (6 per iteration)
    for (int it = 2; it < 9; it++) begin
      first_iter = 4 + it * LOOP_N;
      iter_len = cyc_of[first_iter + LOOP_N] - cyc_of[first_iter];
      checks++;
      if (iter_len != LOOP_N) begin
        failures++;
        $display("loop iteration %0d took %0d cycles, expected %0d", it, iter_len, LOOP_N);
      end
    end
    // miss cost: the first loop entry misses; gap from the instruction
    // before the branch to the loop's first instruction is LATENCY + 1
    checks++;
    if (cyc_of[4] - cyc_of[3] != LATENCY + 1) begin
      failures++;
      $display("miss penalty %0d cycles, expected %0d", cyc_of[4] - cyc_of[3] - 1, LATENCY);
    end

    for (int s = 1; s <= 6; s++) begin
      random_prog(s * 7919 + 1);
      run_prog($sformatf("random%0d", s), 150000);
    end

    begin
      static string names [11] = '{"issue", "bubble", "branch seen early", "branch seen late",
                           "taken, BTIM hit", "taken, BTIM miss", "not taken",
                           "stall for line fill", "call push", "return pop",
                           "computed branch"};
      for (int i = 0; i < 11; i++) begin
        $display("event %-20s %0d", names[i], evcnt[i]);
        checks++;
        if (evcnt[i] == 0) begin
          failures++;
          $display("mechanism '%s' never happened", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
