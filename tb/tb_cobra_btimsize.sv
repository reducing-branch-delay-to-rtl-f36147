// tb_cobra_btimsize: the same call-heavy program run on four copies of the
// processor whose BTIM has 32, 64, 128 and 256 lines of 4 instructions
// (direct mapped, external memory latency 3), the cache sizes of the
// benchmark study the design is based on. The benchmarks themselves are not
// available, so the program is synthetic: a main loop that calls 100
// short routines in a scrambled order, six times over; every fourth routine
// contains a small loop and every third a never-taken branch. That gives
// about 200 distinct taken-branch targets, more than the smaller BTIMs hold.
// Checked for each copy:
//   - retired stream (pc and instruction) against an instruction-level
//     reference model;
//   - the hit/miss outcome of every taken branch against a direct-mapped
//     reference of the same size (index = target mod LINES, the reset
//     address line pre-loaded as by the boot fill);
//   - hit ratio and useful instructions per cycle do not fall as the BTIM
//     grows, and 256 lines is faster than 32.
// The hit ratio and throughput of each size are printed.
module tb_cobra_btimsize;
  import cobra_pkg::*;

  localparam int unsigned AW = 16, LATENCY = 3, RAS_DEPTH = 8, MAXRET = 12000, MAXTK = 6000;
  localparam int unsigned NS = 4, NF = 100, ROUNDS = 6;
  localparam int unsigned LN [NS] = '{32, 64, 128, 256};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [2**AW];
  logic [AW-1:0] exp_pc [MAXRET];
  instr_t        exp_in [MAXRET];
  int            exp_n;
  logic [AW-1:0] exp_ta [MAXTK];        // targets of taken branches, in order
  int            exp_tk;
  int            got_n [NS];
  int            done_cyc [NS];
  bit            hw_hit [NS][MAXTK];
  int            hw_tk [NS];
  int            cycle = 0;
  logic          running = 1'b0;
  event          load_ev;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar k = 0; k < NS; k++) begin : g
    logic          mem_req, mem_valid, ret_valid;
    logic [AW-1:0] mem_addr, ret_pc;
    instr_t        mem_data, ret_instr;
    logic [3:0]    dbg_raddr;
    logic [DW-1:0] dbg_rdata;
    iu_events_t    ev;
    int unsigned   words;

    cobra_top #(.LINES(LN[k]), .LINE_SIZE(4)) dut (
      .clk, .rst_n, .mem_req, .mem_addr, .mem_valid, .mem_data,
      .ret_valid, .ret_pc, .ret_instr, .dbg_raddr, .dbg_rdata, .ev
    );
    cobra_extmem_model #(.AW(AW), .LATENCY(LATENCY)) u_mem (
      .clk, .rst_n, .req(mem_req), .addr(mem_addr), .valid(mem_valid), .data(mem_data), .words
    );

    initial forever begin
      @(load_ev);
      for (int i = 0; i < 2**AW; i++) u_mem.mem[i] = prog[i];
    end

    always @(posedge clk) if (running) begin
      if (ret_valid && got_n[k] < exp_n) begin
        checks++;
        if (ret_pc !== exp_pc[got_n[k]] || ret_instr !== exp_in[got_n[k]]) begin
          failures++;
          if (failures < 10) $display("%0d lines retire #%0d: pc=%h expected %h", LN[k], got_n[k],
                                      ret_pc, exp_pc[got_n[k]]);
        end
        got_n[k]++;
        if (got_n[k] == exp_n) done_cyc[k] = cycle;
      end
      if ((ev.br_taken_hit || ev.br_taken_miss) && hw_tk[k] < MAXTK) begin
        hw_hit[k][hw_tk[k]] = ev.br_taken_hit;
        hw_tk[k]++;
      end
    end
  end

  function automatic instr_t alu(op_e op, int rd, int rs1, int rs2, int imm);
    return {1'b0, op, 4'(rd), 4'(rs1), 4'(rs2), 15'(imm)};
  endfunction
  function automatic instr_t br(bkind_e k, cond_e c, int baddr, int ta, int rs = 0);
    int dm = (ta >> 12) - (baddr >> 12);
    return {1'b1, k, c, (dm < 0), (dm != 0), 4'(rs), 8'h00, 12'(ta)};
  endfunction

  task automatic ref_run();
    logic [AW-1:0] pc = '0;
    logic [DW-1:0] rf [NREG];
    logic z = 0, n = 0, c = 0;
    logic [AW-1:0] stk [RAS_DEPTH];
    int sp = 0;
    for (int i = 0; i < NREG; i++) rf[i] = '0;
    for (int i = 0; i < RAS_DEPTH; i++) stk[i] = '0;
    exp_n = 0;
    exp_tk = 0;
    for (int step = 0; step < 400000 && exp_n < MAXRET; step++) begin
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
          if (exp_tk < MAXTK) exp_ta[exp_tk++] = ta;
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
          6: begin
            w = {1'b0, a} + {1'b0, im};
            r = w[DW-1:0]; c = w[DW]; z = (r == 0); n = r[DW-1];
            if (ins[26:23] != 0) rf[ins[26:23]] = r;
          end
          1: begin
            w = {1'b0, a} + {1'b0, b};
            r = w[DW-1:0]; c = w[DW]; z = (r == 0); n = r[DW-1];
            if (ins[26:23] != 0) rf[ins[26:23]] = r;
          end
          9: if (ins[26:23] != 0) rf[ins[26:23]] = im;
          default: ;
        endcase
      end
    end
  endtask

  // Main at 0x040: r1 = ROUNDS; loop { CALL f[perm[0]] ... CALL f[perm[NF-1]];
  // r1--; BNE loop }; halt. Routine i sits at 0x400 + 19*i: one to four ADDs,
  // optionally a 3-pass loop and a never-taken branch, then RET.
  task automatic make_prog();
    int a, top;
    int perm [NF];
    void'($urandom(4242));
    for (int i = 0; i < 2**AW; i++) prog[i] = '0;
    for (int i = 0; i < NF; i++) perm[i] = i;
    for (int i = NF - 1; i > 0; i--) begin
      int j = int'($urandom_range(i));
      int t = perm[i];
      perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < NF; i++) begin
      int fa = 'h400 + 19 * i;
      int nb = 1 + int'($urandom_range(3));
      for (int j = 0; j < nb; j++) prog[fa++] = alu(OP_ADD, 3 + ((i + j) % 8), 3 + ((i + j + 1) % 8), 1, 0);
      if (i % 4 == 0) begin
        int lt;
        prog[fa++] = alu(OP_MOVI, 2, 0, 0, 3);
        lt = fa;
        prog[fa++] = alu(OP_ADD, 11, 11, 2, 0);
        prog[fa++] = alu(OP_ADDI, 2, 2, 0, -1);
        prog[fa] = br(BK_REL, CC_NE, fa, lt); fa++;
      end
      if (i % 3 == 0) begin prog[fa] = br(BK_REL, CC_NV, fa, 0); fa++; end
      prog[fa++] = alu(OP_ADDI, 12, 12, 0, 1);
      prog[fa] = br(BK_RET, CC_AL, fa, 0);
    end
    a = 0;
    prog[a] = br(BK_REL, CC_AL, a, 'h40);
    a = 'h40;
    prog[a++] = alu(OP_MOVI, 1, 0, 0, ROUNDS);
    top = a;
    for (int i = 0; i < NF; i++) begin prog[a] = br(BK_CALL, CC_AL, a, 'h400 + 19 * perm[i]); a++; end
    prog[a++] = alu(OP_ADDI, 1, 1, 0, -1);
    prog[a] = br(BK_REL, CC_NE, a, top); a++;
    prog[a] = br(BK_REL, CC_AL, a, a);
  endtask

  // Hits expected for a direct-mapped BTIM of 'lines' lines, outcome by outcome.
  function automatic int ref_check(int k, int lines);
    logic [AW-1:0] tagv [256];
    bit            vld  [256];
    int hits = 0;
    for (int i = 0; i < 256; i++) begin vld[i] = 0; tagv[i] = '0; end
    vld[0] = 1;                                   // boot fill of the reset address
    for (int i = 0; i < exp_tk; i++) begin
      int idx = int'(exp_ta[i]) % lines;
      bit h = vld[idx] && tagv[idx] == exp_ta[i] / AW'(lines);
      checks++;
      if (h != hw_hit[k][i]) begin
        failures++;
        if (failures < 10) $display("%0d lines: taken branch #%0d to %h hit=%0d expected %0d",
                                    lines, i, exp_ta[i], hw_hit[k][i], h);
      end
      if (h) hits++;
      vld[idx] = 1; tagv[idx] = exp_ta[i] / AW'(lines);
    end
    return hits;
  endfunction

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real perf [NS], hr [NS];
    int c0;
    make_prog();
    ref_run();
    -> load_ev;
    for (int k = 0; k < NS; k++) begin got_n[k] = 0; done_cyc[k] = 0; hw_tk[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    running = 1'b1;
    c0 = cycle;
    while (cycle - c0 < 400000) begin
      automatic int all_done = 1;
      for (int k = 0; k < NS; k++) if (got_n[k] < exp_n) all_done = 0;
      if (all_done != 0) break;
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    running = 1'b0;
    for (int k = 0; k < NS; k++) begin
      int hits;
      checks += 2;
      if (got_n[k] != exp_n) begin
        failures++;
        $display("%0d lines: retired %0d of %0d", LN[k], got_n[k], exp_n);
        perf[k] = 0.0;
      end else perf[k] = real'(exp_n) / real'(done_cyc[k] - c0);
      if (hw_tk[k] < exp_tk) begin
        failures++;
        $display("%0d lines: %0d taken branches seen, %0d expected", LN[k], hw_tk[k], exp_tk);
      end
      hits = ref_check(k, int'(LN[k]));
      hr[k] = real'(hits) / real'(exp_tk);
      $display("BTIM %0d lines: hit ratio %f (%0d of %0d taken branches), %0d useful instructions in %0d cycles = %f per cycle",
               LN[k], hr[k], hits, exp_tk, exp_n, done_cyc[k] - c0, perf[k]);
    end
    for (int k = 1; k < NS; k++) begin
      checks += 2;
      if (hr[k] < hr[k-1]) begin failures++; $display("hit ratio falls from %0d to %0d lines", LN[k-1], LN[k]); end
      if (perf[k] < perf[k-1]) begin failures++; $display("throughput falls from %0d to %0d lines", LN[k-1], LN[k]); end
    end
    checks++;
    if (!(perf[NS-1] > perf[0])) begin failures++; $display("256 lines not faster than 32"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
