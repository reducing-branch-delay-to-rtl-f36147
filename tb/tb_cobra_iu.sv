// tb_cobra_iu: the instruction unit alone, with the burst-memory model and
// a stand-in EU defined here: every instruction the IU issues sets the
// condition codes to its bits [2:0] ({z, n, c}) in the same cycle, and the
// computed-jump port returns a fixed table of in-range targets. A reference
// model of the same rules, with zero delay slots and a circular return
// stack, gives the order of issued instructions; every issue is compared.
// Timing checks on a directed program: a taken branch whose line is in the
// BTIM costs no cycle (a 5-instruction loop runs at 5 cycles an iteration),
// a BTIM miss costs LATENCY cycles, and a taken branch seen while a line is
// still being filled waits for the fill (stall event). Random programs
// follow.
module tb_cobra_iu;
  import cobra_pkg::*;
  localparam int unsigned AW = 16, LATENCY = 3, RAS_DEPTH = 8, MAXRET = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          issue_valid, mem_req, mem_valid;
  instr_t        issue_instr, mem_data;
  logic [AW-1:0] issue_pc, mem_addr;
  cc_t           cc_next, cc_q;
  logic [3:0]    jr_rs;
  logic [DW-1:0] jr_val;
  iu_events_t    ev;
  int unsigned   words;

  cobra_iu #(.AW(AW), .LINES(64)) dut (
    .clk, .rst_n, .issue_valid, .issue_instr, .issue_pc, .cc_next, .jr_rs, .jr_val,
    .mem_req, .mem_addr, .mem_valid, .mem_data, .ev
  );
  cobra_extmem_model #(.AW(AW), .LATENCY(LATENCY)) u_mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .valid(mem_valid), .data(mem_data), .words
  );

  // stand-in EU
  function automatic logic [AW-1:0] jtab(int r);
    return AW'('h0F00 + r * 37);
  endfunction
  assign cc_next = issue_valid ? cc_t'(issue_instr[2:0]) : cc_q;
  assign jr_val  = DW'(jtab(int'(jr_rs)));
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cc_q <= '0; else cc_q <= cc_next;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  instr_t prog [2**AW];
  function automatic instr_t op(int tag, logic [2:0] f);
    return {1'b0, 4'd1, 12'(tag), 12'd0, f};
  endfunction
  function automatic instr_t br(bkind_e k, cond_e c, int baddr, int ta, int rs = 0);
    int dm = (ta >> 12) - (baddr >> 12);
    return {1'b1, k, c, (dm < 0), (dm != 0), 4'(rs), 8'h00, 12'(ta)};
  endfunction

  logic [AW-1:0] exp_pc [MAXRET];
  instr_t        exp_in [MAXRET];
  int            exp_n;

  task automatic ref_run();
    logic [AW-1:0] pc = '0;
    logic [2:0] f = '0;
    logic [AW-1:0] stk [RAS_DEPTH];
    int sp = 0;
    for (int i = 0; i < RAS_DEPTH; i++) stk[i] = '0;
    exp_n = 0;
    for (int step = 0; step < 100000 && exp_n < MAXRET; step++) begin
      instr_t ins = prog[pc];
      if (ins[31]) begin
        logic t;
        logic [AW-1:0] ta;
        case (ins[28:26])
          0: t = 1; 1: t = f[2]; 2: t = !f[2]; 3: t = f[1]; 4: t = !f[1];
          5: t = f[0]; 6: t = !f[0]; default: t = 0;
        endcase
        case (ins[30:29])
          2'b10: ta = stk[sp];
          2'b11: ta = jtab(int'(ins[23:20]));
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
        exp_pc[exp_n] = pc; exp_in[exp_n] = ins; exp_n++;
        f = ins[2:0];
        pc = pc + 1;
      end
    end
  endtask

  int got_n;
  int cyc_of [MAXRET];
  int n_stall = 0, n_hit = 0, n_miss = 0, n_nt = 0, n_late = 0, n_call = 0, n_ret = 0, n_jr = 0;
  logic running = 0;
  always @(posedge clk) if (running) begin
    if (issue_valid && got_n < exp_n) begin
      checks++;
      if (issue_pc !== exp_pc[got_n] || issue_instr !== exp_in[got_n]) begin
        failures++;
        if (failures < 10) $display("issue #%0d: pc=%h %h expected pc=%h %h", got_n,
                                    issue_pc, issue_instr, exp_pc[got_n], exp_in[got_n]);
      end
      cyc_of[got_n] = cycle;
      got_n++;
    end
    n_stall += ev.fill_stall; n_hit += ev.br_taken_hit; n_miss += ev.br_taken_miss;
    n_nt += ev.br_not_taken; n_late += ev.br_late; n_call += ev.call_push;
    n_ret += ev.ret_pop; n_jr += ev.computed;
  end

  task automatic run(string name, int maxc);
    int c0;
    ref_run();
    rst_n = 0;
    for (int i = 0; i < 2**AW; i++) u_mem.mem[i] = prog[i];
    got_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; running = 1; c0 = cycle;
    while (got_n < exp_n && cycle - c0 < maxc) @(posedge clk);
    repeat (10) @(posedge clk);
    running = 0;
    checks++;
    if (got_n != exp_n) begin failures++; $display("%s: issued %0d expected %0d", name, got_n, exp_n); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    // directed: entry, a 5-instruction loop run 8 times, a call right after
    // a miss (line still filling), return, computed jump, halt
    for (int i = 0; i < 2**AW; i++) prog[i] = '0;
    prog[0] = op(1, 3'b000);
    prog[1] = op(2, 3'b000);
    prog[2] = op(3, 3'b000);
    prog[3] = op(4, 3'b000);
    prog[4] = br(BK_REL, CC_AL, 4, 'h0100);
    a = 'h0100;
    for (int k = 0; k < 4; k++) prog[a++] = op(16 + k, 3'b000);
    prog[a++] = op(20, 3'b000);                  // sets z=0: loop again
    prog[a++] = br(BK_REL, CC_NE, a, 'h0100);
    prog[a++] = br(BK_CALL, CC_AL, a, 'h0200);   // miss
    prog[a++] = br(BK_JR, CC_AL, a, 0, 3);
    a = 'h0200;
    prog[a++] = br(BK_CALL, CC_AL, a, 'h0300);   // taken while 0x200 line fills
    prog[a++] = op(30, 3'b100);
    prog[a++] = br(BK_RET, CC_EQ, a, 0);
    a = 'h0300;
    prog[a++] = op(31, 3'b001);
    prog[a++] = br(BK_RET, CC_CS, a, 0);
    prog[jtab(3)] = op(40, 3'b000);
    prog[jtab(3) + 1] = br(BK_REL, CC_AL, jtab(3) + 1, jtab(3) + 1);
    // first pass: the loop never exits; time 10 passes of it
    ref_run();
    begin
      int c0;
      rst_n = 0;
      for (int i = 0; i < 2**AW; i++) u_mem.mem[i] = prog[i];
      got_n = 0;
      repeat (2) @(posedge clk);
      rst_n = 1; running = 1; c0 = cycle;
      while (got_n < 4 + 5 * 10 && cycle - c0 < 2000) @(posedge clk);
      running = 0;
      for (int it = 1; it < 9; it++) begin
        checks++;
        if (cyc_of[4 + 5 * (it + 1)] - cyc_of[4 + 5 * it] != 5) begin
          failures++;
          $display("loop pass %0d took %0d cycles, expected 5", it,
                   cyc_of[4 + 5 * (it + 1)] - cyc_of[4 + 5 * it]);
        end
      end
      checks++;
      if (cyc_of[4] - cyc_of[3] != LATENCY + 1) begin
        failures++;
        $display("miss cost %0d cycles, expected %0d", cyc_of[4] - cyc_of[3] - 1, LATENCY);
      end
    end
    // second pass: the loop's last instruction sets z, so it exits at once
    // and the rest of the program runs to the halt
    prog['h0104] = op(20, 3'b100);               // z=1: leave the loop
    run("directed", 3000);
    checks++;
    if (n_stall == 0 || n_hit == 0 || n_miss == 0 || n_nt == 0 || n_late == 0 ||
        n_call == 0 || n_ret == 0 || n_jr == 0) begin
      failures++;
      $display("missing mechanism: stall %0d hit %0d miss %0d nt %0d late %0d call %0d ret %0d jr %0d",
               n_stall, n_hit, n_miss, n_nt, n_late, n_call, n_ret, n_jr);
    end

    // random programs around the 0x1000 boundary
    for (int s = 1; s <= 4; s++) begin
      void'($urandom(s * 104729));
      for (int i = 0; i < 2**AW; i++) prog[i] = '0;
      prog[0] = br(BK_REL, CC_AL, 0, 'h0F80);
      for (a = 'h0F80; a < 'h1080; a++) begin
        int r = $urandom_range(99);
        int t = 'h0F80 + $urandom_range(255);
        if (r < 60)      prog[a] = op($urandom_range(4095), 3'($urandom));
        else if (r < 85) prog[a] = br(BK_REL, cond_e'($urandom_range(7)), a, t);
        else if (r < 91) prog[a] = br(BK_CALL, cond_e'($urandom_range(6)), a, t);
        else if (r < 95) prog[a] = br(BK_RET, cond_e'($urandom_range(6)), a, 0);
        else             prog[a] = br(BK_JR, cond_e'($urandom_range(6)), a, 0, $urandom_range(6));
      end
      for (int r = 0; r < 16; r++) if (jtab(r) < 'h0F80 || jtab(r) >= 'h1080) prog[jtab(r)] = '0;
      run($sformatf("random%0d", s), 60000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
