// tb_cobra_linesize: the same loop-heavy program run on six copies of the
// processor whose BTIM lines hold 1 to 6 instructions (external memory
// latency 3), as in the line-size study the design is based on. Each
// copy's retired stream and final registers are compared with an
// instruction-level reference model; the useful instructions per cycle of
// each copy are printed. Expected trend, checked: lines shorter than the
// memory latency are clearly slower (size 1 below size 4), and with the
// loops' lines resident, size 4 reaches at least 0.9 instructions/cycle.
module tb_cobra_linesize;
  import cobra_pkg::*;

  localparam int unsigned AW = 16, LATENCY = 3, RAS_DEPTH = 8, MAXRET = 6000, NS = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [2**AW];
  logic [AW-1:0] exp_pc [MAXRET];
  instr_t        exp_in [MAXRET];
  int            exp_n;
  logic [DW-1:0] ref_rf [NREG];
  int            got_n [NS+1];
  int            done_cyc [NS+1];
  int            cycle = 0;
  logic          running = 1'b0;
  event          load_ev;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar k = 1; k <= NS; k++) begin : g
    logic          mem_req, mem_valid, ret_valid;
    logic [AW-1:0] mem_addr, ret_pc;
    instr_t        mem_data, ret_instr;
    logic [3:0]    dbg_raddr;
    logic [DW-1:0] dbg_rdata;
    iu_events_t    ev;
    int unsigned   words;

    cobra_top #(.LINE_SIZE(k)) dut (
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

    always @(posedge clk) if (running && ret_valid && got_n[k] < exp_n) begin
      checks++;
      if (ret_pc !== exp_pc[got_n[k]] || ret_instr !== exp_in[got_n[k]]) begin
        failures++;
        if (failures < 10) $display("size %0d retire #%0d: pc=%h expected %h", k, got_n[k],
                                    ret_pc, exp_pc[got_n[k]]);
      end
      got_n[k]++;
      if (got_n[k] == exp_n) done_cyc[k] = cycle;
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
          8: begin
            w = {1'b0, a} + {1'b0, ~im} + 1;
            r = w[DW-1:0]; c = w[DW]; z = (r == 0); n = r[DW-1];
          end
          9: if (ins[26:23] != 0) rf[ins[26:23]] = im;
          default: ;
        endcase
      end
    end
    for (int i = 0; i < NREG; i++) ref_rf[i] = rf[i];
  endtask

  // Outer loop runs 20 times over 6 inner loops of different lengths
  // (3 to 13 instructions, some with a never-taken branch inside); each
  // inner loop runs 8 times. ADDI/ADD/CMPI/MOVI only.
  task automatic make_prog();
    int a, top;
    void'($urandom(2718));
    for (int i = 0; i < 2**AW; i++) prog[i] = '0;
    a = 0;
    prog[a++] = alu(OP_MOVI, 1, 0, 0, 20);             // r1 outer count
    top = a;
    for (int l = 0; l < 6; l++) begin
      int body = 2 + 2 * l;
      int lt;
      prog[a++] = alu(OP_MOVI, 2, 0, 0, 8);            // r2 inner count
      lt = a;
      for (int j = 0; j < body; j++) begin
        prog[a++] = alu(OP_ADD, 3 + (j % 8), 3 + ((j + 1) % 8), 2, 0);
        if (l % 2 == 1 && j == 1) prog[a++] = br(BK_REL, CC_NV, a, 0);
      end
      prog[a++] = alu(OP_ADDI, 2, 2, 0, -1);
      prog[a++] = br(BK_REL, CC_NE, a, lt);
    end
    prog[a++] = alu(OP_ADDI, 1, 1, 0, -1);
    prog[a++] = br(BK_REL, CC_NE, a, top);
    prog[a] = br(BK_REL, CC_AL, a, a);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real perf [NS+1];
    int c0;
    make_prog();
    ref_run();
    -> load_ev;
    for (int k = 1; k <= NS; k++) begin got_n[k] = 0; done_cyc[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    running = 1'b1;
    c0 = cycle;
    while (cycle - c0 < 200000) begin
      automatic int all_done = 1;
      for (int k = 1; k <= NS; k++) if (got_n[k] < exp_n) all_done = 0;
      if (all_done != 0) break;
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    running = 1'b0;
    for (int k = 1; k <= NS; k++) begin
      checks++;
      if (got_n[k] != exp_n) begin
        failures++;
        $display("size %0d retired %0d of %0d", k, got_n[k], exp_n);
        perf[k] = 0.0;
      end else perf[k] = real'(exp_n) / real'(done_cyc[k] - c0);
      $display("line size %0d: %0d useful instructions in %0d cycles = %f per cycle",
               k, exp_n, done_cyc[k] - c0, perf[k]);
    end
    checks += 2;
    if (!(perf[1] < perf[4])) begin failures++; $display("size 1 not slower than size 4"); end
    if (perf[4] < 0.9) begin failures++; $display("size 4 below 0.9 instructions per cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
