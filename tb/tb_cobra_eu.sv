// tb_cobra_eu: random instruction stream (with random gaps) into the
// execution unit, checked against an instruction-level model: the condition
// codes after every ALU-stage instruction (cc_next), the computed-jump
// read port including forwarding from the ALU and WR stages, the retired
// stream, and the register file at the end.
module tb_cobra_eu;
  import cobra_pkg::*;
  localparam int AW = 16;
  logic clk = 0, rst_n = 0;
  logic issue_valid, ret_valid;
  instr_t issue_instr, ret_instr;
  logic [AW-1:0] issue_pc, ret_pc;
  cc_t cc_next;
  logic [3:0] jr_rs, dbg_raddr;
  logic [DW-1:0] jr_val, dbg_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cobra_eu #(.AW(AW)) dut (.*);

  logic [DW-1:0] rf [NREG];
  logic z = 0, n = 0, c = 0;

  // model: execute one instruction, return the new flags
  task automatic exec(instr_t ins);
    logic [DW-1:0] a, b, im, r;
    logic [DW:0] w;
    int op = int'(ins[30:27]);
    int rd = int'(ins[26:23]);
    a  = rf[ins[22:19]];
    b  = rf[ins[18:15]];
    im = {{(DW-15){ins[14]}}, ins[14:0]};
    case (op)
      1, 2, 6, 7, 8: begin
        if (op == 1) w = a + b + 33'd0;
        else if (op == 6) w = {1'b0, a} + {1'b0, im};
        else if (op == 8) w = {1'b0, a} + {1'b0, ~im} + 33'd1;
        else w = {1'b0, a} + {1'b0, ~b} + 33'd1;
        if (op == 1) w = {1'b0, a} + {1'b0, b};
        r = w[DW-1:0]; c = w[DW]; z = (r == 0); n = r[DW-1];
        if (op != 7 && op != 8 && rd != 0) rf[rd] = r;
      end
      3, 4, 5: begin
        r = (op == 3) ? (a & b) : (op == 4) ? (a | b) : (a ^ b);
        c = 0; z = (r == 0); n = r[DW-1];
        if (rd != 0) rf[rd] = r;
      end
      9: if (rd != 0) rf[rd] = im;
      default: ;
    endcase
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t last_in;
    logic last_v = 0;
    logic [AW-1:0] last_pc;
    for (int i = 0; i < NREG; i++) rf[i] = '0;
    issue_valid = 0; issue_instr = 0; issue_pc = 0; jr_rs = 0; dbg_raddr = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      issue_valid = $urandom_range(3) != 0;
      issue_instr = {1'b0, 4'($urandom_range(9)), 4'($urandom_range(6)),
                     4'($urandom_range(6)), 4'($urandom_range(6)), 15'($urandom_range(0, 32767))};
      if ($urandom_range(7) == 0) issue_instr[14:0] = 15'h7FFF;  // -1 for carries
      if (i < 8) issue_instr = {1'b0, OP_MOVI, 4'(i), 4'd0, 4'd0, 15'h7FF0 + 15'(i)};
      issue_pc = 16'(i);
      jr_rs = 4'($urandom_range(6));
      #1;
      // retired instruction is the one issued a cycle ago
      checks++;
      if (ret_valid !== last_v || (last_v && (ret_instr !== last_in || ret_pc !== last_pc))) begin
        failures++; $display("retire mismatch at %0d", i);
      end
      if (issue_valid) exec(issue_instr);
      checks += 2;
      if (cc_next !== '{z: z, n: n, c: c}) begin
        failures++; $display("cc %b expected %b%b%b after %h", cc_next, z, n, c, issue_instr);
      end
      if (jr_val !== rf[jr_rs]) begin
        failures++; $display("jr_val r%0d %h expected %h", jr_rs, jr_val, rf[jr_rs]);
      end
      last_v = issue_valid; last_in = issue_instr; last_pc = issue_pc;
    end
    @(negedge clk);
    issue_valid = 0;
    repeat (3) @(negedge clk);
    for (int r = 0; r < NREG; r++) begin
      dbg_raddr = 4'(r);
      #1;
      checks++;
      if (dbg_rdata !== rf[r]) begin failures++; $display("r%0d %h expected %h", r, dbg_rdata, rf[r]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
