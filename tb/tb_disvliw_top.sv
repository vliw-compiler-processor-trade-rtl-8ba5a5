// tb_disvliw_top: end-to-end test of the DISVLIW processor at its default
// configuration.
//
// The testbench holds a small DISVLIW program in an instruction memory model
// that answers cache refills in the same cycle. The program
//   - starts six 32-cycle divides in unit 3 so that its queue fills and the
//     fetch unit stalls, while units 0 and 1 slip ahead;
//   - runs a five-iteration loop: sum += i*i, with the multiply in unit 2,
//     the add in unit 1, the decrement and the loop branch in unit 0, and a
//     store of the running sum that is fetched speculatively;
//   - after the loop computes sum*sum, divides and takes the remainder by 7
//     and stores the results;
//   - builds two doubles (1.5 and 2.25) with integer instructions and runs
//     a dependent chain FMUL (unit 2) -> FADD (unit 3) -> FSUB (unit 2) ->
//     store; then HALT.
// Dependency bits are written as sets of units and converted to the
// per-unit bit vectors. The expected register and memory contents are
// computed here from the program's arithmetic. The test also checks the
// scheduling latency of dependent pairs (multiply to add: MUL_LAT + 1
// cycles from issue to issue; FMUL to FADD: FMUL_LAT + 1), and that every
// mechanism happened: queue full, dependency stall, busy-unit stall, cache
// miss, branch hold, speculative issue, speculative store hold, commit,
// mispredict, same-unit forwarding and register-file bypass.
module tb_disvliw_top;
  import disvliw_pkg::*;

  localparam int unsigned MUL_LAT  = 4;   // the top's defaults
  localparam int unsigned FMUL_LAT = 6;
  localparam int unsigned PROG     = 22;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            imem_req;
  logic [PC_W-1:0] imem_addr;
  long_instr_t     imem_rdata;
  logic [4:0]      dbg_reg;
  logic [XLEN-1:0] dbg_reg_data, dbg_addr, dbg_mem_data;
  logic            done;
  perf_t           perf;
  logic [N_FU-1:0] issue_o;

  long_instr_t prog [PROG];

  always #5 clk = ~clk;

  assign imem_rdata = (imem_addr < PROG) ? prog[imem_addr] : '0;

  disvliw_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  task automatic happened(string what, logic [31:0] n);
    checks++;
    $display("  %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // dependency vector of unit f from a set of units
  function automatic logic [DEP_W-1:0] dv(int unsigned f, logic [N_FU-1:0] fus);
    logic [DEP_W-1:0] v = '0;
    for (int unsigned g = 0; g < N_FU; g++)
      if (fus[g] && g != f) v[dep_bit(f, g)] = 1'b1;
    return v;
  endfunction

  task automatic put(int pc, int unsigned f, op_e op, int rd, int rs1, int lo,
                     logic [N_FU-1:0] pre = '0, logic [N_FU-1:0] post = '0);
    prog[pc][f].ins.op  = op;
    prog[pc][f].ins.rd  = 5'(rd);
    prog[pc][f].ins.rs1 = 5'(rs1);
    prog[pc][f].ins.lo  = 16'(lo);
    prog[pc][f].dpre    = dv(f, pre);
    prog[pc][f].dpost   = dv(f, post);
  endtask

  function automatic logic [15:0] rr(int rs2);
    return 16'(rs2 << 11);
  endfunction

  localparam logic [3:0] U0 = 4'b0001, U1 = 4'b0010, U2 = 4'b0100, U3 = 4'b1000;

  initial begin
    for (int p = 0; p < PROG; p++) prog[p] = '0;
    // prologue
    put(0, 0, OP_ADDI, 1, 0, 5, '0, U2);           // r1 = 5
    put(0, 1, OP_ADDI, 3, 0, 0, '0, U2);           // r3 = 0
    put(0, 3, OP_DIVU, 9, 0, rr(0));
    put(1, 0, OP_ADDI, 2, 0, 7, '0, U3);           // r2 = 7
    for (int p = 1; p < 6; p++) put(p, 3, OP_DIVU, 9, 0, rr(0));
    // loop body, pc 6..8
    put(6, 2, OP_MUL,  4, 1, rr(1), U0 | U1, U0 | U1);  // r4 = r1*r1
    put(6, 1, OP_SW,   3, 0, 64);                        // mem[64] = r3
    put(7, 0, OP_ADDI, 1, 1, -1, U2, U2);                // r1 = r1-1
    put(7, 1, OP_ADD,  3, 3, rr(4), U2, U2);             // r3 += r4
    put(8, 0, OP_BNE,  1, 0, 6);                         // loop while r1 != 0
    // epilogue
    put(9, 2, OP_MUL,   6, 3, rr(3), U0 | U1, U3 | U0);  // r6 = r3*r3
    put(10, 3, OP_DIVU, 7, 6, rr(2), U2 | U0);           // r7 = r6/r2
    put(11, 3, OP_REMU, 8, 6, rr(2), '0, U0 | U1);       // r8 = r6%r2
    put(11, 0, OP_SW,   6, 0, 96, U2);                   // mem[96] = r6
    put(12, 0, OP_SW,   7, 0, 72, U3);                   // mem[72] = r7
    put(12, 1, OP_SW,   8, 0, 80, U3);                   // mem[80] = r8
    put(13, 1, OP_SW,   3, 0, 88);                       // mem[88] = r3
    // double precision
    put(14, 0, OP_ADDI, 11, 0, 32, '0, U1);              // r11 = 32
    put(14, 1, OP_LUI,  10, 0, 16'h3FF8);                // r10 = 1.5 >> 32
    put(15, 0, OP_LUI,  12, 0, 16'h4002);                // r12 = 2.25 >> 32
    put(15, 1, OP_SLL,  10, 10, rr(11), U0, U2);         // r10 = 1.5
    put(16, 0, OP_SLL,  12, 12, rr(11), '0, U2);         // r12 = 2.25
    put(17, 2, OP_FMUL, 13, 10, rr(12), U0 | U1, U3);    // r13 = r10*r12
    put(18, 3, OP_FADD, 14, 13, rr(10), U2, U2);         // r14 = r13+r10
    put(19, 2, OP_FSUB, 15, 14, rr(12), U3, U0);         // r15 = r14-r12
    put(20, 0, OP_SW,   15, 0, 104, U2);                 // mem[104] = r15
    put(21, 0, OP_HALT, 0, 0, 0);
  end

  // issue-time capture for the latency check: k-th MUL in unit 2 against
  // the k-th ADD in unit 1 (the ADD waits only for that MUL's announcement)
  int cyc = 0, n_mul = 0, n_add = 0, min_dist = 1 << 30, bad_dist = 0;
  int mul_at [16];
  int fmul_at = -1, fadd_at = -1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (issue_o[2] && dut.iq_head[2].slot.ins.op == OP_FMUL) fmul_at = cyc;
      if (issue_o[3] && dut.iq_head[3].slot.ins.op == OP_FADD) fadd_at = cyc;
      if (issue_o[2] && dut.iq_head[2].slot.ins.op == OP_MUL && n_mul < 16)
        mul_at[n_mul++] = cyc;
      if (issue_o[1] && dut.iq_head[1].slot.ins.op == OP_ADD && !dut.iq_head[1].spec
          && n_add < n_mul) begin
        if (cyc - mul_at[n_add] < min_dist) min_dist = cyc - mul_at[n_add];
        if (cyc - mul_at[n_add] < int'(MUL_LAT) + 1) bad_dist++;
        n_add++;
      end
    end
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: processor did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sum;
  real fa, fb;
  initial begin
    dbg_reg  = '0;
    dbg_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    @(negedge clk);
    $display("finished after %0d cycles, %0d instructions issued", perf.cycles, perf.issued);

    sum = 0;
    for (int i = 5; i >= 1; i--) sum += i * i;
    begin
      longint exp_r [int];
      exp_r[1] = 0; exp_r[2] = 7; exp_r[3] = sum; exp_r[4] = 1;
      exp_r[6] = sum * sum; exp_r[7] = (sum * sum) / 7; exp_r[8] = (sum * sum) % 7;
      exp_r[9] = 64'hFFFF_FFFF;   // 0/0 with a 32-bit restoring divider
      fa = 1.5; fb = 2.25;
      exp_r[10] = $realtobits(fa); exp_r[12] = $realtobits(fb);
      exp_r[13] = $realtobits(fa * fb);
      exp_r[14] = $realtobits(fa * fb + fa);
      exp_r[15] = $realtobits(fa * fb + fa - fb);
      foreach (exp_r[r]) begin
        dbg_reg = 5'(r);
        #1 check($sformatf("r%0d", r), dbg_reg_data, exp_r[r]);
      end
    end
    dbg_addr = 64; #1 check("mem[64]", dbg_mem_data, sum - 1);  // last store before last add
    dbg_addr = 72; #1 check("mem[72]", dbg_mem_data, (sum * sum) / 7);
    dbg_addr = 80; #1 check("mem[80]", dbg_mem_data, (sum * sum) % 7);
    dbg_addr = 88; #1 check("mem[88]", dbg_mem_data, sum);
    dbg_addr = 96; #1 check("mem[96]", dbg_mem_data, sum * sum);
    dbg_addr = 104; #1 check("mem[104] (2.625)", dbg_mem_data, $realtobits(fa * fb + fa - fb));
    check("FMUL->FADD issue distance", 64'(fadd_at - fmul_at), FMUL_LAT + 1);

    check("min MUL->ADD issue distance", 32'(min_dist), MUL_LAT + 1);
    check("ADDs issued too early", 32'(bad_dist), 0);
    check("ADDs issued", 32'(n_add), 5);
    check("committed branches", perf.commits, 3);
    check("mispredicted branches", perf.mispredicts, 2);
    check("instructions issued >= program", 32'(perf.issued >= 30), 1);

    happened("queue full", perf.iq_full);
    happened("dependency stall", perf.dep_stall);
    happened("busy-unit stall", perf.res_stall);
    happened("spec store held", perf.spec_stall);
    happened("icache miss", perf.icache_miss);
    happened("branch hold", perf.branch_hold);
    happened("speculative issue", perf.spec_issued);
    happened("commit", perf.commits);
    happened("mispredict", perf.mispredicts);
    happened("same-unit forward", perf.fwd_same_fu);
    happened("register bypass", perf.rf_bypass);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
