// tb_kernel_dot: the processor at its default configuration running a
// double-precision inner product, q = sum over k of x[k] * z[k], the kernel
// of the Livermore "inner product" loop and the inner loop of a matrix
// multiply.
//
// The DISVLIW code is written by hand as a compiler would emit it: each
// iteration loads x[k] in unit 0 and z[k] in unit 1, multiplies in unit 2
// (FMUL) and accumulates in unit 3 (FADD); units 0 and 1 also advance their
// own pointers, and unit 0 runs the loop branch. Dependency bits cover the
// true dependences (loads -> FMUL -> FADD) and the reuse of registers
// across iterations (the next loads wait for the FMUL to have read r3/r4,
// the next FMUL for the FADD to have read r6). Two instructions before the
// loop give those cross-iteration waits their first announcement. After the
// loop unit 3 copies the sum, and unit 0 stores it.
//
// The data are N random doubles placed in the data memory through the
// hierarchy before reset (the memory has no load port). Checks: the stored
// and register results equal the same sum computed here in the same order
// with the simulator's double arithmetic; the loop branch commits N-2 times
// and mispredicts twice (first taken branch, loop exit); and in the steady
// state consecutive FMULs issue exactly FMUL_LAT + FADD_LAT + 2 cycles apart,
// the length of the FMUL -> FADD -> FMUL dependence cycle in this pipeline.
module tb_kernel_dot;
  import disvliw_pkg::*;

  localparam int unsigned N        = 32;
  localparam int unsigned FMUL_LAT = 6, FADD_LAT = 4;   // the top's defaults
  localparam int unsigned XB = 0, ZB = 512, QB = 1024;  // byte addresses
  localparam int unsigned PROG = 8;

  logic            clk = 1'b0, rst_n = 1'b0;
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
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

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

  logic [63:0] x [N], z [N];

  function automatic logic [63:0] rnd_double();
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'($urandom_range(1013, 1033));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  initial begin
    for (int p = 0; p < PROG; p++) prog[p] = '0;
    // prologue: limits, pointers, q = 0.0, first cross-iteration announcements
    put(0, 0, OP_ADDI, 2, 0, 8 * N);                      // r2 = end of x
    put(0, 1, OP_ADDI, 11, 0, 0);                         // r11 = 0 (z pointer)
    put(0, 2, OP_FMUL, 0, 0, rr(0), '0, U0 | U1);         // r3/r4 free to load
    put(0, 3, OP_FMUL, 5, 0, rr(0), '0, U2);              // q = 0.0 * 0.0; r6 free
    put(1, 0, OP_ADDI, 1, 0, 0);                          // r1 = 0 (x pointer)
    // loop, pc 2..4
    put(2, 0, OP_LW,   3, 1, XB, U2, U2);                 // r3 = x[k]
    put(2, 1, OP_LW,   4, 11, ZB, U2, U2);                // r4 = z[k]
    put(3, 2, OP_FMUL, 6, 3, rr(4), U0 | U1 | U3, U0 | U1 | U3);  // r6 = r3 * r4
    put(3, 0, OP_ADDI, 1, 1, 8);
    put(3, 1, OP_ADDI, 11, 11, 8);
    put(4, 3, OP_FADD, 5, 5, rr(6), U2, U2);              // q += r6
    put(4, 0, OP_BNE,  1, 2, 2);                          // next k
    // epilogue
    put(5, 3, OP_FADD, 7, 5, rr(0), '0, U0);              // r7 = q + 0.0
    put(6, 0, OP_SW,   7, 0, QB, U3);                     // mem[QB] = r7
    put(7, 0, OP_HALT, 0, 0, 0);
    for (int k = 0; k < N; k++) begin
      x[k] = rnd_double();
      z[k] = rnd_double();
      dut.u_dmem.mem[(XB / 8) + k] = x[k];
      dut.u_dmem.mem[(ZB / 8) + k] = z[k];
    end
  end

  // issue cycles of the non-speculative FMULs of the loop
  int cyc = 0, n_fmul = 0;
  int fmul_at [N + 2];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && issue_o[2] && dut.iq_head[2].slot.ins.op == OP_FMUL
        && dut.iq_head[2].slot.ins.rd == 5'd6 && n_fmul < N + 2)
      fmul_at[n_fmul++] = cyc;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: processor did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real q, p;
    int dmin, dmax, d;
    dbg_reg = '0;
    dbg_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    @(negedge clk);
    $display("inner product of %0d: %0d cycles, %0d issued", N, perf.cycles, perf.issued);
    q = 0.0;
    for (int k = 0; k < N; k++) begin
      p = $bitstoreal(x[k]) * $bitstoreal(z[k]);
      q = q + p;
    end
    dbg_reg = 5;  #1 check("r5 (q)", dbg_reg_data, $realtobits(q));
    dbg_reg = 7;  #1 check("r7 (q copy)", dbg_reg_data, $realtobits(q));
    dbg_addr = QB; #1 check("stored q", dbg_mem_data, $realtobits(q));
    check("commits", perf.commits, N - 2);
    check("mispredicts", perf.mispredicts, 2);
    // FMULs counted may include a wrong-path one at the exit; use the first N
    check("FMULs issued", 64'(n_fmul >= N), 1);
    dmin = 1 << 30; dmax = 0;
    for (int k = 3; k < N; k++) begin
      d = fmul_at[k] - fmul_at[k - 1];
      if (d < dmin) dmin = d;
      if (d > dmax) dmax = d;
    end
    $display("steady-state FMUL spacing: min %0d max %0d", dmin, dmax);
    check("FMUL spacing min", 64'(dmin), FMUL_LAT + FADD_LAT + 2);
    check("FMUL spacing max", 64'(dmax), FMUL_LAT + FADD_LAT + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
