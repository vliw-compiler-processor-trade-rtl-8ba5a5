// tb_kernel_hydro: the processor at its default configuration running the
// Livermore "hydro fragment" in double precision,
//   x[k] = q + y[k] * (r * z[k+10] + t * z[k+11]),   k = 0 .. N-1,
// a kernel whose floating-point work is spread over both long-latency units
// so that they run at the same time and slip against each other.
//
// Hand-written DISVLIW code. Per iteration: unit 0 loads y[k] and stores
// x[k]; unit 1 loads z[k+10] and z[k+11]; unit 2 computes r*z[k+10] and the
// final q + ...; unit 3 computes t*z[k+11], the sum and the product with
// y[k]. Units 0 and 1 keep their own pointers; unit 0 runs the loop branch.
// Dependency bits carry each true dependence between units and the two
// register reuses that no other dependence already orders (the next loads
// of r4 and r5 wait until the multiplies that read them have started). Two
// instructions before the loop give those waits their first announcement;
// they also consume the announcements of the constant loads.
//
// The constants q, r, t and the arrays y and z are random doubles placed in
// the data memory through the hierarchy before reset. Checks: every x[k]
// equals the same expression computed here in the same order with the
// simulator's double arithmetic; the loop branch commits N-2 times and
// mispredicts twice; and units 2 and 3 were both executing in the same cycle
// for at least N cycles.
module tb_kernel_hydro;
  import disvliw_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned CB = 0, YB = 64, ZB = 256, XB = 512;   // byte addresses
  localparam int unsigned PROG = 13;

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

  logic [63:0] y [N], z [N + 11], cq, cr, ct;

  function automatic logic [63:0] rnd_double();
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'($urandom_range(1013, 1033));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  initial begin
    for (int p = 0; p < PROG; p++) prog[p] = '0;
    // prologue: limits, pointers, constants q (r20), r (r21), t (r22)
    put(0, 0, OP_ADDI, 2, 0, 8 * N);                          // r2 = end offset
    put(0, 1, OP_ADDI, 11, 0, 0);                             // r11 = 0
    put(1, 0, OP_LW,   20, 0, CB, '0, U2);                    // q
    put(1, 1, OP_LW,   21, 0, CB + 8, '0, U2);                // r
    put(2, 0, OP_LW,   22, 0, CB + 16, '0, U3);               // t
    put(2, 2, OP_FADD, 0, 20, rr(21), U0 | U1, U1);           // q, r present; r4 free
    put(2, 3, OP_FADD, 0, 22, rr(0), U0, U1);                 // t present; r5 free
    put(3, 0, OP_ADDI, 1, 0, 0);                              // r1 = 0
    // loop, pc 4..11
    put(4, 0, OP_LW,   3, 1, YB, '0, U3);                     // r3 = y[k]
    put(4, 1, OP_LW,   4, 11, ZB + 80, U2, U2);               // r4 = z[k+10]
    put(5, 1, OP_LW,   5, 11, ZB + 88, U3, U3);               // r5 = z[k+11]
    put(5, 2, OP_FMUL, 6, 21, rr(4), U1, U3 | U1);            // r6 = r * z[k+10]
    put(6, 3, OP_FMUL, 7, 22, rr(5), U1, U1);                 // r7 = t * z[k+11]
    put(6, 1, OP_ADDI, 11, 11, 8);
    put(7, 3, OP_FADD, 8, 6, rr(7), U2);                      // r8 = r6 + r7
    put(8, 3, OP_FMUL, 9, 3, rr(8), U0, U2);                  // r9 = y[k] * r8
    put(9, 2, OP_FADD, 10, 20, rr(9), U3, U0);                // r10 = q + r9
    put(9, 0, OP_SW,   10, 1, XB, U2);                        // x[k] = r10
    put(10, 0, OP_ADDI, 1, 1, 8);
    put(11, 0, OP_BNE,  1, 2, 4);
    put(12, 0, OP_HALT, 0, 0, 0);
    cq = rnd_double(); cr = rnd_double(); ct = rnd_double();
    dut.u_dmem.mem[CB / 8]     = cq;
    dut.u_dmem.mem[CB / 8 + 1] = cr;
    dut.u_dmem.mem[CB / 8 + 2] = ct;
    for (int k = 0; k < N; k++) begin
      y[k] = rnd_double();
      dut.u_dmem.mem[YB / 8 + k] = y[k];
    end
    for (int k = 0; k < N + 11; k++) begin
      z[k] = rnd_double();
      dut.u_dmem.mem[ZB / 8 + k] = z[k];
    end
  end

  // cycles in which both floating-point units are executing
  int both_busy = 0;
  always @(posedge clk) if (rst_n && dut.busy[2] && dut.busy[3]) both_busy++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: processor did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, b, s, m, e;
    dbg_reg = '0;
    dbg_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    @(negedge clk);
    $display("hydro fragment, %0d elements: %0d cycles, %0d issued, FP units both busy %0d cycles",
             N, perf.cycles, perf.issued, both_busy);
    for (int k = 0; k < N; k++) begin
      a = $bitstoreal(cr) * $bitstoreal(z[k + 10]);
      b = $bitstoreal(ct) * $bitstoreal(z[k + 11]);
      s = a + b;
      m = $bitstoreal(y[k]) * s;
      e = $bitstoreal(cq) + m;
      dbg_addr = XB + 8 * k;
      #1 check($sformatf("x[%0d]", k), dbg_mem_data, $realtobits(e));
    end
    check("commits", perf.commits, N - 2);
    check("mispredicts", perf.mispredicts, 2);
    check("both FP units busy >= N cycles", 64'(both_busy >= N), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
