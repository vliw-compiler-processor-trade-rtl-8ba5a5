// tb_cache_sizes: the processor with the three instruction-cache sizes of
// the cache-size study (8, 16 and 32 KB) and with the perfect instruction
// cache of the scheduling study (MISS_PENALTY = 0), running one program
// whose loop body is larger than the 8 KB cache but fits in 16 and 32 KB.
//
// The program is generated here: a loop of BODY long instructions, each
// incrementing r2 in unit 0 and r3 in unit 1, run ITER times under a
// counted branch, then HALT. With four 4-byte instructions per long
// instruction, 8 KB holds 512 lines, so BODY = 600 makes the second and
// later iterations miss again on the lines that conflict; 16 and 32 KB only
// take cold misses. Checks: correct results in all three, equal miss counts
// for 16 and 32 KB, more misses and more cycles for 8 KB, for 16 KB
// exactly one miss per distinct line fetched, and for the perfect cache no
// misses and fewer cycles than 16 KB.
module tb_cache_sizes;
  import disvliw_pkg::*;

  localparam int BODY = 600, ITER = 3, PROG = BODY + 8;
  localparam int NC = 4;
  localparam int unsigned SIZES [NC] = '{8192, 16384, 32768, 16384};
  localparam int unsigned PENALTY [NC] = '{4, 4, 4, 0};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  long_instr_t prog [PROG];

  logic            imem_req [NC];
  logic [PC_W-1:0] imem_addr [NC];
  long_instr_t     imem_rdata [NC];
  logic [4:0]      dbg_reg;
  logic [XLEN-1:0] dbg_reg_data [NC], dbg_mem_data [NC];
  logic            done [NC];
  perf_t           perf [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    assign imem_rdata[c] = (imem_addr[c] < PROG) ? prog[imem_addr[c]] : '0;
    disvliw_top #(.ICACHE_BYTES(SIZES[c]), .MISS_PENALTY(PENALTY[c])) dut (
      .clk, .rst_n, .imem_req(imem_req[c]), .imem_addr(imem_addr[c]),
      .imem_rdata(imem_rdata[c]), .dbg_reg, .dbg_reg_data(dbg_reg_data[c]),
      .dbg_addr('0), .dbg_mem_data(dbg_mem_data[c]), .done(done[c]), .perf(perf[c]),
      .issue_o());
  end

  int checks = 0, failures = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic slot_t s(op_e op, int rd, int rs1, int lo);
    slot_t v = '0;
    v.ins.op = op; v.ins.rd = 5'(rd); v.ins.rs1 = 5'(rs1); v.ins.lo = 16'(lo);
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < PROG; p++) prog[p] = '0;
    prog[0][0] = s(OP_ADDI, 1, 0, ITER);
    for (int p = 1; p <= BODY; p++) begin
      prog[p][0] = s(OP_ADDI, 2, 2, 1);
      prog[p][1] = s(OP_ADDI, 3, 3, 1);
    end
    prog[BODY + 1][0] = s(OP_ADDI, 1, 1, -1);
    prog[BODY + 2][0] = s(OP_BNE, 1, 0, 1);
    prog[BODY + 3][0] = s(OP_HALT, 0, 0, 0);
    dbg_reg = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      $display("%0d KB, penalty %0d: %0d cycles, %0d misses", SIZES[c] / 1024, PENALTY[c],
               perf[c].cycles, perf[c].icache_miss);
      dbg_reg = 2; #1 check($sformatf("r2 %0d", c), dbg_reg_data[c], BODY * ITER);
      dbg_reg = 3; #1 check($sformatf("r3 %0d", c), dbg_reg_data[c], BODY * ITER);
    end
    // 16 KB: every line from 0 to BODY+3 once (BODY+3 is first reached on
    // the wrong path after the first, mispredicted loop branch)
    check("16 KB misses", perf[1].icache_miss, BODY + 4);
    check("32 KB misses = 16 KB misses", perf[2].icache_miss, perf[1].icache_miss);
    check("8 KB misses more", 32'(perf[0].icache_miss > perf[1].icache_miss), 1);
    check("8 KB slower", 32'(perf[0].cycles > perf[1].cycles), 1);
    check("perfect: no misses", perf[3].icache_miss, 0);
    check("perfect faster than 16 KB", 32'(perf[3].cycles < perf[1].cycles), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
