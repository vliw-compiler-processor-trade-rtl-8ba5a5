// disvliw_top: the DISVLIW processor, a VLIW machine whose long
// instructions are scheduled dynamically, slot by slot.
//
// Four stages: fetch (F), decode/scheduling (D/S), execute (EX) and write
// back (WB). The fetch unit reads a long instruction from the instruction
// cache and writes its slots into one instruction queue (IQ) per functional
// unit (FU). In D/S, each FU's dynamic scheduler (DS) compares the dpre bits
// of the instruction at its queue head with its dependency counters (DC) and
// issues it when every named counter is non-zero and the FU is free, reading
// the operands from the register file. In the last EX cycle the FU
// announces completion by incrementing, in the DCs of the units named by the
// instruction's dpost bits, the counter that stands for itself; the
// consumer's issue decrements it again. Units therefore slip against each
// other and need not wait for a whole long instruction, unlike a plain VLIW.
// In WB the result is written to the register file.
//
// Branches are predicted with a BTB; while one is unresolved the register
// file and the DCs are updated in temporary copies, which are committed or
// discarded when it resolves (see fetch_unit, regfile, dep_counter).
//
// Configuration: FUs 0 and 1 are integer units, FUs 2 and 3 long-latency
// units (LONG_MASK), after the document's 2 integer / 2 floating-point
// default; 16 KB direct-mapped instruction cache with a 4-cycle miss penalty
// and a perfect data cache, as in the document. Queue depth, BTB size, data
// memory size and the multiply, FP add and FP multiply latencies are this
// design's choices. Registers and data words are 64 bits (doubles).
//
// Interface: instruction memory read port for cache refills (`imem_*`,
// answered in the same cycle), a debug read port into the register file and
// data memory, `done` once a HALT has been fetched and everything has
// drained, and event counters (`perf`).
module disvliw_top
  import disvliw_pkg::*;
#(
  parameter int unsigned     IQ_DEPTH     = 4,
  parameter int unsigned     ICACHE_BYTES = 16384,
  parameter int unsigned     MISS_PENALTY = 4,
  parameter int unsigned     BTB_ENTRIES  = 16,
  parameter int unsigned     MUL_LAT      = 4,
  parameter int unsigned     FADD_LAT     = 4,
  parameter int unsigned     FMUL_LAT     = 6,
  parameter int unsigned     DMEM_WORDS   = 1024,
  parameter logic [N_FU-1:0] LONG_MASK    = 4'b1100
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction memory (cache refill)
  output logic              imem_req,
  output logic [PC_W-1:0]   imem_addr,
  input  long_instr_t       imem_rdata,
  // debug reads
  input  logic [4:0]        dbg_reg,
  output logic [XLEN-1:0]   dbg_reg_data,
  input  logic [XLEN-1:0]   dbg_addr,
  output logic [XLEN-1:0]   dbg_mem_data,
  // status
  output logic              done,
  output perf_t             perf,
  output logic [N_FU-1:0]   issue_o     // per-unit issue strobes
);
  // ---------------------------------------------------------------- fetch
  logic                 ic_req, ic_hit, ic_busy, ic_miss;
  logic [PC_W-1:0]      pc;
  long_instr_t          ic_rdata;
  logic                 bp_taken;
  logic [PC_W-1:0]      bp_target;
  logic                 btb_upd, btb_upd_taken;
  logic [PC_W-1:0]      btb_upd_pc, btb_upd_target;
  logic [N_FU-1:0]      iq_full, iq_empty, iq_push, iq_pop;
  iq_entry_t [N_FU-1:0] iq_wdata, iq_head;
  logic                 commit, mispredict, spec_active, halted;
  logic                 fetched, full_stall, branch_hold;

  logic [N_FU-1:0]             br_valid, br_taken;
  logic [N_FU-1:0][PC_W-1:0]   br_target;

  icache #(.BYTES(ICACHE_BYTES), .MISS_PENALTY(MISS_PENALTY)) u_icache (
    .clk, .rst_n, .req(ic_req), .pc, .hit(ic_hit), .rdata(ic_rdata),
    .busy(ic_busy), .miss_start(ic_miss),
    .mem_req(imem_req), .mem_addr(imem_addr), .mem_rdata(imem_rdata));

  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n, .pc, .pred_taken(bp_taken), .pred_target(bp_target),
    .upd_valid(btb_upd), .upd_pc(btb_upd_pc), .upd_taken(btb_upd_taken),
    .upd_target(btb_upd_target));

  fetch_unit u_fetch (
    .clk, .rst_n, .ic_req, .pc, .ic_hit, .ic_rdata,
    .bp_taken, .bp_target, .btb_upd, .btb_upd_pc, .btb_upd_taken, .btb_upd_target,
    .iq_full, .iq_push, .iq_wdata,
    .br_valid, .br_taken, .br_target,
    .commit, .mispredict, .spec_active, .halted,
    .fetched, .full_stall, .branch_hold);

  // ------------------------------------------------- per-unit D/S and EX
  logic [N_FU-1:0][DEP_W-1:0][CNT_W-1:0] cnt;
  logic [N_FU-1:0]             issue, ready, busy, dep_stall, res_stall, spec_stall;
  logic [N_FU-1:0]             ann_valid, ann_spec;
  logic [N_FU-1:0][DEP_W-1:0]  ann_dpost;
  logic [N_FU-1:0]             fwd_valid;
  logic [N_FU-1:0][4:0]        fwd_rd;
  logic [N_FU-1:0][XLEN-1:0]   fwd_data;
  logic [N_FU-1:0]             wb_valid, wb_spec;
  logic [N_FU-1:0][4:0]        wb_rd;
  logic [N_FU-1:0][XLEN-1:0]   wb_data;
  logic [N_FU:0]               dm_we;
  logic [N_FU:0][XLEN-1:0]     dm_addr, dm_wdata, dm_rdata;
  logic [2*N_FU:0][4:0]        rf_raddr;
  logic [2*N_FU:0]             rf_rshadow;
  logic [2*N_FU:0][XLEN-1:0]   rf_rdata;
  logic [N_FU-1:0][XLEN-1:0]   opa, opb;
  logic [N_FU-1:0][1:0]        used_fwd, used_byp;

  for (genvar f = 0; f < N_FU; f++) begin : g_fu
    logic [DEP_W-1:0] inc, inc_spec;

    // announcements from the other units that name unit f
    for (genvar k = 0; k < DEP_W; k++) begin : g_inc
      localparam int unsigned G = dep_fu(f, k);
      assign inc[k]      = ann_valid[G] && ann_dpost[G][dep_bit(G, f)];
      assign inc_spec[k] = ann_spec[G];
    end

    iq #(.DEPTH(IQ_DEPTH)) u_iq (
      .clk, .rst_n, .push(iq_push[f]), .wdata(iq_wdata[f]), .pop(iq_pop[f]),
      .commit, .flush(mispredict), .head(iq_head[f]), .empty(iq_empty[f]),
      .full(iq_full[f]));

    dep_counter u_dc (
      .clk, .rst_n, .inc, .inc_spec,
      .dec(issue[f] ? iq_head[f].slot.dpre : '0), .dec_spec(iq_head[f].spec),
      .commit, .mispredict, .rd_shadow(iq_head[f].spec), .cnt(cnt[f]));

    dyn_sched u_ds (
      .head_valid(!iq_empty[f]), .head(iq_head[f]), .cnt(cnt[f]),
      .fu_ready(ready[f]), .d(), .check(), .issue(issue[f]),
      .dep_stall(dep_stall[f]), .res_stall(res_stall[f]), .spec_stall(spec_stall[f]));

    assign iq_pop[f] = issue[f];

    // decode: operand read with forwarding from this unit's own last EX cycle
    assign rf_raddr[2*f]     = iq_head[f].slot.ins.rs1;
    assign rf_raddr[2*f+1]   = src2(iq_head[f].slot.ins);
    assign rf_rshadow[2*f]   = iq_head[f].spec;
    assign rf_rshadow[2*f+1] = iq_head[f].spec;

    always_comb begin
      for (int s = 0; s < 2; s++) begin
        logic [XLEN-1:0] v;
        logic [4:0]      a;
        a = rf_raddr[2*f+s];
        v = rf_rdata[2*f+s];
        used_fwd[f][s] = fwd_valid[f] && fwd_rd[f] == a && a != 5'd0;
        used_byp[f][s] = 1'b0;
        for (int p = 0; p < N_FU; p++)
          if (wb_valid[p] && wb_rd[p] == a && a != 5'd0) used_byp[f][s] = 1'b1;
        if (used_fwd[f][s]) v = fwd_data[f];
        if (s == 0) opa[f] = v; else opb[f] = v;
      end
    end

    func_unit #(.IS_LONG(LONG_MASK[f]), .MUL_LAT(MUL_LAT), .FADD_LAT(FADD_LAT),
                .FMUL_LAT(FMUL_LAT)) u_fu (
      .clk, .rst_n, .issue(issue[f]), .entry(iq_head[f]), .opa(opa[f]), .opb(opb[f]),
      .ready(ready[f]), .busy(busy[f]), .commit, .mispredict,
      .ann_valid(ann_valid[f]), .ann_dpost(ann_dpost[f]), .ann_spec(ann_spec[f]),
      .fwd_valid(fwd_valid[f]), .fwd_rd(fwd_rd[f]), .fwd_data(fwd_data[f]),
      .wb_valid(wb_valid[f]), .wb_rd(wb_rd[f]), .wb_data(wb_data[f]), .wb_spec(wb_spec[f]),
      .mem_we(dm_we[f]), .mem_addr(dm_addr[f]), .mem_wdata(dm_wdata[f]),
      .mem_rdata(dm_rdata[f]),
      .br_valid(br_valid[f]), .br_taken(br_taken[f]), .br_target(br_target[f]));
  end

  // ------------------------------------------------------- WB and memory
  assign rf_raddr[2*N_FU]   = dbg_reg;
  assign rf_rshadow[2*N_FU] = 1'b0;
  assign dbg_reg_data       = rf_rdata[2*N_FU];

  regfile #(.NW(N_FU), .NR(2*N_FU+1)) u_rf (
    .clk, .rst_n, .we(wb_valid), .waddr(wb_rd), .wdata(wb_data), .wspec(wb_spec),
    .raddr(rf_raddr), .rshadow(rf_rshadow), .rdata(rf_rdata), .commit, .mispredict);

  assign dm_we[N_FU]    = 1'b0;
  assign dm_addr[N_FU]  = dbg_addr;
  assign dm_wdata[N_FU] = '0;
  assign dbg_mem_data   = dm_rdata[N_FU];

  dmem #(.WORDS(DMEM_WORDS), .NP(N_FU+1)) u_dmem (
    .clk, .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata));

  // -------------------------------------------------------------- status
  assign done    = halted && !spec_active && &iq_empty && !(|busy) && !(|wb_valid);
  assign issue_o = issue;

  function automatic logic [31:0] popc(logic [N_FU-1:0] v);
    logic [31:0] n;
    n = '0;
    for (int i = 0; i < N_FU; i++) n = n + 32'(v[i]);
    return n;
  endfunction

  function automatic logic [31:0] popc2(logic [N_FU-1:0][1:0] v, logic [N_FU-1:0] en);
    logic [31:0] n;
    n = '0;
    for (int i = 0; i < N_FU; i++)
      if (en[i]) n = n + 32'(v[i][0]) + 32'(v[i][1]);
    return n;
  endfunction

  logic [N_FU-1:0] spec_issue;
  always_comb for (int i = 0; i < N_FU; i++) spec_issue[i] = issue[i] && iq_head[i].spec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else if (!done) begin
      perf.cycles      <= perf.cycles + 1;
      perf.fetched     <= perf.fetched + 32'(fetched);
      perf.issued      <= perf.issued + popc(issue);
      perf.dep_stall   <= perf.dep_stall + popc(dep_stall);
      perf.res_stall   <= perf.res_stall + popc(res_stall);
      perf.spec_stall  <= perf.spec_stall + popc(spec_stall);
      perf.iq_full     <= perf.iq_full + 32'(full_stall);
      perf.branch_hold <= perf.branch_hold + 32'(branch_hold);
      perf.icache_miss <= perf.icache_miss + 32'(ic_miss);
      perf.commits     <= perf.commits + 32'(commit);
      perf.mispredicts <= perf.mispredicts + 32'(mispredict);
      perf.fwd_same_fu <= perf.fwd_same_fu + popc2(used_fwd, issue);
      perf.rf_bypass   <= perf.rf_bypass + popc2(used_byp, issue);
      perf.spec_issued <= perf.spec_issued + popc(spec_issue);
    end
  end
endmodule
