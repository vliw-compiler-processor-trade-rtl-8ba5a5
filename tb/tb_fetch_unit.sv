// tb_fetch_unit: directed-random test of the fetch unit against a reference
// model of its state (pc, speculative mode, pending branch address and
// predicted next address, halted).
//
// Each cycle the testbench offers a cache hit or miss, queue-full flags, a
// BTB prediction and, while a branch is pending, sometimes its resolution.
// The long instruction at each address is a fixed function of the address
// (ALU slots, NOPs, occasionally a branch or a HALT). The queue pushes and
// their speculation tags, commit and mispredict, BTB update and pc sequence
// are compared with the model every cycle.
module tb_fetch_unit;
  import disvliw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ic_req, ic_hit, bp_taken, btb_upd, btb_upd_taken;
  logic [PC_W-1:0] pc, bp_target, btb_upd_pc, btb_upd_target;
  long_instr_t ic_rdata;
  logic [N_FU-1:0] iq_full, iq_push, br_valid, br_taken;
  iq_entry_t [N_FU-1:0] iq_wdata;
  logic [N_FU-1:0][PC_W-1:0] br_target;
  logic commit, mispredict, spec_active, halted, fetched, full_stall, branch_hold;

  fetch_unit dut (.*);

  always #5 clk = ~clk;

  function automatic long_instr_t code(logic [PC_W-1:0] a);
    long_instr_t v;
    int h;
    v = '0;
    for (int f = 0; f < N_FU; f++) begin
      h = int'(((32'(a) * 32'd2654435761 + 32'(f) * 32'd40503) >> 7) % 32'd40);
      v[f].ins.op = (h < 10) ? OP_NOP : (h < 16 && f == 0) ? OP_BEQ : (h == 39 && f == 1 && a > 30) ? OP_HALT
                    : OP_ADD;
      v[f].ins.lo = 16'(a);
      v[f].dpre   = DEP_W'(h);
      v[f].dpost  = DEP_W'(h >> 2);
    end
    return v;
  endfunction

  int checks = 0, failures = 0;
  int n_commit = 0, n_mis = 0, n_hold = 0, n_halt = 0, n_spec_push = 0;

  // model state
  logic [PC_W-1:0] m_pc, m_brpc, m_pred;
  logic m_spec, m_halt;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ic_hit = 0; ic_rdata = '0; bp_taken = 0; bp_target = 0; iq_full = 0;
    br_valid = 0; br_taken = 0; br_target = '0;
    m_pc = 0; m_brpc = 0; m_pred = 0; m_spec = 0; m_halt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      logic hasb, hash, go, e_commit, e_mis;
      logic [PC_W-1:0] nxt, actual;
      int rf;
      @(negedge clk);
      // stimulus
      ic_hit    = !m_halt && $urandom_range(0, 5) != 0;
      ic_rdata  = code(pc);
      bp_taken  = $urandom_range(0, 1);
      bp_target = PC_W'($urandom_range(0, 60));
      iq_full   = ($urandom_range(0, 5) == 0) ? N_FU'(1 << $urandom_range(0, N_FU - 1)) : '0;
      br_valid  = '0; br_taken = '0; br_target = '0;
      if (m_spec && $urandom_range(0, 3) == 0) begin
        rf = $urandom_range(0, N_FU - 1);
        br_valid[rf]  = 1;
        br_taken[rf]  = $urandom_range(0, 1);
        br_target[rf] = ($urandom_range(0, 1) == 0) ? m_pred : PC_W'($urandom_range(0, 60));
      end
      #1;
      // expected
      chk("pc", 32'(pc), 32'(m_pc));
      chk("ic_req", 32'(ic_req), 32'(!m_halt));
      hasb = 0; hash = 0;
      for (int f = 0; f < N_FU; f++) begin
        if (is_branch(ic_rdata[f].ins.op)) hasb = 1;
        if (ic_rdata[f].ins.op == OP_HALT) hash = 1;
      end
      actual = 0;
      for (int f = 0; f < N_FU; f++)
        if (br_valid[f]) actual = br_taken[f] ? br_target[f] : m_brpc + 1;
      e_commit = |br_valid && actual == m_pred;
      e_mis    = |br_valid && actual != m_pred;
      chk("commit", 32'(commit), 32'(e_commit));
      chk("mispredict", 32'(mispredict), 32'(e_mis));
      chk("btb upd", 32'(btb_upd), 32'(|br_valid));
      if (|br_valid) chk("btb upd pc", 32'(btb_upd_pc), 32'(m_brpc));
      go = ic_hit && iq_full == 0 && !(hasb && m_spec) && !e_mis;
      chk("fetched", 32'(fetched), 32'(go));
      if (ic_hit && hasb && m_spec) n_hold++;
      for (int f = 0; f < N_FU; f++) begin
        logic ep;
        ep = go && ic_rdata[f].ins.op != OP_NOP && ic_rdata[f].ins.op != OP_HALT;
        chk("push", 32'(iq_push[f]), 32'(ep));
        if (ep) begin
          checks++;
          if (iq_wdata[f].slot !== ic_rdata[f] || iq_wdata[f].spec !== (m_spec && !e_commit)) begin
            failures++;
            $display("FAIL t=%0d slot %0d data/spec", t, f);
          end
          if (iq_wdata[f].spec) n_spec_push++;
        end
      end
      nxt = (hasb && bp_taken) ? bp_target : m_pc + 1;
      @(posedge clk);
      // model update
      if (|br_valid) m_spec = 0;
      if (e_commit) n_commit++;
      if (e_mis) begin
        n_mis++;
        m_pc = actual; m_halt = 0;
      end else if (go) begin
        if (hasb) begin m_spec = 1; m_brpc = m_pc; m_pred = nxt; end
        if (hash) begin m_halt = 1; n_halt++; end
        else m_pc = nxt;
      end
      if (m_halt && !m_spec) begin
        // restart the program elsewhere to keep the test going
        @(negedge clk);
        ic_hit = 0; br_valid = '0;
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
        m_pc = 0; m_halt = 0; m_spec = 0; m_brpc = 0; m_pred = 0;
      end
    end
    checks++;
    if (n_commit == 0 || n_mis == 0 || n_hold == 0 || n_halt == 0 || n_spec_push == 0) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d %0d", n_commit, n_mis, n_hold, n_halt, n_spec_push);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
