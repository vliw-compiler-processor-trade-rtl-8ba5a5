// tb_dep_counter: random test of one dependency counter against a model.
//
// Drives announcements (inc) and issue decrements (dec), speculative or
// not, with commit and mispredict, keeping every counter between 0 and 6 so
// that the traffic is legal. The model keeps a main and a shadow copy per
// counter; both copies are compared every cycle through rd_shadow.
module tb_dep_counter;
  import disvliw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DEP_W-1:0] inc, inc_spec, dec;
  logic dec_spec, commit, mispredict, rd_shadow;
  logic [DEP_W-1:0][CNT_W-1:0] cnt;

  dep_counter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_main [DEP_W], m_sh [DEP_W];
  logic spec_mode;
  int n_commit = 0, n_mis = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = '0; inc_spec = '0; dec = '0; dec_spec = 0; commit = 0; mispredict = 0;
    rd_shadow = 0; spec_mode = 0;
    foreach (m_main[k]) begin m_main[k] = 0; m_sh[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        rd_shadow = s[0];
        #1;
        for (int k = 0; k < DEP_W; k++) begin
          checks++;
          if (int'(cnt[k]) != (s ? m_sh[k] : m_main[k])) begin
            failures++;
            $display("FAIL t=%0d k=%0d shadow=%0d got %0d exp %0d", t, k, s, cnt[k],
                     s ? m_sh[k] : m_main[k]);
          end
        end
      end
      commit     = spec_mode && $urandom_range(0, 9) == 0;
      mispredict = spec_mode && !commit && $urandom_range(0, 9) == 0;
      dec_spec   = spec_mode;
      for (int k = 0; k < DEP_W; k++) begin
        inc[k]      = (m_sh[k] < 6) && $urandom_range(0, 2) == 0;
        inc_spec[k] = spec_mode && $urandom_range(0, 1);
        dec[k]      = (m_sh[k] > 0) && (dec_spec || m_main[k] > 0) && $urandom_range(0, 2) == 0;
      end
      @(posedge clk);
      for (int k = 0; k < DEP_W; k++) begin
        int nm, ns;
        nm = m_main[k] + (inc[k] && !inc_spec[k]) - (dec[k] && !dec_spec);
        ns = m_sh[k] + inc[k] - dec[k];
        m_main[k] = commit ? ns : nm;
        m_sh[k]   = mispredict ? nm : ns;
      end
      if (commit) n_commit++;
      if (mispredict) n_mis++;
      if (commit || mispredict) spec_mode = 0;
      else if ($urandom_range(0, 7) == 0) spec_mode = 1;
    end
    checks++;
    if (n_commit == 0 || n_mis == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
