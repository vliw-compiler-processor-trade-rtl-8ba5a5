// tb_btb: random test of the branch target buffer against a model.
//
// The model is a table of ENTRIES entries with tag, target and 2-bit
// counter, updated by the same rule (hit: count up on taken and take the new
// target, count down on not taken; miss and taken: allocate weakly taken;
// miss and not taken: no change). Random lookups are compared every cycle;
// the branch addresses come from a small pool so that hits, aliasing
// conflicts and counter saturation all occur.
module tb_btb;
  import disvliw_pkg::*;

  localparam int unsigned ENTRIES = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PC_W-1:0] pc, pred_target, upd_pc, upd_target;
  logic pred_taken, upd_valid, upd_taken;

  btb #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_taken_pred = 0;
  logic            m_v [ENTRIES];
  logic [PC_W-1:0] m_pc [ENTRIES], m_tg [ENTRIES];
  int              m_c [ENTRIES];
  logic [PC_W-1:0] pool [24];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_v[i]) begin m_v[i] = 0; m_c[i] = 0; m_pc[i] = 0; m_tg[i] = 0; end
    foreach (pool[i]) pool[i] = PC_W'($urandom_range(0, 200));
    pc = 0; upd_valid = 0; upd_pc = 0; upd_taken = 0; upd_target = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int i;
      logic exp_t;
      @(negedge clk);
      pc = pool[$urandom_range(0, 23)];
      i  = pc % ENTRIES;
      exp_t = m_v[i] && m_pc[i] == pc && m_c[i] >= 2;
      #1;
      checks++;
      if (pred_taken !== exp_t || (exp_t && pred_target !== m_tg[i])) begin
        failures++;
        $display("FAIL t=%0d pc=%0d taken %b/%b", t, pc, pred_taken, exp_t);
      end
      if (exp_t) n_taken_pred++;
      upd_valid  = $urandom_range(0, 1);
      upd_pc     = pool[$urandom_range(0, 23)];
      upd_taken  = $urandom_range(0, 3) != 0;
      upd_target = PC_W'($urandom_range(0, 3)) + upd_pc;
      @(posedge clk);
      if (upd_valid) begin
        int j;
        j = upd_pc % ENTRIES;
        if (m_v[j] && m_pc[j] == upd_pc) begin
          if (upd_taken) begin
            if (m_c[j] < 3) m_c[j]++;
            m_tg[j] = upd_target;
          end else if (m_c[j] > 0) m_c[j]--;
        end else if (upd_taken) begin
          m_v[j] = 1; m_pc[j] = upd_pc; m_tg[j] = upd_target; m_c[j] = 2;
        end
      end
    end
    checks++;
    if (n_taken_pred == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
