// tb_dyn_sched: exhaustive-by-random test of the dynamic scheduler's check
// logic: d_k = !dpre[k] || C_k > 0, check = AND of d_k, issue when the head
// is valid, check holds, the unit is free and the head is not a
// speculative store. The expected values are computed bit by bit here.
module tb_dyn_sched;
  import disvliw_pkg::*;

  logic                        head_valid, fu_ready;
  iq_entry_t                   head;
  logic [DEP_W-1:0][CNT_W-1:0] cnt;
  logic [DEP_W-1:0]            d;
  logic                        check, issue, dep_stall, res_stall, spec_stall;

  dyn_sched dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic exp_check, exp_issue, sw;
      logic [DEP_W-1:0] exp_d;
      head       = iq_entry_t'({$urandom, $urandom});
      head.slot.ins.op = ($urandom_range(0, 3) == 0) ? OP_SW : OP_ADD;
      head_valid = $urandom_range(0, 4) != 0;
      fu_ready   = $urandom_range(0, 3) != 0;
      for (int k = 0; k < DEP_W; k++)
        cnt[k] = ($urandom_range(0, 1) == 0) ? '0 : CNT_W'($urandom_range(1, 15));
      #1;
      for (int k = 0; k < DEP_W; k++) exp_d[k] = (head.slot.dpre[k] == 1'b0) || (cnt[k] > 0);
      exp_check = &exp_d;
      sw        = head.spec && head.slot.ins.op == OP_SW;
      exp_issue = head_valid && exp_check && fu_ready && !sw;
      checks++;
      if (d !== exp_d || check !== exp_check || issue !== exp_issue ||
          dep_stall !== (head_valid && !exp_check) ||
          res_stall !== (head_valid && exp_check && !fu_ready) ||
          spec_stall !== (head_valid && sw)) begin
        failures++;
        $display("FAIL t=%0d dpre=%b cnt=%h d=%b/%b issue=%b/%b", t, head.slot.dpre, cnt,
                 d, exp_d, issue, exp_issue);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
