// tb_iq: random test of the instruction queue against a reference queue.
//
// Each cycle pushes (when not full), pops (when not empty), commits or
// flushes at random. Pushed entries are tagged speculative once a random
// "branch" has been seen, as the fetch unit would. The reference is an SV
// queue of entries; the head, empty and full outputs are compared with it
// every cycle.
module tb_iq;
  import disvliw_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      push, pop, commit, flush;
  iq_entry_t wdata, head;
  logic      empty, full;

  iq #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  iq_entry_t model [$];
  logic spec_mode = 1'b0;
  int n_full = 0, n_flush = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; commit = 0; flush = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // compare outputs with the model
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH)) begin
        failures++;
        $display("FAIL t=%0d empty/full %b%b size %0d", t, empty, full, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (head !== model[0]) begin
          failures++;
          $display("FAIL t=%0d head %h expected %h", t, head, model[0]);
        end
      end
      if (full) n_full++;
      // new stimulus
      push   = !full && ($urandom_range(0, 3) != 0);
      pop    = !empty && ($urandom_range(0, 2) == 0);
      commit = spec_mode && ($urandom_range(0, 15) == 0);
      flush  = spec_mode && !commit && ($urandom_range(0, 15) == 0);
      wdata.slot = slot_t'({$urandom, $urandom});
      wdata.spec = spec_mode && !commit;
      // model update at the coming edge
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (commit) foreach (model[i]) model[i].spec = 1'b0;
      if (flush) begin
        n_flush++;
        while (model.size() > 0 && model[$].spec) void'(model.pop_back());
      end else if (push) begin
        model.push_back(wdata);
      end
      if (commit || flush) spec_mode = 1'b0;
      else if ($urandom_range(0, 9) == 0) spec_mode = 1'b1;
    end
    checks++;
    if (n_full == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL coverage full=%0d flush=%0d", n_full, n_flush);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
