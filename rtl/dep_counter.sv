// dep_counter: the dependency counter (DC) of one functional unit.
//
// A DC holds N-1 counters, one for every other functional unit. When another
// unit finishes an instruction whose dpost names this unit, that unit's
// counter is incremented ("announce"). When this unit's scheduler issues an
// instruction, the counters named by its dpre are decremented, consuming the
// announcements it waited for. Both may happen in one cycle.
//
// Speculation: the document keeps a copy of every DC in temporary storage
// while a branch prediction is unresolved, updates the copy, and on a correct
// prediction copies it back, otherwise discards it. Here the copy (`shadow`)
// mirrors the original at all times: events from non-speculative
// instructions update both, speculative events only the shadow. `commit`
// copies shadow to original, `mispredict` copies original to shadow. Keeping
// the shadow always equal to the original outside speculation is this
// design's way of making the copy at prediction time free.
//
// Timing: updates are visible the cycle after the event. `rd_shadow` picks
// which copy `cnt` shows (the scheduler reads the shadow for a speculative
// head instruction). The counter width is this design's choice.
module dep_counter
  import disvliw_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [DEP_W-1:0]       inc,        // announce from other unit k
  input  logic [DEP_W-1:0]       inc_spec,   // that announcement is speculative
  input  logic [DEP_W-1:0]       dec,        // dpre of the instruction issued
  input  logic                   dec_spec,   // the issued instruction is speculative
  input  logic                   commit,
  input  logic                   mispredict,
  input  logic                   rd_shadow,
  output logic [DEP_W-1:0][CNT_W-1:0] cnt
);
  logic [DEP_W-1:0][CNT_W-1:0] c_main, c_shadow, n_main, n_shadow;

  always_comb begin
    for (int k = 0; k < DEP_W; k++) begin
      n_main[k]   = c_main[k];
      n_shadow[k] = c_shadow[k];
      if (inc[k]) begin
        n_shadow[k] = n_shadow[k] + 1'b1;
        if (!inc_spec[k]) n_main[k] = n_main[k] + 1'b1;
      end
      if (dec[k]) begin
        n_shadow[k] = n_shadow[k] - 1'b1;
        if (!dec_spec) n_main[k] = n_main[k] - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_main   <= '0;
      c_shadow <= '0;
    end else begin
      c_main   <= commit     ? n_shadow : n_main;
      c_shadow <= mispredict ? n_main   : n_shadow;
    end
  end

  assign cnt = rd_shadow ? c_shadow : c_main;

  for (genvar k = 0; k < DEP_W; k++) begin : g_chk
    a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                      !(inc[k] && !dec[k] && &c_shadow[k]));
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                      !(dec[k] && !inc[k] && c_shadow[k] == '0));
  end
endmodule
