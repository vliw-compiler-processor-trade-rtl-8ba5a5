// btb: branch target buffer used by the fetch unit to predict branches.
//
// Looked up with the address of the long instruction being fetched, in the
// same cycle: if it predicts a taken branch it supplies the target,
// otherwise the fetch unit goes on at PC+1, as in the document. After the
// branch resolves the entry is updated with the outcome.
//
// The document gives neither size nor prediction scheme; this design uses a
// direct-mapped table of ENTRIES entries, each with a tag, the target and a
// 2-bit saturating counter (predict taken when the upper bit is set). A taken
// branch that misses allocates its entry as weakly taken; a not-taken branch
// that misses leaves the table unchanged. The update is written at the clock
// edge.
module btb
  import disvliw_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] pc,
  output logic            pred_taken,
  output logic [PC_W-1:0] pred_target,
  input  logic            upd_valid,
  input  logic [PC_W-1:0] upd_pc,
  input  logic            upd_taken,
  input  logic [PC_W-1:0] upd_target
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = PC_W - IW;

  logic [ENTRIES-1:0] valid_q;
  logic [TW-1:0]      tag_q    [ENTRIES];
  logic [PC_W-1:0]    target_q [ENTRIES];
  logic [1:0]         ctr_q    [ENTRIES];

  logic [IW-1:0] li, ui;
  logic          lhit, uhit;

  assign li   = pc[IW-1:0];
  assign lhit = valid_q[li] && tag_q[li] == pc[PC_W-1:IW];
  assign pred_taken  = lhit && ctr_q[li][1];
  assign pred_target = target_q[li];

  assign ui   = upd_pc[IW-1:0];
  assign uhit = valid_q[ui] && tag_q[ui] == upd_pc[PC_W-1:IW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        tag_q[e]    <= '0;
        target_q[e] <= '0;
        ctr_q[e]    <= 2'b00;
      end
    end else if (upd_valid) begin
      if (uhit) begin
        if (upd_taken) begin
          if (ctr_q[ui] != 2'b11) ctr_q[ui] <= ctr_q[ui] + 1'b1;
          target_q[ui] <= upd_target;
        end else if (ctr_q[ui] != 2'b00) begin
          ctr_q[ui] <= ctr_q[ui] - 1'b1;
        end
      end else if (upd_taken) begin
        valid_q[ui]  <= 1'b1;
        tag_q[ui]    <= upd_pc[PC_W-1:IW];
        target_q[ui] <= upd_target;
        ctr_q[ui]    <= 2'b10;
      end
    end
  end
endmodule
