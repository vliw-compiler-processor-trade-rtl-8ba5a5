// regfile: the shared register file with its temporary (speculative) copy.
//
// NREG registers of XLEN bits, register 0 reads as zero. Each functional unit
// has one write port, used in its WB stage, and two read ports, used when its
// scheduler issues an instruction.
//
// The document keeps a copy of the register file in temporary storage while a
// branch prediction is unresolved: executed instructions update the copy, a
// correct prediction copies it back into the register file and a wrong one
// discards it. Here the copy (`shadow`) mirrors the register file at all
// times: non-speculative writes go to both, speculative writes only to the
// shadow. `commit` copies shadow to main, `mispredict` main to shadow, each
// in one cycle, including that cycle's writes. A read port with `rshadow`
// set (a speculative instruction) reads the shadow, otherwise the main copy.
//
// Reads are combinational and bypass the writes of the same cycle, so an
// instruction issued in the cycle its producer is in WB gets the new value.
// Two writes to one register in one cycle are a compiler error (asserted).
module regfile
  import disvliw_pkg::*;
#(
  parameter int unsigned NW = N_FU,
  parameter int unsigned NR = 2 * N_FU
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NW-1:0]             we,
  input  logic [NW-1:0][4:0]        waddr,
  input  logic [NW-1:0][XLEN-1:0]   wdata,
  input  logic [NW-1:0]             wspec,
  input  logic [NR-1:0][4:0]        raddr,
  input  logic [NR-1:0]             rshadow,
  output logic [NR-1:0][XLEN-1:0]   rdata,
  input  logic                      commit,
  input  logic                      mispredict
);
  logic [XLEN-1:0] r_main [NREG];
  logic [XLEN-1:0] r_shadow [NREG];
  logic [XLEN-1:0] n_main [NREG];
  logic [XLEN-1:0] n_shadow [NREG];

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      n_main[r]   = r_main[r];
      n_shadow[r] = r_shadow[r];
    end
    for (int p = 0; p < NW; p++) begin
      if (we[p] && waddr[p] != 5'd0) begin
        n_shadow[waddr[p]] = wdata[p];
        if (!wspec[p]) n_main[waddr[p]] = wdata[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        r_main[r]   <= '0;
        r_shadow[r] <= '0;
      end
    end else begin
      for (int r = 0; r < NREG; r++) begin
        r_main[r]   <= commit     ? n_shadow[r] : n_main[r];
        r_shadow[r] <= mispredict ? n_main[r]   : n_shadow[r];
      end
    end
  end

  always_comb begin
    for (int q = 0; q < NR; q++)
      rdata[q] = rshadow[q] ? n_shadow[raddr[q]] : n_main[raddr[q]];
  end

  for (genvar p = 0; p < NW; p++) begin : g_chk
    for (genvar o = p + 1; o < NW; o++) begin : g_pair
      a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
                      !(we[p] && we[o] && waddr[p] == waddr[o] && waddr[p] != 5'd0));
    end
  end
endmodule
