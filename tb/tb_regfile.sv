// tb_regfile: random test of the register file and its speculative copy.
//
// Random writes on the four write ports (distinct registers per cycle),
// speculative or not, with commit and mispredict, against a model holding a
// main and a shadow array. Every read port is checked in the same cycle as
// the writes, which also checks the write-to-read bypass, and r0 must read
// zero.
module tb_regfile;
  import disvliw_pkg::*;

  localparam int unsigned NW = 4, NR = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NW-1:0]           we, wspec;
  logic [NW-1:0][4:0]      waddr;
  logic [NW-1:0][XLEN-1:0] wdata;
  logic [NR-1:0][4:0]      raddr;
  logic [NR-1:0]           rshadow;
  logic [NR-1:0][XLEN-1:0] rdata;
  logic                    commit, mispredict;

  regfile #(.NW(NW), .NR(NR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [XLEN-1:0] m_main [32], m_sh [32], n_main [32], n_sh [32];
  logic spec_mode = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; wspec = '0; waddr = '0; wdata = '0; raddr = '0; rshadow = '0;
    commit = 0; mispredict = 0;
    for (int r = 0; r < 32; r++) begin m_main[r] = 0; m_sh[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        logic clash;
        we[p] = $urandom_range(0, 1);
        do begin
          waddr[p] = 5'($urandom);
          clash = 0;
          for (int o = 0; o < p; o++) if (we[o] && waddr[o] == waddr[p]) clash = 1;
        end while (clash);
        wdata[p] = {$urandom, $urandom};
        wspec[p] = spec_mode && $urandom_range(0, 1);
      end
      for (int q = 0; q < NR; q++) begin
        raddr[q] = ($urandom_range(0, 1) == 0 && we[q % NW]) ? waddr[q % NW] : 5'($urandom);
        rshadow[q] = $urandom_range(0, 1);
      end
      commit     = spec_mode && $urandom_range(0, 9) == 0;
      mispredict = spec_mode && !commit && $urandom_range(0, 9) == 0;
      n_main = m_main; n_sh = m_sh;
      for (int p = 0; p < NW; p++)
        if (we[p] && waddr[p] != 0) begin
          n_sh[waddr[p]] = wdata[p];
          if (!wspec[p]) n_main[waddr[p]] = wdata[p];
        end
      #1;
      for (int q = 0; q < NR; q++) begin
        logic [XLEN-1:0] e;
        e = rshadow[q] ? n_sh[raddr[q]] : n_main[raddr[q]];
        checks++;
        if (rdata[q] !== e) begin
          failures++;
          $display("FAIL t=%0d port %0d r%0d sh=%b got %h exp %h", t, q, raddr[q],
                   rshadow[q], rdata[q], e);
        end
      end
      @(posedge clk);
      m_main = commit ? n_sh : n_main;
      m_sh   = mispredict ? n_main : n_sh;
      if (commit || mispredict) spec_mode = 0;
      else if ($urandom_range(0, 7) == 0) spec_mode = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
