// dmem: the data cache, modelled as perfect (it always hits and has no miss
// penalty), which is how the document evaluates the processor.
//
// WORDS words of XLEN (64) bits with one port per functional unit. Addresses
// are byte addresses; bits [2:0] are ignored and the word index wraps at
// WORDS.
// Reads are combinational (a load finishes in its one EX cycle); writes take
// effect at the clock edge. The size and the port count are this design's
// choices. The memory has no reset: software must write a word before it
// reads it.
module dmem
  import disvliw_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned NP    = N_FU
) (
  input  logic                    clk,
  input  logic [NP-1:0]           we,
  input  logic [NP-1:0][XLEN-1:0] addr,
  input  logic [NP-1:0][XLEN-1:0] wdata,
  output logic [NP-1:0][XLEN-1:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned BW = $clog2(XLEN / 8);   // byte-offset bits

  logic [XLEN-1:0] mem [WORDS];

  always_comb begin
    for (int p = 0; p < NP; p++) rdata[p] = mem[addr[p][AW+BW-1:BW]];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NP; p++)
      if (we[p]) mem[addr[p][AW+BW-1:BW]] <= wdata[p];
  end
endmodule
