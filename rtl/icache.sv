// icache: direct-mapped instruction cache holding whole long instructions.
//
// One line holds one long instruction (N_FU slots with their dependency
// bits). The capacity BYTES counts the 4-byte instructions only, so the
// document's default of 16 KB with four slots gives 1024 lines; the tag,
// valid bit and dependency bits are stored on top. With one long instruction
// per line, the LRU policy the document lists has nothing to choose among.
//
// Lookup is combinational: `hit` and `rdata` answer `pc` in the same cycle.
// On a miss the cache waits MISS_PENALTY cycles (4 by default, the
// document's "next long instruction miss penalty"), then reads the line from
// the instruction memory through `mem_*` (the memory answers in the same
// cycle) and writes it; the lookup hits in the following cycle. `busy` is
// high while a miss is being served.
//
// MISS_PENALTY = 0 builds the perfect instruction cache the document uses
// to measure scheduling alone: no storage, every lookup is answered from the
// instruction memory in the same cycle and there are no misses.
module icache
  import disvliw_pkg::*;
#(
  parameter int unsigned BYTES        = 16384,
  parameter int unsigned MISS_PENALTY = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic [PC_W-1:0]   pc,
  output logic              hit,
  output long_instr_t       rdata,
  output logic              busy,
  output logic              miss_start,  // one pulse per miss
  output logic              mem_req,
  output logic [PC_W-1:0]   mem_addr,
  input  long_instr_t       mem_rdata
);
  localparam int unsigned LINES = BYTES / (4 * N_FU);
  localparam int unsigned IW    = $clog2(LINES);
  localparam int unsigned TW    = PC_W - IW;

  if (MISS_PENALTY == 0) begin : g_perfect
    assign hit        = req;
    assign rdata      = mem_rdata;
    assign busy       = 1'b0;
    assign miss_start = 1'b0;
    assign mem_req    = req;
    assign mem_addr   = pc;
  end else begin : g_cache
    long_instr_t     data_q  [LINES];
    logic [TW-1:0]   tag_q   [LINES];
    logic [LINES-1:0] valid_q;

    logic [IW-1:0]   idx;
    logic [TW-1:0]   tag;
    logic [PC_W-1:0] miss_pc;
    logic [7:0]      wait_cnt;

    assign idx   = pc[IW-1:0];
    assign tag   = pc[PC_W-1:IW];
    assign hit   = req && !busy && valid_q[idx] && tag_q[idx] == tag;
    assign rdata = data_q[idx];
    assign miss_start = req && !busy && !(valid_q[idx] && tag_q[idx] == tag);

    assign mem_req  = busy && wait_cnt == 8'd0;
    assign mem_addr = miss_pc;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid_q  <= '0;
        busy     <= 1'b0;
        miss_pc  <= '0;
        wait_cnt <= '0;
      end else if (!busy) begin
        if (miss_start) begin
          busy     <= 1'b1;
          miss_pc  <= pc;
          wait_cnt <= 8'(MISS_PENALTY - 1);
        end
      end else if (wait_cnt == 8'd0) begin
        busy                    <= 1'b0;
        valid_q[miss_pc[IW-1:0]] <= 1'b1;
      end else begin
        wait_cnt <= wait_cnt - 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (mem_req) begin
        data_q[miss_pc[IW-1:0]] <= mem_rdata;
        tag_q[miss_pc[IW-1:0]]  <= miss_pc[PC_W-1:IW];
      end
    end
  end
endmodule
