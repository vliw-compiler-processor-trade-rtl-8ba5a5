// iq: instruction queue placed in front of one functional unit.
//
// The fetch unit writes one slot of each long instruction into the tail; the
// decode unit and the unit's dynamic scheduler read the head. Entries leave
// in order, but because each unit has its own queue the units slip against
// each other. `full` stops the fetch unit from fetching the next long
// instruction, as the document requires, so the queue never overflows.
//
// Each entry carries a speculation tag (set for slots fetched after an
// unresolved branch). `commit` clears every tag; `flush` drops every tagged
// entry. Tagged entries are always the youngest, so a flush only moves the
// tail back. The depth (4) is this design's choice: the document gives none.
//
// Timing: push and pop take effect at the clock edge; head is valid the
// cycle after the push. A pop and a push may happen in the same cycle.
module iq
  import disvliw_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  iq_entry_t wdata,
  input  logic      pop,
  input  logic      commit,   // clear all speculation tags
  input  logic      flush,    // drop all speculative entries
  output iq_entry_t head,
  output logic      empty,
  output logic      full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  iq_entry_t             mem [DEPTH];
  logic [AW-1:0]         rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [$clog2(DEPTH+1)-1:0] nonspec_after_pop;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign head  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [AW-1:0] add(logic [AW-1:0] p, logic [$clog2(DEPTH+1)-1:0] n);
    logic [AW:0] s;
    s = {1'b0, p} + (AW+1)'(n);
    return (s >= (AW+1)'(DEPTH)) ? AW'(s - (AW+1)'(DEPTH)) : AW'(s);
  endfunction

  // Non-speculative entries form a contiguous run from the head.
  always_comb begin
    logic stop;
    nonspec_after_pop = '0;
    stop = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      logic [AW-1:0] idx;
      idx = add(rd_ptr, ($clog2(DEPTH+1))'(i));
      if (i < count && !stop) begin
        if (mem[idx].spec) stop = 1'b1;
        else if (!(pop && i == 0)) nonspec_after_pop = nonspec_after_pop + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= pop ? inc(rd_ptr) : rd_ptr;
      wr_ptr <= add(pop ? inc(rd_ptr) : rd_ptr, nonspec_after_pop);
      count  <= nonspec_after_pop;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (commit)
      for (int unsigned i = 0; i < DEPTH; i++) mem[i].spec <= 1'b0;
    if (push && !flush) begin
      mem[wr_ptr]      <= wdata;
      mem[wr_ptr].spec <= wdata.spec && !commit;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
