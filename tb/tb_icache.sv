// tb_icache: test of the direct-mapped instruction cache at its default
// size (16 KB, 1024 lines of one long instruction) and 4-cycle miss penalty.
//
// The memory model returns a long instruction computed from its address.
// For a sequence of addresses (sequential runs, repeats, and addresses that
// conflict on the same line) the testbench requests each until it hits,
// checks the data, and checks the cycles taken: 0 extra cycles for a line
// it knows to be present, MISS_PENALTY + 1 cycles until the hit otherwise,
// with exactly one memory read per miss. Presence is tracked by its own tag
// model. A second instance with MISS_PENALTY = 0 (the perfect cache) must
// hit every lookup in the same cycle with the memory's data and never
// report a miss.
module tb_icache;
  import disvliw_pkg::*;

  localparam int unsigned BYTES = 16384, MISS_PENALTY = 4;
  localparam int unsigned LINES = BYTES / (4 * N_FU);

  logic clk = 1'b0, rst_n = 1'b0;
  logic req, hit, busy, miss_start, mem_req;
  logic [PC_W-1:0] pc, mem_addr;
  long_instr_t rdata, mem_rdata;

  icache #(.BYTES(BYTES), .MISS_PENALTY(MISS_PENALTY)) dut (.*);

  // perfect cache
  logic            p_hit, p_busy, p_miss_start, p_mem_req;
  logic [PC_W-1:0] p_mem_addr;
  long_instr_t     p_rdata;
  icache #(.BYTES(BYTES), .MISS_PENALTY(0)) dut_perfect (
    .clk, .rst_n, .req, .pc, .hit(p_hit), .rdata(p_rdata), .busy(p_busy),
    .miss_start(p_miss_start), .mem_req(p_mem_req), .mem_addr(p_mem_addr),
    .mem_rdata(pattern(p_mem_addr)));
  int p_checks = 0, p_fail = 0;
  always @(negedge clk) begin
    #2;
    if (rst_n && req) begin
      p_checks++;
      if (!p_hit || p_busy || p_miss_start || p_rdata !== pattern(pc)) p_fail++;
    end
  end

  always #5 clk = ~clk;

  function automatic long_instr_t pattern(logic [PC_W-1:0] a);
    long_instr_t v;
    for (int w = 0; w < $bits(long_instr_t) / 16 + 1; w++)
      v = (v << 16) | long_instr_t'(16'(a * 16'h9E37 + 16'(w) * 16'h7F4B));
    return v;
  endfunction

  assign mem_rdata = pattern(mem_addr);

  int checks = 0, failures = 0, mem_reads = 0, hits = 0, misses = 0;
  logic [PC_W-1:0] tag_model [LINES];
  logic            val_model [LINES];

  always @(posedge clk) if (mem_req) mem_reads++;

  task automatic fetch(logic [PC_W-1:0] a);
    int n = 0, reads0 = mem_reads;
    logic present;
    present = val_model[a % LINES] && tag_model[a % LINES] == a;
    @(negedge clk);
    req = 1; pc = a;
    #1;
    while (!hit) begin
      @(negedge clk);
      #1;
      n++;
      if (n > 50) break;
    end
    checks++;
    if (rdata !== pattern(a)) begin
      failures++;
      $display("FAIL data at %0d", a);
    end
    checks++;
    if (n != (present ? 0 : MISS_PENALTY + 1) || mem_reads - reads0 != (present ? 0 : 1)) begin
      failures++;
      $display("FAIL timing at %0d: %0d cycles, %0d reads, present=%b", a, n,
               mem_reads - reads0, present);
    end
    if (present) hits++; else misses++;
    val_model[a % LINES] = 1;
    tag_model[a % LINES] = a;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; pc = '0;
    foreach (val_model[i]) val_model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 40; a++) fetch(PC_W'(a));             // cold misses
    for (int a = 0; a < 40; a++) fetch(PC_W'(a));             // all hits
    fetch(PC_W'(LINES + 3));                                   // conflict evicts line 3
    fetch(PC_W'(3));                                           // miss again
    for (int t = 0; t < 300; t++) fetch(PC_W'($urandom_range(0, 3 * LINES)));
    checks += p_checks;
    failures += p_fail;
    if (p_fail != 0) $display("FAIL perfect cache: %0d of %0d lookups", p_fail, p_checks);
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
