// tb_dmem: random test of the perfect data memory: random writes on all
// ports (distinct words per cycle) and combinational reads on all ports,
// compared with an array model, after every word has been written once.
// Words are 8 bytes; the byte offset within a word is ignored and the
// address wraps at the memory size.
module tb_dmem;
  import disvliw_pkg::*;

  localparam int unsigned WORDS = 1024, NP = 5;

  logic clk = 1'b0;
  logic [NP-1:0] we;
  logic [NP-1:0][XLEN-1:0] addr, wdata, rdata;

  dmem #(.WORDS(WORDS), .NP(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [XLEN-1:0] m [WORDS];

  function automatic int unsigned widx(logic [XLEN-1:0] a);
    return int'((a >> 3) % WORDS);   // 8-byte words
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = 0;
    we = '0; addr = '0; wdata = '0;
    // fill every word through port 0 first
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      we[0] = 1; addr[0] = 64'(w) << 3; wdata[0] = 64'(w) * 64'h0101_0101_0101_0101;
      m[w] = wdata[0];
    end
    @(negedge clk);
    we = '0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        logic clash;
        do begin
          addr[p] = {$urandom_range(0, 63), 3'($urandom)} + (($urandom_range(0, 7) == 0) ? 64'h2000 : 0);
          clash = 0;
          for (int o = 0; o < p; o++) if (we[o] && widx(addr[o]) == widx(addr[p])) clash = 1;
        end while (clash);
        we[p] = $urandom_range(0, 2) == 0;
        wdata[p] = {$urandom, $urandom};
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (rdata[p] !== m[widx(addr[p])]) begin
          failures++;
          $display("FAIL t=%0d port %0d addr %h got %h exp %h", t, p, addr[p], rdata[p],
                   m[widx(addr[p])]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (we[p]) m[widx(addr[p])] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
