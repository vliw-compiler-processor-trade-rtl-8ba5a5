// tb_fpu_dp: checks the double-precision add/subtract/multiply datapath
// against the simulator's own IEEE 754 double arithmetic ($bitstoreal,
// $realtobits), which rounds to nearest even.
//
// Operands are random doubles with exponents kept well inside the normal
// range, so no result is subnormal (the datapath flushes those to zero, the
// reference would not). Extra directed cases: equal exponents with close
// significands (deep cancellation), exact cancellation (+0), large exponent
// gaps (sticky only), zeros, infinities and NaNs. NaN results are compared
// by class only, because the reference may keep a payload.
module tb_fpu_dp;
  logic [1:0]  op;
  logic [63:0] a, b, y;

  fpu_dp dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd_double(int emin, int emax);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'($urandom_range(emin, emax));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  function automatic logic [63:0] ref_result(logic [1:0] o, logic [63:0] x, logic [63:0] z);
    real rx, rz;
    rx = $bitstoreal(x);
    rz = $bitstoreal(z);
    case (o)
      2'd0:    return $realtobits(rx + rz);
      2'd1:    return $realtobits(rx - rz);
      default: return $realtobits(rx * rz);
    endcase
  endfunction

  function automatic bit is_nan(logic [63:0] v);
    return v[62:52] == 11'h7FF && v[51:0] != 0;
  endfunction

  task automatic run(logic [1:0] o, logic [63:0] x, logic [63:0] z);
    logic [63:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_result(o, x, z);
    checks++;
    if (is_nan(e) ? !is_nan(y) : (y !== e)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op %0d a %h b %h got %h exp %h", o, x, z, y, e);
    end
  endtask

  localparam logic [63:0] PINF = 64'h7FF0_0000_0000_0000;
  localparam logic [63:0] NINF = 64'hFFF0_0000_0000_0000;
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] ONE  = 64'h3FF0_0000_0000_0000;

  initial begin
    logic [63:0] x, z;
    // random operands over a wide exponent range
    for (int i = 0; i < 40000; i++) begin
      x = rnd_double(600, 1400);
      z = rnd_double(600, 1400);
      run(2'($urandom_range(0, 2)), x, z);
    end
    // close exponents, both signs: alignment by 0..3 and cancellation
    for (int i = 0; i < 40000; i++) begin
      x = rnd_double(1000, 1003);
      z = rnd_double(1000, 1003);
      if (i % 4 == 0) z[51:20] = x[51:20];
      run(2'($urandom_range(0, 1)), x, z);
    end
    // large exponent gaps (only sticky bits survive)
    for (int i = 0; i < 5000; i++) begin
      x = rnd_double(1000, 1000);
      z = rnd_double(900, 960);
      run(2'($urandom_range(0, 1)), x, z);
      run(2'($urandom_range(0, 1)), z, x);
    end
    // ties: 1 + 2^-53 style halfway cases
    for (int i = 0; i < 2000; i++) begin
      x = rnd_double(1023, 1023);
      z = {1'b0, 11'(1023 - 53), 52'h0};
      run(2'd0, x, z);
      run(2'd1, x, z);
    end
    // specials
    run(2'd0, ONE, {1'b1, ONE[62:0]});    // exact zero: +0
    run(2'd1, ONE, ONE);
    run(2'd0, 64'h0, 64'h8000_0000_0000_0000);
    run(2'd0, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    run(2'd2, 64'h8000_0000_0000_0000, ONE);
    run(2'd0, PINF, ONE);
    run(2'd0, PINF, NINF);
    run(2'd1, PINF, PINF);
    run(2'd2, PINF, 64'h0);
    run(2'd2, NINF, ONE);
    run(2'd0, QNAN, ONE);
    run(2'd2, ONE, QNAN);
    run(2'd2, 64'h7FE0_0000_0000_0000, 64'h7FE0_0000_0000_0000);  // overflow to inf
    run(2'd0, 64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF);
    run(2'd0, 64'h0, ONE);
    run(2'd1, 64'h0, ONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
