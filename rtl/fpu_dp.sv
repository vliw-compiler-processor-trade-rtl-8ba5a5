// fpu_dp: IEEE 754 double-precision add, subtract and multiply
// (combinational), used by the long-latency functional units.
//
// The unit unpacks both operands, computes the exact significand sum,
// difference or product with guard, round and sticky bits, normalizes, and
// rounds to nearest, ties to even. Special operands follow IEEE 754: NaN in,
// inf - inf or 0 * inf give the canonical quiet NaN; infinities propagate;
// an exact zero difference is +0. Simplification (this design's choice):
// subnormal numbers are not supported; a subnormal operand is read as zero
// and a result below the normal range is flushed to a signed zero.
//
// The document says only that the benchmarks use double precision and that
// floating-point instructions take 1 to 32 cycles; the functional unit
// holds the result for its configured latency, this module has no clock.
module fpu_dp (
  input  logic [1:0]  op,      // 0: a+b, 1: a-b, 2: a*b
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  logic        sa, sb;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;

  assign sa = a[63];
  assign sb = b[63] ^ (op == 2'd1);
  assign ea = a[62:52];
  assign eb = b[62:52];
  assign fa = a[51:0];
  assign fb = b[51:0];
  assign za = (ea == 11'd0);
  assign zb = (eb == 11'd0);
  assign ia = (ea == 11'h7FF) && (fa == '0);
  assign ib = (eb == 11'h7FF) && (fb == '0);
  assign na = (ea == 11'h7FF) && (fa != '0);
  assign nb = (eb == 11'h7FF) && (fb != '0);

  // Round a significand with its hidden bit at m[55] and guard/round/sticky
  // in m[2:0], then pack; e is the biased exponent of m[55].
  function automatic logic [63:0] round_pack(logic s, logic signed [13:0] e, logic [55:0] m);
    logic [53:0] r;   // 1 overflow bit + 53-bit significand
    logic        up;
    logic signed [13:0] ee;
    up = m[2] && (m[1] || m[0] || m[3]);
    r  = {1'b0, m[55:3]} + 54'(up);
    ee = e;
    if (r[53]) begin
      r  = r >> 1;
      ee = ee + 14'sd1;
    end
    if (ee >= 14'sd2047) return {s, 11'h7FF, 52'h0};
    if (ee <= 14'sd0)    return {s, 63'h0};
    return {s, ee[10:0], r[51:0]};
  endfunction

  // ------------------------------------------------------------ multiply
  function automatic logic [63:0] fmul();
    logic [105:0]       p;
    logic [55:0]        m;
    logic signed [13:0] e;
    logic               s;
    s = sa ^ b[63];
    if (na || nb || (ia && zb) || (ib && za)) return QNAN;
    if (ia || ib) return {s, 11'h7FF, 52'h0};
    if (za || zb) return {s, 63'h0};
    p = {1'b1, fa} * {1'b1, fb};
    e = 14'(ea) + 14'(eb) - 14'sd1023;
    if (p[105]) begin
      m = {p[105:53], p[52], p[51], |p[50:0]};
      e = e + 14'sd1;
    end else begin
      m = {p[104:52], p[51], p[50], |p[49:0]};
    end
    return round_pack(s, e, m);
  endfunction

  // ------------------------------------------------------- add, subtract
  function automatic logic [63:0] fadd();
    logic               swap, sx, sy, s;
    logic [10:0]        ex, ey;
    logic [51:0]        fx, fy;
    logic [56:0]        mx, my, sum;
    logic [55:0]        m;
    logic [11:0]        d;
    logic               sticky;
    logic signed [13:0] e;
    int                 lz;
    if (na || nb || (ia && ib && sa != sb)) return QNAN;
    if (ia) return {sa, 11'h7FF, 52'h0};
    if (ib) return {sb, 11'h7FF, 52'h0};
    if (za && zb) return {sa & sb, 63'h0};
    if (za) return {sb, b[62:0]};
    if (zb) return a;
    swap = {eb, fb} > {ea, fa};
    sx = swap ? sb : sa;  ex = swap ? eb : ea;  fx = swap ? fb : fa;
    sy = swap ? sa : sb;  ey = swap ? ea : eb;  fy = swap ? fa : fb;
    d  = 12'(ex) - 12'(ey);
    mx = {1'b0, 1'b1, fx, 3'b000};
    my = {1'b0, 1'b1, fy, 3'b000};
    if (d >= 12'd57) begin
      sticky = 1'b1;
      my = '0;
    end else begin
      sticky = 1'b0;
      for (int i = 0; i < 57; i++)
        if (i < int'(d) && my[i]) sticky = 1'b1;
      my = my >> d;
    end
    my[0] = my[0] | sticky;
    s = sx;
    e = 14'(ex);
    if (sx == sy) begin
      sum = mx + my;
      if (sum[56]) begin
        m = {sum[56:2], sum[1] | sum[0]};
        e = e + 14'sd1;
      end else begin
        m = sum[55:0];
      end
    end else begin
      sum = mx - my;
      if (sum == '0) return 64'h0;
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      m = sum[55:0] << lz;
      e = e - 14'(lz);
    end
    return round_pack(s, e, m);
  endfunction

  always_comb begin
    if (op == 2'd2) y = fmul();
    else            y = fadd();
  end
endmodule
