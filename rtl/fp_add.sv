// Single-precision floating-point adder, combinational.
// y = a + b in IEEE-754 binary32 format, rounded to nearest, ties to even.
// Simplifications: subnormal inputs are read as zero and results that
// would be subnormal are flushed to zero; an exponent overflow gives
// infinity; NaN and infinity inputs are not treated specially. The Jacobi
// engine only sees finite, normal temperatures, so these cases do not occur
// there.
// How it works: the operand with the larger magnitude is taken as the
// base; the other mantissa is shifted right by the exponent difference,
// keeping guard, round and sticky bits; the two are added or subtracted;
// the sum is renormalised (one step right, or left by its leading-zero
// count) and rounded.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    logic [31:0] big, sml;
    logic [7:0]  eb, es;
    logic [26:0] mb, ms, msh;
    logic [27:0] s;
    logic [8:0]  d;
    logic        sticky, up;
    logic [24:0] m;
    int          e, lz;

    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else                    begin big = b; sml = a; end
    eb = big[30:23];
    es = sml[30:23];
    mb = (eb == 0) ? '0 : {1'b1, big[22:0], 3'b000};
    ms = (es == 0) ? '0 : {1'b1, sml[22:0], 3'b000};
    d  = {1'b0, eb} - {1'b0, es};
    if (d >= 9'd27) begin
      msh    = '0;
      sticky = (ms != 0);
    end else begin
      msh    = ms >> d;
      sticky = ((ms & ((27'd1 << d) - 27'd1)) != 0);
    end
    msh[0] = msh[0] | sticky;
    if (big[31] == sml[31]) s = {1'b0, mb} + {1'b0, msh};
    else                    s = {1'b0, mb} - {1'b0, msh};
    e  = int'(eb);
    y  = '0;
    lz = 0;
    up = 1'b0;
    m  = '0;
    if (mb == 0) y = '0;
    else if (s == 0) y = '0;
    else begin
      if (s[27]) begin
        s = {1'b0, s[27:2], s[1] | s[0]};
        e = e + 1;
      end else begin
        lz = 0;
        for (int i = 26; i >= 0; i--) begin
          if (s[i]) break;
          lz++;
        end
        s = s << lz;
        e = e - lz;
      end
      up = s[2] && (s[1] || s[0] || s[3]);
      m  = {1'b0, s[26:3]} + 25'(up);
      if (m[24]) begin
        m = m >> 1;
        e = e + 1;
      end
      if (e <= 0)        y = '0;
      else if (e >= 255) y = {big[31], 8'hFF, 23'h0};
      else               y = {big[31], 8'(e), m[22:0]};
    end
  end
endmodule
