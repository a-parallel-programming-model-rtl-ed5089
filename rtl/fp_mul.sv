// Single-precision floating-point multiplier, combinational.
// y = a * b in IEEE-754 binary32 format, rounded to nearest, ties to even.
// The same simplifications as the adder: subnormals are read and returned
// as zero, overflow gives infinity, NaN/infinity inputs are not special.
// How it works: the 24-bit mantissas (hidden bit included) are multiplied
// to 48 bits; the product is normalised by at most one place, the bits
// below the kept 24 give guard and sticky, and the result is rounded.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    logic [47:0] p;
    logic [23:0] k;
    logic        g, st, up;
    logic [24:0] m;
    int          e;

    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      k  = p[47:24];
      g  = p[23];
      st = (p[22:0] != 0);
      e  = e + 1;
    end else begin
      k  = p[46:23];
      g  = p[22];
      st = (p[21:0] != 0);
    end
    up = g && (st || k[0]);
    m  = {1'b0, k} + 25'(up);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (a[30:23] == 0 || b[30:23] == 0 || e <= 0) y = '0;
    else if (e >= 255) y = {a[31] ^ b[31], 8'hFF, 23'h0};
    else               y = {a[31] ^ b[31], 8'(e), m[22:0]};
  end
endmodule
