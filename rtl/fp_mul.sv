// Single-precision floating-point multiplier of a processing element lane.
//
// IEEE 754 binary32 product, rounded to nearest even.  Simplifications,
// this design's own: denormal inputs and results are flushed to signed
// zero, an exponent overflow gives a signed infinity, and NaN/infinity
// inputs are not treated specially.  Purely combinational.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] p;
  logic [23:0] m;          // hidden bit + 23 fraction bits before rounding
  logic        g, st;
  logic [24:0] mr;
  logic signed [10:0] e;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e  = 11'(ea) + 11'(eb) - 11'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 11'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    mr = {1'b0, m} + 25'(g && (st || m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end
    if (ea == 8'd0 || eb == 8'd0 || e <= 0) y = {s, 31'd0};
    else if (e >= 255)                      y = {s, 8'hff, 23'd0};
    else                                    y = {s, e[7:0], mr[22:0]};
  end
endmodule
