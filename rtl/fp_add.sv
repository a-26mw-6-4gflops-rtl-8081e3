// Single-precision floating-point adder of a processing element lane.
//
// IEEE 754 binary32 sum, rounded to nearest even, with guard, round and
// sticky bits.  The operand of larger magnitude is aligned against, the
// smaller one is shifted right, the mantissas are added or subtracted, the
// result is normalised and rounded.  Simplifications, this design's own:
// denormals are flushed to zero, overflow gives infinity, NaN/infinity
// inputs are not treated specially, an exact zero difference is +0.
// `sub` negates b.  Purely combinational.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  logic [31:0] x, z;                  // |x| >= |z|
  logic        sx, sz;
  logic [7:0]  d;
  logic [26:0] mx, mz, mzs;           // 1.f + guard, round, sticky
  logic [27:0] sum;
  logic [26:0] r;
  logic [24:0] mr;
  logic signed [9:0] e;
  logic [4:0]  lz;
  logic        found;

  always_comb begin
    sum = '0;
    lz = '0;
    found = 1'b0;
    x = a;
    z = {b[31] ^ sub, b[30:0]};
    if (b[30:0] > a[30:0]) begin
      x = {b[31] ^ sub, b[30:0]};
      z = a;
    end
    sx = x[31];
    sz = z[31];
    mx = (x[30:23] == 8'd0) ? 27'd0 : {1'b1, x[22:0], 3'b000};
    mz = (z[30:23] == 8'd0) ? 27'd0 : {1'b1, z[22:0], 3'b000};
    d  = x[30:23] - z[30:23];
    if (d >= 8'd27) mzs = {26'd0, |mz};
    else begin
      mzs = mz >> d;
      mzs[0] = mzs[0] | (|(mz & ((27'd1 << d) - 27'd1)));
    end
    e = 10'(x[30:23]);
    if (sx == sz) begin
      sum = {1'b0, mx} + {1'b0, mzs};
      if (sum[27]) begin
        r = sum[27:1];
        r[0] = r[0] | sum[0];
        e = e + 10'sd1;
      end else r = sum[26:0];
    end else begin
      r = mx - mzs;
      lz = 5'd0;
      found = 1'b0;
      for (int i = 26; i >= 0; i--)
        if (!found) begin
          if (r[i]) found = 1'b1;
          else      lz = lz + 5'd1;
        end
      r = r << lz;
      e = e - 10'(lz);
    end
    mr = {1'b0, r[26:3]} + 25'(r[2] && (r[1] || r[0] || r[3]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'sd1;
    end
    if (mx == 27'd0)                   y = z;
    else if (r == 27'd0 || e <= 0)     y = 32'd0;
    else if (e >= 255)                 y = {sx, 8'hff, 23'd0};
    else                               y = {sx, e[7:0], mr[22:0]};
  end
endmodule
