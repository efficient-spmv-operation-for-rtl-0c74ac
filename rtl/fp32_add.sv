// fp32_add: combinational IEEE-754 single-precision adder. It is the
// accumulating adder of every step-1 lane (summing the products of one row)
// and of every merge-core output stage (summing the partial results of one
// row coming from different intermediate vectors).
//
// The operand of larger magnitude is aligned against the smaller one with
// guard, round and sticky bits; the sum or difference is normalised by a
// leading-zero count and rounded to nearest, ties to even. Subnormal inputs
// are treated as zero and tiny results flush to zero; overflow gives
// infinity. The document names the adder only; these arithmetic details are
// this design's choices.
//
// Ports: a, b (operands), y (sum). No clock.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [31:0] x, z;              // |x| >= |z|
  logic        za, zb;
  logic [7:0]  d;
  logic [26:0] mx, mz, mzs;       // 1.23 significand + guard, round, sticky
  logic [27:0] s;
  logic [4:0]  lz;
  logic signed [9:0] e;
  logic [23:0] mant;
  logic        g, r, st, rup;
  logic [24:0] mant_r;

  always_comb begin
    lz = 5'd0;
    za = (a[30:23] == 8'd0);
    zb = (b[30:23] == 8'd0);
    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    mx  = {1'b1, x[22:0], 3'b000};
    mz  = (z[30:23] == 8'd0) ? 27'd0 : {1'b1, z[22:0], 3'b000};
    d   = x[30:23] - z[30:23];
    if (d >= 8'd27) mzs = {26'd0, |mz};
    else begin
      mzs = mz >> d;
      // sticky collects every bit shifted out
      if ((mz & ((27'd1 << d) - 27'd1)) != 27'd0) mzs[0] = 1'b1;
    end
    e = 10'(signed'({2'b00, x[30:23]}));
    if (x[31] == z[31]) s = {1'b0, mx} + {1'b0, mzs};
    else                s = {1'b0, mx} - {1'b0, mzs};
    // normalise
    if (s[27]) begin
      s = {1'b0, s[27:2], s[1] | s[0]};
      e = e + 10'sd1;
    end else begin
      lz = 5'd27;
      for (int i = 0; i <= 26; i++)
        if (s[i]) lz = 5'(26 - i);
      s = s << lz;
      e = e - 10'(lz);
    end
    mant   = s[26:3];
    g      = s[2];
    r      = s[1];
    st     = s[0];
    rup    = g & (r | st | mant[0]);
    mant_r = {1'b0, mant} + 25'(rup);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e      = e + 10'sd1;
    end
    if (za && zb)                        y = {a[31] & b[31], 31'd0};
    else if (zb)                         y = a;
    else if (za)                         y = b;
    else if (x[30:23] == 8'hFF)          y = x;
    else if (s == 28'd0)                 y = 32'd0;
    else if (e >= 10'sd255)              y = {x[31], 8'hFF, 23'd0};
    else if (e <= 10'sd0)                y = {x[31], 31'd0};
    else                                 y = {x[31], e[7:0], mant_r[22:0]};
  end
endmodule
