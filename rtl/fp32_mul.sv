// fp32_mul: combinational IEEE-754 single-precision multiplier, the "FP
// multiplier" of each step-1 lane.
//
// The 24x24-bit significand product is normalised by at most one position and
// rounded to nearest, ties to even. Subnormal inputs are treated as zero and
// results below the normal range flush to signed zero; results above it
// become infinity. NaN is not propagated specially. The document names the
// unit only; precision, rounding and the flush-to-zero policy are this
// design's choices.
//
// Ports: a, b (operands), y (product). No clock; the lane registers around it.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        sgn;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        g, st, rup;
  logic [24:0] mant_r;
  logic signed [10:0] e;

  always_comb begin
    sgn  = a[31] ^ b[31];
    ea   = a[30:23];
    eb   = b[30:23];
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e    = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    if (prod[47]) begin
      mant = prod[47:24];
      g    = prod[23];
      st   = |prod[22:0];
      e    = e + 11'sd1;
    end else begin
      mant = prod[46:23];
      g    = prod[22];
      st   = |prod[21:0];
    end
    rup    = g & (st | mant[0]);
    mant_r = {1'b0, mant} + 25'(rup);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e      = e + 11'sd1;
    end
    if (ea == 8'd0 || eb == 8'd0)       y = {sgn, 31'd0};
    else if (ea == 8'hFF || eb == 8'hFF) y = {sgn, 8'hFF, 23'd0};
    else if (e >= 11'sd255)              y = {sgn, 8'hFF, 23'd0};
    else if (e <= 11'sd0)                y = {sgn, 31'd0};
    else                                 y = {sgn, e[7:0], mant_r[22:0]};
  end
endmodule
