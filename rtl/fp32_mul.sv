// fp32_mul: combinational IEEE-754 single-precision multiplier.
//
// Computes y = a * b with round-to-nearest-even: the 24 x 24-bit significand
// product is normalised by at most one place, then rounded using the next bit
// (guard) and the OR of the rest (sticky). Zero or subnormal operands give
// zero, subnormal results are flushed to zero, exponent overflow gives
// infinity. NaN and infinity inputs are not treated specially. Its structure
// is this design's own.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [7:0]  ea, eb;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, s, rnd;
  logic [24:0] mant_r;
  logic [9:0]  e;

  always_comb begin
    ea = a[30:23];
    eb = b[30:23];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e  = {2'b00, ea} + {2'b00, eb} - 10'd127;
    if (p[47]) begin
      m = p[47:24]; g = p[23]; s = |p[22:0];
      e = e + 10'd1;
    end else begin
      m = p[46:23]; g = p[22]; s = |p[21:0];
    end
    rnd    = g & (s | m[0]);
    mant_r = {1'b0, m} + {24'd0, rnd};
    if (mant_r[24]) begin
      mant_r = {1'b0, mant_r[24:1]};
      e      = e + 10'd1;
    end
    if (ea == 8'd0 || eb == 8'd0 || $signed(e) <= 0) y = 32'd0;
    else if ($signed(e) >= 255)                      y = {a[31] ^ b[31], 8'hFF, 23'd0};
    else                                             y = {a[31] ^ b[31], e[7:0], mant_r[22:0]};
  end

endmodule
