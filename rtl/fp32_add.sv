// fp32_add: combinational IEEE-754 single-precision adder.
//
// Computes y = a + b with round-to-nearest-even. The operand of smaller
// magnitude is aligned to the larger with three extra bits (guard, round and
// a sticky bit collecting everything shifted further out), which is enough
// for correctly rounded additions and cancelling subtractions. A cancelling
// subtraction is renormalised by a leading-zero shift. Subnormal inputs and
// results are flushed to zero, an exact zero result is +0, and an exponent
// overflow gives infinity. NaN and infinity inputs are not treated specially:
// the decoder only sees finite data. For a - b the caller flips b's sign bit.
// Single precision is the data format of the original system; the adder's
// structure is this design's own.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey, d;
  logic [23:0] ma, mb, mx, my;
  logic [53:0] wide;
  logic [26:0] mx_ext, my_ext, ext;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic [9:0]  e;            // working exponent, two's complement
  logic [24:0] mant_r;
  logic        rnd;

  always_comb begin
    sa = a[31]; ea = a[30:23]; ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    sb = b[31]; eb = b[30:23]; mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    // x is the operand of larger magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    d      = ex - ey;
    mx_ext = {mx, 3'b000};
    if (d >= 8'd27) begin
      wide   = '0;
      my_ext = {26'd0, |my};
    end else begin
      wide   = {my, 3'b000, 27'd0} >> d;
      my_ext = wide[53:27] | {26'd0, |wide[26:0]};
    end

    e     = {2'b00, ex};
    lz    = '0;
    found = 1'b0;
    if (sx == sy) begin
      sum = {1'b0, mx_ext} + {1'b0, my_ext};
      if (sum[27]) begin
        ext = {sum[27:2], sum[1] | sum[0]};
        e   = e + 10'd1;
      end else begin
        ext = sum[26:0];
      end
    end else begin
      sum = {1'b0, mx_ext} - {1'b0, my_ext};
      ext = sum[26:0];
      for (int k = 26; k >= 0; k--) begin
        if (!found && ext[k]) begin
          lz    = 5'(26 - k);
          found = 1'b1;
        end
      end
      ext = ext << lz;
      e   = e - {5'd0, lz};
    end

    rnd    = ext[2] & (ext[1] | ext[0] | ext[3]);
    mant_r = {1'b0, ext[26:3]} + {24'd0, rnd};
    if (mant_r[24]) begin
      mant_r = {1'b0, mant_r[24:1]};
      e      = e + 10'd1;
    end

    if (ext == '0 || $signed(e) <= 0) y = 32'd0;
    else if ($signed(e) >= 255)       y = {sx, 8'hFF, 23'd0};
    else                              y = {sx, e[7:0], mant_r[22:0]};
  end

endmodule
