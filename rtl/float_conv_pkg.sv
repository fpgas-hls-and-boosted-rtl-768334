// float_conv_pkg: conversions between IEEE-754 single precision and the
// signed fixed-point format of the BDT datapath.
//
// The accelerator's memory holds 32-bit floats; the datapath works on
// fixed point with FRAC fraction bits.
//   float_to_fixed : value is truncated towards minus infinity to a multiple
//                    of 2**-FRAC and wrapped (two's complement) into W bits -
//                    the default truncate/wrap behaviour of the usual HLS
//                    fixed-point type.  Zero, denormals, infinities and NaN
//                    give 0.
//   fixed_to_float : exact for any W-bit value with W <= 24 significant bits
//                    (no rounding is needed).
// Both are pure combinational functions; this package is this design's own
// support code, not a block of the conifer reference design.
package float_conv_pkg;

  function automatic logic signed [63:0] float_to_fixed(logic [31:0] f, int frac);
    logic        sgn;
    int          e;
    logic [63:0] mant;
    logic [63:0] mag;
    logic        lost;
    int          sh;
    sgn  = f[31];
    e    = int'(f[30:23]);
    mant = {40'd0, 1'b1, f[22:0]};
    if (e == 0 || e == 255) return '0;
    // value = mant * 2**(e - 127 - 23); raw = value * 2**frac
    sh = e - 150 + frac;
    if (sh >= 0) begin
      mag  = (sh > 40) ? 64'd0 : (mant << sh);
      lost = 1'b0;
    end else if (sh > -64) begin
      mag  = mant >> (-sh);
      lost = (mant & ((64'd1 << (-sh)) - 64'd1)) != 0;
    end else begin
      mag  = 64'd0;
      lost = 1'b1;
    end
    if (!sgn) return $signed(mag);
    return -$signed(mag) - (lost ? 64'sd1 : 64'sd0);
  endfunction

  function automatic logic [31:0] fixed_to_float(logic signed [63:0] v, int frac);
    logic        sgn;
    logic [63:0] mag;
    int          p;
    logic [63:0] norm;
    if (v == 0) return 32'd0;
    sgn = v[63];
    mag = sgn ? 64'(-v) : 64'(v);
    p = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) p = i;
    // mantissa: the 23 bits below the leading one
    norm = (p >= 23) ? (mag >> (p - 23)) : (mag << (23 - p));
    return {sgn, 8'(p - frac + 127), norm[22:0]};
  endfunction

endpackage
