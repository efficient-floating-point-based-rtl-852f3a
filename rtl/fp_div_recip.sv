// fp_div_recip: single-precision (IEEE binary32) divider built as the source
// document builds division for its single-precision engines: an approximate
// table reciprocator (fp_recip) followed by a floating-point multiplier,
// y = a * (1/b). The reciprocal path is exact in range but carries the
// table's precision loss, so y is within a relative error of about 2^-13
// of a/b; zero, infinity and NaN behave as in fp_recip and fp_mul.
// Interface: same as fp_div at EXP_W = 8, MAN_W = 23: a and b sampled every
// clock, y after LAT cycles. The dividend waits in a delay line while the
// reciprocal is looked up (LAT_RECIP = 4 cycles, the reciprocator depth in
// the source's component table); the multiplier takes the remaining
// LAT - LAT_RECIP cycles. The default LAT = 11 uses the medium multiplier
// depth of that table (7); placing the two units in series is this design's
// reading of "a reciprocator and a multiplier".
module fp_div_recip #(
  parameter int unsigned LAT_RECIP = 4,
  parameter int unsigned LAT       = 11
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [31:0] rb, ad;

  fp_recip #(.LAT(LAT_RECIP)) u_recip (.clk(clk), .a(b), .y(rb));
  delay_line #(.W(32), .LAT(LAT_RECIP)) u_da (.clk(clk), .d(a), .q(ad));
  fp_mul #(.EXP_W(8), .MAN_W(23), .LAT(LAT - LAT_RECIP)) u_mul (
    .clk(clk), .a(ad), .b(rb), .y(y));

  initial assert (LAT > LAT_RECIP) else $error("fp_div_recip: LAT must exceed LAT_RECIP");
endmodule
