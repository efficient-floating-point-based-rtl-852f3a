// fp_div: pipelined IEEE-754 binary floating-point divider, y = a / b.
// Default format is double precision with LAT = 32 pipeline stages, the depth
// of the double-precision divider in the design's component table. The
// combinational core divides the significands to MAN_W+3 or MAN_W+4 quotient
// bits, keeps the remainder as a sticky bit and rounds to nearest even; LAT
// register stages follow. Subnormals read and produced as zero (this design's
// choice). x/0 gives a signed infinity, 0/0 and inf/inf a quiet NaN.
// Interface: a, b sampled every clock; y is the quotient LAT cycles later.
module fp_div #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52,
  parameter int unsigned LAT   = 32
) (
  input  logic                     clk,
  input  logic [EXP_W+MAN_W:0]     a,
  input  logic [EXP_W+MAN_W:0]     b,
  output logic [EXP_W+MAN_W:0]     y
);
  localparam int unsigned W    = 1 + EXP_W + MAN_W;
  localparam int unsigned EW   = EXP_W + 3;
  localparam int unsigned BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int unsigned NW   = 2 * MAN_W + 4;   // numerator width
  localparam logic [EXP_W-1:0] EMAX = '1;

  logic [W-1:0] res;

  always_comb begin
    logic              sa, sb, sr;
    logic [EXP_W-1:0]  ea, eb;
    logic [MAN_W-1:0]  fa, fb;
    logic [NW-1:0]     num, den, q, r;
    logic [MAN_W:0]    mant;
    logic              g, sticky;
    logic signed [EW-1:0] er;
    logic              nan_a, nan_b, inf_a, inf_b, z_a, z_b;

    sa = a[W-1]; ea = a[W-2:MAN_W]; fa = a[MAN_W-1:0];
    sb = b[W-1]; eb = b[W-2:MAN_W]; fb = b[MAN_W-1:0];
    sr = sa ^ sb;
    nan_a = (ea == EMAX) && (fa != '0);
    nan_b = (eb == EMAX) && (fb != '0);
    inf_a = (ea == EMAX) && (fa == '0);
    inf_b = (eb == EMAX) && (fb == '0);
    z_a = (ea == '0);
    z_b = (eb == '0);
    num = '0; den = '0; q = '0; r = '0; mant = '0; g = 1'b0; sticky = 1'b0; er = '0;
    if (nan_a || nan_b || (inf_a && inf_b) || (z_a && z_b)) begin
      res = {1'b0, EMAX, 1'b1, {(MAN_W-1){1'b0}}};
    end else if (inf_a || z_b) begin
      res = {sr, EMAX, {MAN_W{1'b0}}};
    end else if (inf_b || z_a) begin
      res = {sr, {(W-1){1'b0}}};
    end else begin
      num = NW'({1'b1, fa}) << (MAN_W + 3);
      den = NW'({1'b1, fb});
      q   = num / den;
      r   = num % den;
      er  = EW'(ea) - EW'(eb) + EW'(BIAS);
      if (q[MAN_W+3]) begin
        mant   = q[MAN_W+3:3];
        g      = q[2];
        sticky = q[1] | q[0] | (r != '0);
      end else begin
        mant   = q[MAN_W+2:2];
        g      = q[1];
        sticky = q[0] | (r != '0);
        er     = er - 1;
      end
      if (g && (sticky || mant[0])) begin
        if (mant == '1) begin
          mant = {1'b1, {MAN_W{1'b0}}};
          er = er + 1;
        end else begin
          mant = mant + 1'b1;
        end
      end
      if (er <= 0)
        res = {sr, {(W-1){1'b0}}};
      else if (er >= EW'(EMAX))
        res = {sr, EMAX, {MAN_W{1'b0}}};
      else
        res = {sr, er[EXP_W-1:0], mant[MAN_W-1:0]};
    end
  end

  delay_line #(.W(W), .LAT(LAT)) u_pipe (.clk(clk), .d(res), .q(y));
endmodule
