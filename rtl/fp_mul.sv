// fp_mul: pipelined IEEE-754 binary floating-point multiplier, y = a * b.
// Default format is double precision with LAT = 12 pipeline stages, the depth
// of the double-precision multiplier in the design's component table. A
// combinational core (significand product, normalisation by at most one
// place, round-to-nearest-even) is followed by LAT register stages.
// Subnormals are read as zero and produced as zero, a choice of this design.
// Infinities and NaNs propagate; 0 * inf gives a quiet NaN.
// Interface: a, b sampled every clock; y is the product LAT cycles later.
module fp_mul #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52,
  parameter int unsigned LAT   = 12
) (
  input  logic                     clk,
  input  logic [EXP_W+MAN_W:0]     a,
  input  logic [EXP_W+MAN_W:0]     b,
  output logic [EXP_W+MAN_W:0]     y
);
  localparam int unsigned W    = 1 + EXP_W + MAN_W;
  localparam int unsigned EW   = EXP_W + 3;
  localparam int unsigned BIAS = (1 << (EXP_W - 1)) - 1;
  localparam logic [EXP_W-1:0] EMAX = '1;

  logic [W-1:0] res;

  always_comb begin
    logic              sa, sb, sr;
    logic [EXP_W-1:0]  ea, eb;
    logic [MAN_W-1:0]  fa, fb;
    logic [2*MAN_W+1:0] p;
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
    p = '0; mant = '0; g = 1'b0; sticky = 1'b0; er = '0;
    if (nan_a || nan_b || (inf_a && z_b) || (inf_b && z_a)) begin
      res = {1'b0, EMAX, 1'b1, {(MAN_W-1){1'b0}}};
    end else if (inf_a || inf_b) begin
      res = {sr, EMAX, {MAN_W{1'b0}}};
    end else if (z_a || z_b) begin
      res = {sr, {(W-1){1'b0}}};
    end else begin
      p  = {1'b1, fa} * {1'b1, fb};
      er = EW'(ea) + EW'(eb) - EW'(BIAS);
      if (p[2*MAN_W+1]) begin
        mant   = p[2*MAN_W+1:MAN_W+1];
        g      = p[MAN_W];
        sticky = |p[MAN_W-1:0];
        er     = er + 1;
      end else begin
        mant   = p[2*MAN_W:MAN_W];
        g      = p[MAN_W-1];
        sticky = |p[MAN_W-2:0];
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
