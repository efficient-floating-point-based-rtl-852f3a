// fp_sub: pipelined IEEE-754 binary floating-point subtractor, y = a - b
// (an adder when the caller flips the sign of b). Default format is double
// precision (11-bit exponent, 52-bit fraction) with LAT = 19 pipeline stages,
// the depth of the double-precision subtractor in the design's component
// table. The result is computed by a combinational core and then passed
// through LAT register stages; synthesis retiming is expected to spread the
// core over those stages. Rounding is round-to-nearest-even. Subnormal inputs
// are read as zero and subnormal results are flushed to zero (a choice of
// this design; the source document does not discuss subnormals). Infinities
// and NaNs propagate; inf - inf gives a quiet NaN.
// Interface: a, b sampled every clock; y is the difference LAT cycles later.
module fp_sub #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52,
  parameter int unsigned LAT   = 19
) (
  input  logic                     clk,
  input  logic [EXP_W+MAN_W:0]     a,
  input  logic [EXP_W+MAN_W:0]     b,
  output logic [EXP_W+MAN_W:0]     y
);
  localparam int unsigned W   = 1 + EXP_W + MAN_W;
  localparam int unsigned MW  = MAN_W + 4;        // hidden bit + fraction + guard, round, sticky
  localparam int unsigned EW  = EXP_W + 2;        // signed working exponent
  localparam logic [EXP_W-1:0] EMAX = '1;

  logic [W-1:0] res;

  always_comb begin
    logic              sa, sb, sx, sy, sr;
    logic [EXP_W-1:0]  ea, eb, ex, ey;
    logic [MAN_W-1:0]  fa, fb;
    logic [MW-1:0]     mx, my, my_sh;
    logic [2*MW-1:0]   wide;
    logic [MW:0]       sum;
    logic [MW-1:0]     norm;
    logic              sticky, g, rest, lsb;
    logic signed [EW-1:0] er;
    logic [MAN_W:0]    mant;
    int unsigned       d, lz;
    logic              za, zb;

    sa = a[W-1]; ea = a[W-2:MAN_W]; fa = a[MAN_W-1:0];
    sb = ~b[W-1]; eb = b[W-2:MAN_W]; fb = b[MAN_W-1:0];
    za = (ea == '0); zb = (eb == '0);
    res = '0;
    sum = '0; norm = '0; mant = '0; er = '0; lz = 0; d = 0;
    sx = 1'b0; sy = 1'b0; ex = '0; ey = '0; mx = '0; my = '0; my_sh = '0; wide = '0;
    sticky = 1'b0; g = 1'b0; rest = 1'b0; lsb = 1'b0; sr = 1'b0;

    if (ea == EMAX || eb == EMAX) begin
      // special operands: NaN, or infinities
      if ((ea == EMAX && fa != '0) || (eb == EMAX && fb != '0))
        res = {1'b0, EMAX, 1'b1, {(MAN_W-1){1'b0}}};
      else if (ea == EMAX && eb == EMAX)
        res = (sa == sb) ? {sa, EMAX, {MAN_W{1'b0}}} : {1'b0, EMAX, 1'b1, {(MAN_W-1){1'b0}}};
      else if (ea == EMAX)
        res = {sa, EMAX, {MAN_W{1'b0}}};
      else
        res = {sb, EMAX, {MAN_W{1'b0}}};
    end else if (za && zb) begin
      res = {sa & sb, {(W-1){1'b0}}};
    end else if (zb) begin
      res = a;
    end else if (za) begin
      res = {sb, b[W-2:0]};
    end else begin
      // order the operands so that |x| >= |y|
      if ({ea, fa} >= {eb, fb}) begin
        sx = sa; ex = ea; mx = {1'b1, fa, 3'b000};
        sy = sb; ey = eb; my = {1'b1, fb, 3'b000};
      end else begin
        sx = sb; ex = eb; mx = {1'b1, fb, 3'b000};
        sy = sa; ey = ea; my = {1'b1, fa, 3'b000};
      end
      d = int'(ex) - int'(ey);
      if (d >= MW) begin
        my_sh = '0;
        sticky = 1'b1;
      end else begin
        wide = {my, {MW{1'b0}}} >> d;
        my_sh = wide[2*MW-1:MW];
        sticky = |wide[MW-1:0];
      end
      my_sh[0] = my_sh[0] | sticky;
      sr = sx;
      if (sx == sy) sum = {1'b0, mx} + {1'b0, my_sh};
      else          sum = {1'b0, mx} - {1'b0, my_sh};
      er = EW'(ex);
      if (sum == '0) begin
        res = '0;
      end else begin
        if (sum[MW]) begin
          norm = sum[MW:1];
          norm[0] = norm[0] | sum[0];
          er = er + 1;
        end else begin
          lz = 0;
          for (int i = MW - 1; i >= 0; i--) begin
            if (sum[i]) break;
            lz++;
          end
          norm = sum[MW-1:0] << lz;
          er = er - EW'(lz);
        end
        lsb  = norm[3];
        g    = norm[2];
        rest = norm[1] | norm[0];
        mant = norm[MW-1:3];
        if (g && (rest || lsb)) begin
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
  end

  delay_line #(.W(W), .LAT(LAT)) u_pipe (.clk(clk), .d(res), .q(y));
endmodule
