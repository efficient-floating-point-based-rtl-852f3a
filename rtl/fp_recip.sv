// fp_recip: approximate single-precision (IEEE binary32) reciprocator,
// y ~= 1/a, built from a lookup table, as used together with a multiplier
// for division in the single-precision variants of the engine. The top 13
// fraction bits of a address a table of 8192 24-bit entries; entry i holds
// round(2^24 / m), m = 1 + (i + 0.5)/2^13 being the midpoint of the interval
// of significands that share the address, so the relative error stays below
// about 2^-14. The table is filled by a loop at elaboration (ROM
// initialisation). The exponent is negated; zero gives infinity, infinity
// gives zero, NaN gives NaN, and results below the normal range flush to
// zero. The error is in precision only, not in dynamic range.
// Interface: a sampled every clock, y after LAT = 4 cycles (the depth in the
// component table of the source document). Table size and latency follow
// the document; the midpoint rounding is this design's choice.
module fp_recip #(
  parameter int unsigned LAT = 4
) (
  input  logic        clk,
  input  logic [31:0] a,
  output logic [31:0] y
);
  localparam int unsigned AB = 13;   // table address bits
  localparam int unsigned OB = 24;   // table output bits

  logic [OB-1:0] rom [1 << AB];

  initial begin
    for (int i = 0; i < (1 << AB); i++) begin
      longint den;
      den = (longint'(1) << (AB + 1)) + 2 * longint'(i) + 1;          // 2^14 * m
      rom[i] = OB'(((longint'(1) << (OB + AB + 1)) + den / 2) / den); // 2^24 / m
    end
  end

  logic [31:0]   res;
  logic [OB-1:0] v;   // bit 23 is always set: 2^23 < 2^24/m < 2^24

  always_comb begin
    logic [7:0] ea;
    ea  = a[30:23];
    v   = rom[a[22:23-AB]];
    if (ea == 8'hff)
      res = (a[22:0] != '0) ? 32'h7fc0_0000 : {a[31], 31'd0};
    else if (ea == 8'h00)
      res = {a[31], 8'hff, 23'd0};
    else if (ea >= 8'd253)
      res = {a[31], 31'd0};
    else
      res = {a[31], 8'(9'd253 - {1'b0, ea}), v[22:0]};
  end

  delay_line #(.W(32), .LAT(LAT)) u_pipe (.clk(clk), .d(res), .q(y));
endmodule
