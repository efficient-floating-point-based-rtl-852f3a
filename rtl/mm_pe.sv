// mm_pe: one PE of the matrix-multiply array that computes C = L21 * U12
// for opMMS. PE number KIDX holds row KIDX of U12 (B words, preloaded from
// lane B) and one element of the L21 row now being processed. Lane A carries
// one token per output element C(i,j) with its partial sum; this PE adds its
// term:   psum <- psum + L(i,KIDX) * U(KIDX,j)
// with a pipelined multiplier followed by a pipelined adder (the subtractor
// with the product's sign flipped). Lane B carries the next L21 row while
// the tokens of the current row pass: each PE latches its element into
// "lnext" and moves it to "lcur" when the first token of the next row
// arrives, so the row change costs no idle cycles.
// Both lanes are delayed by the same LAT_MUL + LAT_SUB cycles, which keeps
// them in step from PE to PE. The source document only names this array
// and refers to earlier work for it; this organisation is this design's own.
module mm_pe
  import blu_pkg::*;
#(
  parameter int unsigned EXP_W   = 11,
  parameter int unsigned MAN_W   = 52,
  parameter int unsigned B       = 10,
  parameter int unsigned KIDX    = 0,
  parameter int unsigned LAT_MUL = 12,
  parameter int unsigned LAT_SUB = 19
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mm_atag_t              a_tag_i,
  input  logic [EXP_W+MAN_W:0]  a_dat_i,
  output mm_atag_t              a_tag_o,
  output logic [EXP_W+MAN_W:0]  a_dat_o,
  input  mm_btag_t              b_tag_i,
  input  logic [EXP_W+MAN_W:0]  b_dat_i,
  output mm_btag_t              b_tag_o,
  output logic [EXP_W+MAN_W:0]  b_dat_o
);
  localparam int unsigned W   = 1 + EXP_W + MAN_W;
  localparam int unsigned LPE = LAT_MUL + LAT_SUB;
  localparam int unsigned JW  = (B > 1) ? $clog2(B) : 1;

  logic [W-1:0] urow [B];
  logic [W-1:0] lnext, lcur, lsel, usel;

  always_ff @(posedge clk) begin
    if (b_tag_i.valid && b_tag_i.k == 8'(KIDX)) begin
      if (b_tag_i.kind == MB_U) begin
        if (int'(b_tag_i.j) < B) urow[JW'(b_tag_i.j)] <= b_dat_i;
      end else begin
        lnext <= b_dat_i;
      end
    end
    if (a_tag_i.valid && a_tag_i.first) lcur <= lnext;
  end

  always_comb begin
    lsel = (a_tag_i.first) ? lnext : lcur;
    usel = (int'(a_tag_i.col) < B) ? urow[JW'(a_tag_i.col)] : '0;
  end

  logic [W-1:0] prod, psum_d;
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(LAT_MUL)) u_mul (
    .clk(clk), .a(lsel), .b(usel), .y(prod));
  delay_line #(.W(W), .LAT(LAT_MUL)) u_dpsum (.clk(clk), .d(a_dat_i), .q(psum_d));
  fp_sub #(.EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(LAT_SUB)) u_add (
    .clk(clk), .a(psum_d), .b({~prod[W-1], prod[W-2:0]}), .y(a_dat_o));

  delay_line #(.W($bits(mm_atag_t) - 1), .LAT(LPE)) u_datag (
    .clk(clk), .d(a_tag_i[$bits(mm_atag_t)-2:0]), .q(a_tag_o[$bits(mm_atag_t)-2:0]));
  valid_delay #(.LAT(LPE)) u_daval (.clk(clk), .rst_n(rst_n), .d(a_tag_i.valid),
                                    .q(a_tag_o.valid));
  delay_line #(.W($bits(mm_btag_t) - 1 + W), .LAT(LPE)) u_db (
    .clk(clk), .d({b_tag_i[$bits(mm_btag_t)-2:0], b_dat_i}),
    .q({b_tag_o[$bits(mm_btag_t)-2:0], b_dat_o}));
  valid_delay #(.LAT(LPE)) u_dbval (.clk(clk), .rst_n(rst_n), .d(b_tag_i.valid),
                                    .q(b_tag_o.valid));
endmodule
