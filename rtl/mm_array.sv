// mm_array: the matrix-multiply architecture used by opMMS, a linear array of
// B mm_pe. PE k holds row k of U12; the tokens of lane A collect the sum
//     C(i,j) = sum over k of L21(i,k) * U12(k,j)
// as they pass PE 0, 1, ..., B-1, one product term per PE, in that order.
// Protocol (both lanes enter PE 0 in the same cycle):
//   preload : B*B words on lane B, kind MB_U, k = U12 row, j = U12 column
//   sweep   : in row slot g (B cycles, c = 0..B-1) lane B carries L21(g,c)
//             (kind MB_L, k = c) and lane A carries the token of C(g-1,c)
//             with a zero partial sum, first = (c == 0)
// A full sweep over R rows takes (R+1)*B cycles and produces R*B results,
// one per clock once the pipeline is full. Latency from a token entering to
// its result leaving: B*(LAT_MUL+LAT_SUB) cycles. No stacking is needed:
// the partial sums never wait on each other.
module mm_array
  import blu_pkg::*;
#(
  parameter int unsigned EXP_W   = 11,
  parameter int unsigned MAN_W   = 52,
  parameter int unsigned B       = 10,
  parameter int unsigned LAT_MUL = 12,
  parameter int unsigned LAT_SUB = 19
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mm_atag_t              a_tag_i,
  input  mm_btag_t              b_tag_i,
  input  logic [EXP_W+MAN_W:0]  b_dat_i,
  output mm_atag_t              c_tag_o,
  output logic [EXP_W+MAN_W:0]  c_dat_o
);
  localparam int unsigned W = 1 + EXP_W + MAN_W;

  mm_atag_t     at [B+1];
  logic [W-1:0] ad [B+1];
  mm_btag_t     bt [B+1];
  logic [W-1:0] bd [B+1];

  assign at[0] = a_tag_i;
  assign ad[0] = '0;
  assign bt[0] = b_tag_i;
  assign bd[0] = b_dat_i;

  for (genvar k = 0; k < B; k++) begin : g_pe
    mm_pe #(.EXP_W(EXP_W), .MAN_W(MAN_W), .B(B), .KIDX(k),
            .LAT_MUL(LAT_MUL), .LAT_SUB(LAT_SUB)) u_pe (
      .clk(clk), .rst_n(rst_n),
      .a_tag_i(at[k]), .a_dat_i(ad[k]), .a_tag_o(at[k+1]), .a_dat_o(ad[k+1]),
      .b_tag_i(bt[k]), .b_dat_i(bd[k]), .b_tag_o(bt[k+1]), .b_dat_o(bd[k+1]));
  end

  assign c_tag_o = at[B];
  assign c_dat_o = ad[B];
endmodule
