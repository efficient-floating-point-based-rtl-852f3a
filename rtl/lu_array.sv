// lu_array: the LU decomposition architecture, a circular linear array of B
// processing elements. PE1 (lu_pe1) holds the divider; PE2..PEB (lu_pe) each
// hold a multiplier and a subtractor and apply one elimination step. Blocks
// enter PE1 column by column, interleaved across a stack of S matrices:
// element (row i, column y) of slots 0..S-1 follow each other, then row i+1,
// and so on (column-major order, stacked). Each column flows along the upper
// path PE1 -> PE2 -> ... -> PEB, back into PE1, is finished there (pivot,
// division) and leaves on the output port; the L values also travel down
// the lower path so that PE(k+2) can eliminate with column k of L when later
// columns pass. One word is accepted every clock; a stack of S blocks takes
// S*B*B cycles to enter.
//
// Dependencies: column y+1 of a block must not reach a PE before that PE has
// received the L values of column y of the same block. That holds when
//     S*B >= (B-1)*(LAT_MUL+LAT_SUB) + LAT_DIV + 1,
// which is why stacks are filled with zero matrices when fewer than S blocks
// are available. (Defaults: 32*10 = 320 >= 9*31 + 32 + 1 = 312.)
//
// The same array performs opLU, opL and opU; a stack may mix opL and opU
// blocks. Latency from a word at the input to its result at the output:
// 1 + (B-1)*(LAT_MUL+LAT_SUB) + LAT_DIV cycles. USE_RECIP selects PE1's
// divider (see lu_pe1).
module lu_array
  import blu_pkg::*;
#(
  parameter int unsigned EXP_W   = 11,
  parameter int unsigned MAN_W   = 52,
  parameter int unsigned B       = 10,
  parameter int unsigned S       = 32,
  parameter int unsigned LAT_MUL = 12,
  parameter int unsigned LAT_SUB = 19,
  parameter int unsigned LAT_DIV = 32,
  parameter bit          USE_RECIP = 1'b0   // see lu_pe1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  lu_tag_t               in_tag_i,
  input  logic [EXP_W+MAN_W:0]  in_dat_i,
  output lu_tag_t               out_tag_o,
  output logic [EXP_W+MAN_W:0]  out_dat_o
);
  localparam int unsigned W = 1 + EXP_W + MAN_W;

  lu_tag_t      a_tag [B];
  logic [W-1:0] a_dat [B];
  lu_tag_t      l_tag [B];
  logic [W-1:0] l_dat [B];

  // a_*[j] / l_*[j] are the upper / lower path outputs of PE(j+1).
  lu_pe1 #(.EXP_W(EXP_W), .MAN_W(MAN_W), .B(B), .S(S), .LAT_DIV(LAT_DIV),
          .USE_RECIP(USE_RECIP)) u_pe1 (
    .clk(clk), .rst_n(rst_n),
    .in_tag_i(in_tag_i), .in_dat_i(in_dat_i),
    .a_tag_o(a_tag[0]), .a_dat_o(a_dat[0]),
    .fb_tag_i(a_tag[B-1]), .fb_dat_i(a_dat[B-1]),
    .out_tag_o(out_tag_o), .out_dat_o(out_dat_o),
    .l_tag_o(l_tag[0]), .l_dat_o(l_dat[0]));

  for (genvar j = 1; j < B; j++) begin : g_pe
    lu_pe #(.EXP_W(EXP_W), .MAN_W(MAN_W), .B(B), .S(S), .K(j - 1),
            .LAT_MUL(LAT_MUL), .LAT_SUB(LAT_SUB)) u_pe (
      .clk(clk), .rst_n(rst_n),
      .a_tag_i(a_tag[j-1]), .a_dat_i(a_dat[j-1]),
      .a_tag_o(a_tag[j]),   .a_dat_o(a_dat[j]),
      .l_tag_i(l_tag[j-1]), .l_dat_i(l_dat[j-1]),
      .l_tag_o(l_tag[j]),   .l_dat_o(l_dat[j]));
  end
endmodule
