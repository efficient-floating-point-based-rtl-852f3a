// lu_pe1: first PE of the LU array, the one that holds the divider.
// Its "input" port receives the stacked block stream from memory and passes
// it, after one register, to PE2 on the upper path. The words come back on
// the "from last PE" port after every elimination step has been applied;
// PE1 then finishes each column y:
//   opLU : row y is the pivot u(y,y): stored per slot (and, for slot 0, kept
//          as the U11 diagonal); rows above it are U, rows below it are
//          divided by the pivot and become L
//   opL  : every row is divided by the stored U11 diagonal entry u(y,y)
//   opU  : words pass unchanged (they are U12)
//   zero : padding matrices are dropped from the output
// Each L value is sent both to the output port and down the lower path to
// PE2..PEb. Pass-through words are delayed by the divider latency LAT_DIV so
// that the output stays in stream order.
// Timing: input -> upper path 1 cycle; return port -> output LAT_DIV cycles.
// USE_RECIP selects the divider: 0 (default, double precision) an IEEE
// divider fp_div; 1 (single precision only, EXP_W = 8, MAN_W = 23) the
// reciprocator-and-multiplier unit fp_div_recip that the source document
// uses for its single-precision engines, with LAT_DIV its total depth.
module lu_pe1
  import blu_pkg::*;
#(
  parameter int unsigned EXP_W   = 11,
  parameter int unsigned MAN_W   = 52,
  parameter int unsigned B       = 10,
  parameter int unsigned S       = 32,
  parameter int unsigned LAT_DIV = 32,
  parameter bit          USE_RECIP = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  lu_tag_t               in_tag_i,
  input  logic [EXP_W+MAN_W:0]  in_dat_i,
  output lu_tag_t               a_tag_o,     // to PE2, upper path
  output logic [EXP_W+MAN_W:0]  a_dat_o,
  input  lu_tag_t               fb_tag_i,    // from the last PE
  input  logic [EXP_W+MAN_W:0]  fb_dat_i,
  output lu_tag_t               out_tag_o,   // result stream (L and U)
  output logic [EXP_W+MAN_W:0]  out_dat_o,
  output lu_tag_t               l_tag_o,     // to PE2, lower path
  output logic [EXP_W+MAN_W:0]  l_dat_o
);
  localparam int unsigned W = 1 + EXP_W + MAN_W;

  logic [W-1:0] pivot   [S];
  logic [W-1:0] u11diag [B];

  // input port -> upper path
  always_ff @(posedge clk) begin
    if (!rst_n) a_tag_o <= '0;
    else        a_tag_o <= in_tag_i;
    a_dat_o <= in_dat_i;
  end

  // control unit for the returning column
  logic         fb_ok, is_piv, do_div, keep;
  logic [W-1:0] den;

  always_comb begin
    fb_ok  = fb_tag_i.valid && int'(fb_tag_i.row) < B && int'(fb_tag_i.col) < B &&
             int'(fb_tag_i.slot) < S;
    is_piv = 1'b0;
    do_div = 1'b0;
    keep   = 1'b0;
    den    = '0;
    if (fb_ok) begin
      unique case (fb_tag_i.op)
        OP_LU: begin
          is_piv = (fb_tag_i.row == fb_tag_i.col);
          do_div = (fb_tag_i.row > fb_tag_i.col);
          keep   = 1'b1;
          den    = pivot[fb_tag_i.slot];
        end
        OP_L: begin
          do_div = 1'b1;
          keep   = 1'b1;
          den    = u11diag[fb_tag_i.col];
        end
        OP_U:    keep = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (is_piv) begin
      pivot[fb_tag_i.slot] <= fb_dat_i;
      if (fb_tag_i.slot == '0) u11diag[fb_tag_i.col] <= fb_dat_i;
    end
  end

  logic [W-1:0] quo, pass;
  logic         div_q, keep_q;
  lu_tag_t      tag_q;

  if (USE_RECIP) begin : g_recip
    fp_div_recip #(.LAT(LAT_DIV)) u_div (.clk(clk), .a(fb_dat_i), .b(den), .y(quo));
  end else begin : g_div
    fp_div #(.EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(LAT_DIV)) u_div (
      .clk(clk), .a(fb_dat_i), .b(den), .y(quo));
  end
  delay_line #(.W(W), .LAT(LAT_DIV)) u_dpass (.clk(clk), .d(fb_dat_i), .q(pass));
  delay_line #(.W($bits(lu_tag_t) - 1), .LAT(LAT_DIV)) u_dtag (
    .clk(clk), .d(fb_tag_i[$bits(lu_tag_t)-2:0]), .q(tag_q[$bits(lu_tag_t)-2:0]));
  valid_delay #(.LAT(LAT_DIV)) u_dkeep (.clk(clk), .rst_n(rst_n), .d(keep),   .q(keep_q));
  valid_delay #(.LAT(LAT_DIV)) u_ddiv  (.clk(clk), .rst_n(rst_n), .d(do_div), .q(div_q));
  assign tag_q.valid = keep_q;

  always_comb begin
    out_tag_o = tag_q;
    out_dat_o = div_q ? quo : pass;
    l_tag_o   = tag_q;
    l_tag_o.valid = div_q;
    l_dat_o   = quo;
  end
endmodule
