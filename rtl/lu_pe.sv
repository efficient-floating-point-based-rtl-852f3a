// lu_pe: elimination processing element PE(K+2) of the LU array (the PEs
// after the divider PE). It applies elimination step K to every column that
// streams past on the upper path:
//     a(i,y) <- a(i,y) - l(i,K) * u(K,y)        for rows i > K
// using a pipelined multiplier followed by a pipelined subtractor, as in the
// PE drawn in the source document. Words that the step does not touch are
// delayed by the same LPE = LAT_MUL + LAT_SUB cycles so that the stream stays
// in order.
//
// Storage (the PE's BRAM) and its address generator:
//   lwork[bank][slot][row] L column K of every block of the current stack,
//                          written from the lower path, two banks selected by
//                          stack parity (double buffering)
//   l11[row], u11row[col]  column K of L11 and row K of U11, kept from the
//                          opLU of slot 0 for the opU and opL that follow
//   ureg[slot]             u(K,y) of the column now passing, per slot
// What is multiplied depends on the tag's operation:
//   opLU : columns y > K, rows i > K : lwork * ureg
//   opU  : all columns,   rows i > K : l11   * ureg
//   opL  : columns y > K, all rows   : lwork * u11row[y]
// The lower path carries L values from the divider PE towards the end of
// the array; each PE picks up those of column K and forwards all of them
// after one register.
// Timing: upper path in->out LPE cycles, lower path 1 cycle. Storage writes
// happen on the clock edge after the word is seen; a word that must read an
// L value has to arrive later than that, which the stack size guarantees.
// The split of storage into work, L11 and U11 parts is this design's own.
module lu_pe
  import blu_pkg::*;
#(
  parameter int unsigned EXP_W   = 11,
  parameter int unsigned MAN_W   = 52,
  parameter int unsigned B       = 10,
  parameter int unsigned S       = 32,
  parameter int unsigned K       = 0,
  parameter int unsigned LAT_MUL = 12,
  parameter int unsigned LAT_SUB = 19
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  lu_tag_t               a_tag_i,
  input  logic [EXP_W+MAN_W:0]  a_dat_i,
  output lu_tag_t               a_tag_o,
  output logic [EXP_W+MAN_W:0]  a_dat_o,
  input  lu_tag_t               l_tag_i,
  input  logic [EXP_W+MAN_W:0]  l_dat_i,
  output lu_tag_t               l_tag_o,
  output logic [EXP_W+MAN_W:0]  l_dat_o
);
  localparam int unsigned W   = 1 + EXP_W + MAN_W;
  localparam int unsigned LPE = LAT_MUL + LAT_SUB;
  localparam int unsigned AW  = $clog2(2 * S * B);

  logic [W-1:0] lwork  [2*S*B];
  logic [W-1:0] l11    [B];
  logic [W-1:0] u11row [B];
  logic [W-1:0] ureg   [S];

  // address generator: bank, slot and row of an L value
  function automatic logic [AW-1:0] laddr(input logic par, input logic [7:0] slot,
                                          input logic [7:0] row);
    return AW'((int'(par) * S + int'(slot)) * B + int'(row));
  endfunction

  // ---------------- lower path: capture column K, forward ----------------
  always_ff @(posedge clk) begin
    if (l_tag_i.valid && l_tag_i.col == 8'(K) && int'(l_tag_i.row) < B &&
        int'(l_tag_i.slot) < S) begin
      lwork[laddr(l_tag_i.par, l_tag_i.slot, l_tag_i.row)] <= l_dat_i;
      if (l_tag_i.op == OP_LU && l_tag_i.slot == '0)
        l11[l_tag_i.row] <= l_dat_i;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) l_tag_o <= '0;
    else        l_tag_o <= l_tag_i;
    l_dat_o <= l_dat_i;
  end

  // ---------------- upper path: control unit ----------------
  logic         in_ok, is_urow, do_op;
  logic [W-1:0] m_a, m_b;

  always_comb begin
    in_ok   = a_tag_i.valid && int'(a_tag_i.row) < B && int'(a_tag_i.col) < B &&
              int'(a_tag_i.slot) < S;
    is_urow = 1'b0;
    do_op   = 1'b0;
    m_a     = '0;
    m_b     = '0;
    if (in_ok) begin
      unique case (a_tag_i.op)
        OP_LU: begin
          is_urow = (a_tag_i.row == 8'(K)) && (a_tag_i.col > 8'(K));
          do_op   = (a_tag_i.row > 8'(K))  && (a_tag_i.col > 8'(K));
          m_a     = lwork[laddr(a_tag_i.par, a_tag_i.slot, a_tag_i.row)];
          m_b     = ureg[a_tag_i.slot];
        end
        OP_U: begin
          is_urow = (a_tag_i.row == 8'(K));
          do_op   = (a_tag_i.row > 8'(K));
          m_a     = l11[a_tag_i.row];
          m_b     = ureg[a_tag_i.slot];
        end
        OP_L: begin
          do_op   = (a_tag_i.col > 8'(K));
          m_a     = lwork[laddr(a_tag_i.par, a_tag_i.slot, a_tag_i.row)];
          m_b     = u11row[a_tag_i.col];
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (is_urow) begin
      ureg[a_tag_i.slot] <= a_dat_i;
      if (a_tag_i.op == OP_LU && a_tag_i.slot == '0)
        u11row[a_tag_i.col] <= a_dat_i;
    end
  end

  // ---------------- upper path: multiplier, subtractor ----------------
  logic [W-1:0] prod, minuend, diff, pass;
  logic         do_op_q;

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(LAT_MUL)) u_mul (
    .clk(clk), .a(m_a), .b(m_b), .y(prod));
  delay_line #(.W(W), .LAT(LAT_MUL)) u_dmin (.clk(clk), .d(a_dat_i), .q(minuend));
  fp_sub #(.EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(LAT_SUB)) u_sub (
    .clk(clk), .a(minuend), .b(prod), .y(diff));

  delay_line #(.W(W), .LAT(LPE)) u_dpass (.clk(clk), .d(a_dat_i), .q(pass));
  delay_line #(.W($bits(lu_tag_t) - 1), .LAT(LPE)) u_dtag (
    .clk(clk), .d(a_tag_i[$bits(lu_tag_t)-2:0]), .q(a_tag_o[$bits(lu_tag_t)-2:0]));
  valid_delay #(.LAT(LPE)) u_dval (.clk(clk), .rst_n(rst_n), .d(a_tag_i.valid),
                                   .q(a_tag_o.valid));
  valid_delay #(.LAT(LPE)) u_dop  (.clk(clk), .rst_n(rst_n), .d(do_op), .q(do_op_q));

  assign a_dat_o = do_op_q ? diff : pass;
endmodule
