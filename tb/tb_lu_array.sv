// tb_lu_array: self-checking testbench for the LU array at a reduced size
// (B = 4, S = 5, short floating-point pipelines so that the stacking rule
// S*B >= (B-1)*(LAT_MUL+LAT_SUB) + LAT_DIV + 1 still holds).
// Stack 0 holds S independent matrices, all opLU (plain stacked LU).
// Stack 1 holds opL and opU blocks that use the L11/U11 factors of slot 0
// of stack 0, followed by zero padding matrices. Every output word is
// compared bit for bit with a reference computed here in the same order of
// double-precision operations; the cycle count from first input to last
// output is checked against S*B*B per stack plus the array latency.
module tb_lu_array;
  import blu_pkg::*;
  localparam int B = 4, S = 5, LM = 2, LS = 3, LD = 4;
  localparam int LATENCY = 1 + (B - 1) * (LM + LS) + LD;
  localparam int NL = 2, NU = 2;          // opL and opU blocks in stack 1
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  lu_tag_t in_tag, out_tag;
  logic [63:0] in_dat, out_dat;
  int checks = 0, failures = 0;

  lu_array #(.B(B), .S(S), .LAT_MUL(LM), .LAT_SUB(LS), .LAT_DIV(LD)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_tag_i(in_tag), .in_dat_i(in_dat),
    .out_tag_o(out_tag), .out_dat_o(out_dat));

  real    a   [2][S][B][B];     // inputs  [stack][slot][row][col]
  real    ref_r [2][S][B][B];     // expected
  logic [63:0] got [2][S][B][B];
  bit     seen [2][S][B][B];
  lu_op_e ops [2][S];
  int     nout = 0, cyc = 0, first_in = -1, last_out = -1;

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (first_in >= 0 && out_tag.valid) begin
      got[out_tag.par][out_tag.slot][out_tag.row][out_tag.col] = out_dat;
      seen[out_tag.par][out_tag.slot][out_tag.row][out_tag.col] = 1'b1;
      nout++;
      last_out = cyc;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd();
    return (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0;
  endfunction

  initial begin
    real l, t;
    int expected_out;
    rst_n = 1'b0; in_tag = '0; in_dat = '0;
    // ---- build inputs and reference ----
    for (int m = 0; m < S; m++) begin
      ops[0][m] = OP_LU;
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++)
          a[0][m][i][j] = rnd() + ((i == j) ? 4.0 : 0.0);
    end
    for (int m = 0; m < S; m++) begin
      ops[1][m] = (m < NL) ? OP_L : (m < NL + NU) ? OP_U : OP_ZERO;
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++)
          a[1][m][i][j] = (ops[1][m] == OP_ZERO) ? 0.0 : rnd();
    end
    ref_r = a;
    for (int m = 0; m < S; m++)
      for (int k = 0; k < B; k++)
        for (int i = k + 1; i < B; i++) begin
          l = ref_r[0][m][i][k] / ref_r[0][m][k][k];
          ref_r[0][m][i][k] = l;
          for (int j = k + 1; j < B; j++) ref_r[0][m][i][j] = ref_r[0][m][i][j] - l * ref_r[0][m][k][j];
        end
    for (int m = 0; m < S; m++) begin
      if (ops[1][m] == OP_U)
        for (int k = 0; k < B; k++)
          for (int i = k + 1; i < B; i++)
            for (int j = 0; j < B; j++)
              ref_r[1][m][i][j] = ref_r[1][m][i][j] - ref_r[0][0][i][k] * ref_r[1][m][k][j];
      if (ops[1][m] == OP_L)
        for (int y = 0; y < B; y++)
          for (int i = 0; i < B; i++) begin
            t = ref_r[1][m][i][y];
            for (int k = 0; k < y; k++) t = t - ref_r[1][m][i][k] * ref_r[0][0][k][y];
            ref_r[1][m][i][y] = t / ref_r[0][0][y][y];
          end
    end
    // ---- stream both stacks, column-major, stacked ----
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int st = 0; st < 2; st++)
      for (int y = 0; y < B; y++)
        for (int i = 0; i < B; i++)
          for (int m = 0; m < S; m++) begin
            in_tag.valid = 1'b1; in_tag.op = ops[st][m]; in_tag.par = st[0];
            in_tag.slot = 8'(m); in_tag.row = 8'(i); in_tag.col = 8'(y);
            in_dat = $realtobits(a[st][m][i][y]);
            if (first_in < 0) first_in = cyc;
            @(posedge clk); #1;
          end
    in_tag = '0;
    repeat (LATENCY + 10) @(posedge clk);
    // ---- compare ----
    expected_out = (S + NL + NU) * B * B;
    checks++;
    if (nout != expected_out) begin
      failures++; $display("output count %0d expected %0d", nout, expected_out);
    end
    for (int st = 0; st < 2; st++)
      for (int m = 0; m < S; m++)
        if (ops[st][m] != OP_ZERO)
          for (int i = 0; i < B; i++)
            for (int j = 0; j < B; j++) begin
              checks++;
              if (!seen[st][m][i][j] || got[st][m][i][j] !== $realtobits(ref_r[st][m][i][j])) begin
                failures++;
                if (failures < 10)
                  $display("stack %0d slot %0d (%0d,%0d): got %h expected %h", st, m, i, j,
                           got[st][m][i][j], $realtobits(ref_r[st][m][i][j]));
              end
            end
    // rate and latency: one word per clock, last result LATENCY after last input
    checks++;
    if (last_out - first_in != 2 * S * B * B - 1 - (S - NL - NU) + LATENCY) begin
      failures++;
      $display("timing: last output at %0d cycles after first input, expected %0d",
               last_out - first_in, 2 * S * B * B - 1 - (S - NL - NU) + LATENCY);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
