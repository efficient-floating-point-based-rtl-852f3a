// tb_lu_pe: self-checking testbench for one elimination PE (K = 1, B = 4,
// S = 2, multiplier 2 and subtractor 3 stages). It loads L values of column
// K on the lower path, then streams opLU, opU and opL columns on the upper
// path and compares every output word and its tag with values computed here
// (a - l*u in double precision, or the unchanged word), in stream order and
// exactly LAT_MUL+LAT_SUB cycles after the word went in. It also checks that
// the lower path forwards every word after one cycle.
module tb_lu_pe;
  import blu_pkg::*;
  localparam int B = 4, S = 2, K = 1, LM = 2, LS = 3, LPE = LM + LS;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  lu_tag_t at_i, at_o, lt_i, lt_o;
  logic [63:0] ad_i, ad_o, ld_i, ld_o;
  int checks = 0, failures = 0;

  lu_pe #(.B(B), .S(S), .K(K), .LAT_MUL(LM), .LAT_SUB(LS)) u_dut (
    .clk, .rst_n, .a_tag_i(at_i), .a_dat_i(ad_i), .a_tag_o(at_o), .a_dat_o(ad_o),
    .l_tag_i(lt_i), .l_dat_i(ld_i), .l_tag_o(lt_o), .l_dat_o(ld_o));

  typedef struct { lu_tag_t t; logic [63:0] d; int due; } item_t;
  item_t expq[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // compare upper-path output each cycle
  always @(negedge clk) begin
    if (rst_n && at_o.valid) begin
      item_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected output %p", at_o);
      end else begin
        e = expq.pop_front();
        if (at_o !== e.t || ad_o !== e.d || cyc != e.due) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %p %h, expected %p %h at %0d",
                                      cyc, at_o, ad_o, e.t, e.d, e.due);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd();
    return (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0 + 0.5;
  endfunction

  task automatic put_l(input lu_op_e op, input bit par, input int slot, input int row,
                       input int col, input real v);
    lt_i = '{valid: 1'b1, op: op, par: par, slot: 8'(slot), row: 8'(row), col: 8'(col)};
    ld_i = $realtobits(v);
    @(posedge clk); #1;
    checks++;
    if (lt_o !== lt_i || ld_o !== ld_i) begin failures++; $display("lower path not forwarded"); end
    lt_i = '0;
  endtask

  task automatic put_a(input lu_op_e op, input bit par, input int slot, input int row,
                       input int col, input real v, input real expect_v);
    item_t e;
    at_i = '{valid: 1'b1, op: op, par: par, slot: 8'(slot), row: 8'(row), col: 8'(col)};
    ad_i = $realtobits(v);
    e.t = at_i; e.d = $realtobits(expect_v); e.due = cyc + LPE;
    expq.push_back(e);
    @(posedge clk); #1;
    at_i = '0;
  endtask

  real l [S][B], lL [B], a [S][B], x [B], y [B];
  initial begin
    rst_n = 1'b0; at_i = '0; lt_i = '0; ad_i = '0; ld_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // L column K of two stacked blocks (opLU), plus a column-0 word to ignore
    for (int s = 0; s < S; s++)
      for (int i = K + 1; i < B; i++) begin
        l[s][i] = rnd();
        put_l(OP_LU, 1'b0, s, i, K, l[s][i]);
      end
    put_l(OP_LU, 1'b0, 0, 2, 0, 99.0);
    // opLU column 2 of both slots: rows > K updated, row K is u(K,2)
    for (int s = 0; s < S; s++) for (int i = 0; i < B; i++) a[s][i] = rnd();
    for (int i = 0; i < B; i++)
      for (int s = 0; s < S; s++)
        put_a(OP_LU, 1'b0, s, i, 2, a[s][i], (i > K) ? a[s][i] - l[s][i] * a[s][K] : a[s][i]);
    // opLU column 1 (= K): untouched
    for (int i = 0; i < B; i++) put_a(OP_LU, 1'b0, 0, i, K, a[0][i], a[0][i]);
    // opU column of slot 0 uses the kept L11 column (l[0][*])
    for (int i = 0; i < B; i++) x[i] = rnd();
    for (int i = 0; i < B; i++)
      put_a(OP_U, 1'b1, 0, i, 0, x[i], (i > K) ? x[i] - l[0][i] * x[K] : x[i]);
    // opL: new L column K in bank 1, then column 2 uses u11row[2] = a[0][K]
    for (int i = 0; i < B; i++) begin
      lL[i] = rnd();
      put_l(OP_L, 1'b1, 1, i, K, lL[i]);
    end
    for (int i = 0; i < B; i++) y[i] = rnd();
    for (int i = 0; i < B; i++)
      put_a(OP_L, 1'b1, 1, i, 2, y[i], y[i] - lL[i] * a[0][K]);
    // opL column K itself is not touched by step K; zero matrices pass
    for (int i = 0; i < B; i++) put_a(OP_L, 1'b1, 1, i, K, y[i], y[i]);
    for (int i = 0; i < B; i++) put_a(OP_ZERO, 1'b1, 0, i, 3, 0.0, 0.0);
    repeat (LPE + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
