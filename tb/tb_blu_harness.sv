// tb_blu_harness: end-to-end test of block_lu_top, shared by the reduced-size
// and the full-size testbench. It writes a random, diagonally dominant
// NBLK*B square matrix through the host port, runs one decomposition, reads
// the matrix back and compares every word bit for bit with a reference
// block LU computed here in the same order of double-precision operations
// (the same blocking, the same elimination order, products summed from
// k = 0 upwards before being subtracted from A22). It also checks the
// operation counts, the number of stacks and zero-matrix slots, the total
// cycle count against this design's schedule, and that every mechanism
// (zero padding, a multi-stack opL/opU phase, opMMS, U12 preloads) occurred.
// It prints the cycle count predicted by the source document's Theorem 1
// for comparison. With DEFAULTS = 1 the engine is used with its own
// parameter defaults and the other parameters here must equal them.
// With SP = 1 the engine is built in single precision with the
// reciprocator-based divider; the matrix entries are then exact single
// values, and as the divider is approximate each result word is compared
// with the double-precision reference within a tolerance instead of
// bit for bit.
module tb_blu_harness #(
  parameter bit DEFAULTS = 1'b0,
  parameter bit SP = 1'b0,
  parameter int B = 4, S = 5, NMAX = 16, LM = 2, LS = 3, LD = 4,
  parameter int NBLK = 4,
  parameter longint WATCHDOG = 200000
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int N   = NBLK * B;
  localparam int AW  = $clog2(NMAX * NMAX);
  localparam int NBW = $clog2(NMAX / B + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, host_wr_en, host_rd_en;
  logic [NBW-1:0] nblk;
  logic [AW-1:0] host_wr_addr, host_rd_addr;
  logic [63:0] host_wr_dat, host_rd_dat;
  logic [31:0] st_cyc, st_stk, st_zero, st_lu, st_l, st_u, st_mms, st_pre;

  if (DEFAULTS) begin : g_def
    block_lu_top u_dut (
      .clk, .rst_n, .start, .nblk, .busy, .done, .host_wr_en, .host_wr_addr, .host_wr_dat,
      .host_rd_en, .host_rd_addr, .host_rd_dat, .stat_cycles(st_cyc), .stat_stacks(st_stk),
      .stat_zero(st_zero), .stat_oplu(st_lu), .stat_opl(st_l), .stat_opu(st_u),
      .stat_opmms(st_mms), .stat_preload(st_pre));
  end else if (SP) begin : g_sp
    block_lu_top #(.EXP_W(8), .MAN_W(23), .USE_RECIP(1'b1), .B(B), .S(S), .NMAX(NMAX),
                   .LAT_MUL(LM), .LAT_SUB(LS), .LAT_DIV(LD)) u_dut (
      .clk, .rst_n, .start, .nblk, .busy, .done, .host_wr_en, .host_wr_addr,
      .host_wr_dat(host_wr_dat[31:0]), .host_rd_en, .host_rd_addr,
      .host_rd_dat(host_rd_dat[31:0]), .stat_cycles(st_cyc), .stat_stacks(st_stk),
      .stat_zero(st_zero), .stat_oplu(st_lu), .stat_opl(st_l), .stat_opu(st_u),
      .stat_opmms(st_mms), .stat_preload(st_pre));
    assign host_rd_dat[63:32] = '0;
  end else begin : g_red
    block_lu_top #(.B(B), .S(S), .NMAX(NMAX), .LAT_MUL(LM), .LAT_SUB(LS), .LAT_DIV(LD)) u_dut (
      .clk, .rst_n, .start, .nblk, .busy, .done, .host_wr_en, .host_wr_addr, .host_wr_dat,
      .host_rd_en, .host_rd_addr, .host_rd_dat, .stat_cycles(st_cyc), .stat_stacks(st_stk),
      .stat_zero(st_zero), .stat_oplu(st_lu), .stat_opl(st_l), .stat_opu(st_u),
      .stat_opmms(st_mms), .stat_preload(st_pre));
  end

  // exact conversions between real and binary32 (normal numbers and zero)
  function automatic logic [31:0] r2sp(input real r);
    logic [63:0] d;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    return {d[63], 8'(d[62:52] - 11'd896), d[51:29]};
  endfunction
  function automatic real sp2r(input logic [31:0] x);
    if (x[30:23] == 8'd0) return 0.0;
    return $bitstoreal({x[31], 11'(11'(x[30:23]) + 11'd896), x[22:0], 29'd0});
  endfunction

  real a [N][N];
  real rf [N][N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    finished = 1'b0;
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finished = 1'b1;
  end

  initial begin
    real t;
    longint exp_cycles, thm1, e_stk, e_zero, e_l, e_mms, e_pre, nstk, r, lu_lat, mm_lat, nb;
    int words_bad;
    checks = 0; failures = 0;
    rst_n = 1'b0; start = 1'b0; nblk = '0; host_wr_en = 1'b0; host_rd_en = 1'b0;
    host_wr_addr = '0; host_rd_addr = '0; host_wr_dat = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (SP)   // 16 significant bits: exact in binary32
          a[i][j] = (real'($urandom_range(0, 65536)) - 32768.0) / 32768.0 +
                    ((i == j) ? real'(N) : 0.0);
        else
          a[i][j] = (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0 +
                    ((i == j) ? real'(N) : 0.0);
    // ---------------- reference: the same block algorithm ----------------
    rf = a;
    for (int kb = 0; kb < NBLK; kb++) begin
      int o;
      o = kb * B;
      for (int k = 0; k < B; k++)                       // opLU
        for (int i = k + 1; i < B; i++) begin
          rf[o+i][o+k] = rf[o+i][o+k] / rf[o+k][o+k];
          for (int j = k + 1; j < B; j++)
            rf[o+i][o+j] = rf[o+i][o+j] - rf[o+i][o+k] * rf[o+k][o+j];
        end
      for (int p = kb + 1; p < NBLK; p++)               // opL
        for (int y = 0; y < B; y++)
          for (int i = 0; i < B; i++) begin
            t = rf[p*B+i][o+y];
            for (int k = 0; k < y; k++) t = t - rf[p*B+i][o+k] * rf[o+k][o+y];
            rf[p*B+i][o+y] = t / rf[o+y][o+y];
          end
      for (int q = kb + 1; q < NBLK; q++)               // opU
        for (int k = 0; k < B; k++)
          for (int i = k + 1; i < B; i++)
            for (int j = 0; j < B; j++)
              rf[o+i][q*B+j] = rf[o+i][q*B+j] - rf[o+i][o+k] * rf[o+k][q*B+j];
      for (int p = kb + 1; p < NBLK; p++)               // opMMS
        for (int q = kb + 1; q < NBLK; q++)
          for (int i = 0; i < B; i++)
            for (int j = 0; j < B; j++) begin
              t = 0.0;
              for (int k = 0; k < B; k++) t = t + rf[p*B+i][o+k] * rf[o+k][q*B+j];
              rf[p*B+i][q*B+j] = rf[p*B+i][q*B+j] - t;
            end
    end
    // ---------------- expected schedule ----------------
    nb = NBLK; lu_lat = 1 + (B - 1) * (LM + LS) + LD; mm_lat = B * (LM + LS) + LS;
    exp_cycles = 0; e_stk = 0; e_zero = 0; e_l = 0; e_mms = 0; e_pre = 0;
    for (int kb = 0; kb < NBLK; kb++) begin
      r = nb - 1 - kb;
      nstk = (2 * r + S - 1) / S;
      e_stk += 1 + nstk;
      e_zero += (S - 1) + nstk * S - 2 * r;
      e_l += r; e_mms += r * r; e_pre += r;
      exp_cycles += longint'(S) * B * B * (1 + nstk) + lu_lat + 5;
      if (r > 0) exp_cycles += r * (B * B + (r * B + 1) * B) + mm_lat + 5;
    end
    thm1 = 2 * S * B * B + B * B * ((nb * (nb - 1) * (2 * nb - 1) / 6 + S - 1) / S) * S +
           S * B * B + nb * B * S - S;
    // ---------------- load, run, read back ----------------
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        host_wr_en = 1'b1; host_wr_addr = AW'(i * NMAX + j); host_wr_dat = SP ? {32'd0, r2sp(a[i][j])} : $realtobits(a[i][j]);
        @(posedge clk); #1;
      end
    host_wr_en = 1'b0;
    nblk = NBW'(NBLK); start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check(busy === 1'b1, "busy after start");
    while (done !== 1'b1) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    check(busy === 1'b0, "idle after done");
    words_bad = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        host_rd_en = 1'b1; host_rd_addr = AW'(i * NMAX + j);
        @(posedge clk); #1;
        checks++;
        if (SP ? (sp2r(host_rd_dat[31:0]) - rf[i][j] > 1.0e-3 * (rf[i][j] < 0.0 ? -rf[i][j] : rf[i][j]) + 1.0e-4 ||
                  rf[i][j] - sp2r(host_rd_dat[31:0]) > 1.0e-3 * (rf[i][j] < 0.0 ? -rf[i][j] : rf[i][j]) + 1.0e-4)
               : (host_rd_dat !== $realtobits(rf[i][j]))) begin
          failures++; words_bad++;
          if (words_bad < 8)
            $display("FAIL: (%0d,%0d) got %h expected %h", i, j, host_rd_dat, $realtobits(rf[i][j]));
        end
      end
    host_rd_en = 1'b0;
    // ---------------- counters ----------------
    check(st_lu == 32'(NBLK), $sformatf("opLU count %0d", st_lu));
    check(st_l == 32'(e_l) && st_u == 32'(e_l), $sformatf("opL/opU counts %0d %0d", st_l, st_u));
    check(st_mms == 32'(e_mms), $sformatf("opMMS count %0d expected %0d", st_mms, e_mms));
    check(st_pre == 32'(e_pre), $sformatf("U12 preloads %0d expected %0d", st_pre, e_pre));
    check(st_stk == 32'(e_stk), $sformatf("stacks %0d expected %0d", st_stk, e_stk));
    check(st_zero == 32'(e_zero), $sformatf("zero slots %0d expected %0d", st_zero, e_zero));
    check(st_cyc == 32'(exp_cycles), $sformatf("cycles %0d expected %0d", st_cyc, exp_cycles));
    // every mechanism happened at least once
    check(st_zero > 0, "zero-matrix stacking never happened");
    if (2 * (NBLK - 1) > S)
      check(st_stk > 32'(2 * NBLK - 1), "no opL/opU phase needed more than one stack");
    check(st_mms > 0 && st_pre > 0, "opMMS never happened");
    check(st_l > 0 && st_u > 0, "opL/opU never happened");
    $display("n=%0d b=%0d s=%0d: %0d cycles (this schedule), Theorem 1 gives %0d; stacks %0d, zero slots %0d, opLU %0d, opL %0d, opU %0d, opMMS %0d",
             N, B, S, st_cyc, thm1, st_stk, st_zero, st_lu, st_l, st_u, st_mms);
    finished = 1'b1;
  end
endmodule
