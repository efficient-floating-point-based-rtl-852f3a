// tb_lu_pe1: self-checking testbench for the divider PE (B = 4, S = 2,
// divider 4 stages). Checks that the input port reaches the upper path one
// cycle later, and that returning columns are finished correctly: opLU pivots
// pass as U and later rows are divided by the pivot of their own slot, opL
// rows are divided by the kept U11 diagonal, opU words pass, zero-matrix
// words are dropped, and L values also appear on the lower path. Every
// result is compared, with its tag and its LAT_DIV-cycle timing, against
// double-precision division done here.
module tb_lu_pe1;
  import blu_pkg::*;
  localparam int B = 4, S = 2, LD = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  lu_tag_t in_t, a_t, fb_t, out_t, l_t;
  logic [63:0] in_d, a_d, fb_d, out_d, l_d;
  int checks = 0, failures = 0;

  lu_pe1 #(.B(B), .S(S), .LAT_DIV(LD)) u_dut (
    .clk, .rst_n, .in_tag_i(in_t), .in_dat_i(in_d), .a_tag_o(a_t), .a_dat_o(a_d),
    .fb_tag_i(fb_t), .fb_dat_i(fb_d), .out_tag_o(out_t), .out_dat_o(out_d),
    .l_tag_o(l_t), .l_dat_o(l_d));

  typedef struct { lu_tag_t t; logic [63:0] d; bit is_l; int due; } item_t;
  item_t expq[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && out_t.valid) begin
      item_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected output %p", out_t); end
      else begin
        e = expq.pop_front();
        if (out_t !== e.t || out_d !== e.d || cyc != e.due || l_t.valid !== e.is_l ||
            (e.is_l && (l_d !== e.d || l_t !== e.t))) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %p %h (l %0d), expected %p %h at %0d",
                                      cyc, out_t, out_d, l_t.valid, e.t, e.d, e.due);
        end
      end
    end else if (rst_n && l_t.valid) begin
      checks++; failures++; $display("lower path word without output");
    end
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_fb(input lu_op_e op, input bit par, input int slot, input int row,
                        input int col, input real v, input bit keep, input bit is_l,
                        input real expect_v);
    item_t e;
    fb_t = '{valid: 1'b1, op: op, par: par, slot: 8'(slot), row: 8'(row), col: 8'(col)};
    fb_d = $realtobits(v);
    if (keep) begin
      e.t = fb_t; e.d = $realtobits(expect_v); e.is_l = is_l; e.due = cyc + LD;
      expq.push_back(e);
    end
    @(posedge clk); #1;
    fb_t = '0;
  endtask

  real a [S][B], p [S];
  initial begin
    rst_n = 1'b0; in_t = '0; fb_t = '0; in_d = '0; fb_d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // input port -> upper path, one register
    in_t = '{valid: 1'b1, op: OP_LU, par: 1'b0, slot: 8'd1, row: 8'd2, col: 8'd3};
    in_d = 64'h4008_0000_0000_0000;
    @(posedge clk); #1;
    checks++;
    if (a_t !== in_t || a_d !== in_d) begin failures++; $display("input not passed"); end
    in_t = '0;
    // opLU column 1 of two slots
    for (int s = 0; s < S; s++) for (int i = 0; i < B; i++)
      a[s][i] = real'($urandom_range(1, 1000)) / 7.0;
    for (int i = 0; i < B; i++)
      for (int s = 0; s < S; s++)
        put_fb(OP_LU, 1'b0, s, i, 1, a[s][i], 1'b1, i > 1, (i > 1) ? a[s][i] / a[s][1] : a[s][i]);
    // zero matrix words are dropped
    for (int i = 0; i < B; i++) put_fb(OP_ZERO, 1'b0, 1, i, 2, 0.0, 1'b0, 1'b0, 0.0);
    // opL column 1 uses the U11 diagonal kept from slot 0
    for (int i = 0; i < B; i++)
      put_fb(OP_L, 1'b1, 1, i, 1, real'(i + 3), 1'b1, 1'b1, real'(i + 3) / a[0][1]);
    // opU passes
    for (int i = 0; i < B; i++)
      put_fb(OP_U, 1'b1, 1, i, 0, real'(i) - 1.5, 1'b1, 1'b0, real'(i) - 1.5);
    repeat (LD + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
