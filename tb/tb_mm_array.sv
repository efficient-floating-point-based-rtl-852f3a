// tb_mm_array: self-checking testbench for the matrix-multiply array (B = 3,
// multiplier 2 and subtractor 3 stages). It preloads a U block, sweeps a
// 6 x 3 L matrix (two blocks) with the lane protocol of the array, then
// preloads a second U block and sweeps again, and compares each product
// element C(i,j) = ((0 + L(i,0)U(0,j)) + L(i,1)U(1,j)) + ... bit for bit
// with a double-precision reference, in order, B*(LAT_MUL+LAT_SUB) cycles
// after its token entered. One result per clock during a sweep is checked
// by counting the cycles between the first and the last result.
module tb_mm_array;
  import blu_pkg::*;
  localparam int B = 3, LM = 2, LS = 3, LAT = B * (LM + LS), R = 2 * B;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  mm_atag_t at, ct;
  mm_btag_t bt;
  logic [63:0] bd, cd;
  int checks = 0, failures = 0;

  mm_array #(.B(B), .LAT_MUL(LM), .LAT_SUB(LS)) u_dut (
    .clk, .rst_n, .a_tag_i(at), .b_tag_i(bt), .b_dat_i(bd), .c_tag_o(ct), .c_dat_o(cd));

  typedef struct { logic [15:0] row; logic [7:0] col; logic [63:0] d; int due; } item_t;
  item_t expq[$];
  int cyc = 0, first_out = -1, last_out = -1;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && ct.valid) begin
      item_t e;
      checks++;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      if (expq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = expq.pop_front();
        if (ct.row !== e.row || ct.col !== e.col || cd !== e.d || cyc != e.due) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got (%0d,%0d) %h, expected (%0d,%0d) %h at %0d",
                                      cyc, ct.row, ct.col, cd, e.row, e.col, e.d, e.due);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real u [B][B], l [R][B];
  initial begin
    rst_n = 1'b0; at = '0; bt = '0; bd = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < B; k++) for (int j = 0; j < B; j++)
        u[k][j] = (real'($urandom_range(0, 2000)) - 1000.0) / 300.0;
      for (int i = 0; i < R; i++) for (int k = 0; k < B; k++)
        l[i][k] = (real'($urandom_range(0, 2000)) - 1000.0) / 700.0;
      // preload
      for (int k = 0; k < B; k++)
        for (int j = 0; j < B; j++) begin
          bt = '{valid: 1'b1, kind: MB_U, k: 8'(k), j: 8'(j)}; bd = $realtobits(u[k][j]);
          @(posedge clk); #1;
        end
      // sweep
      for (int g = 0; g <= R; g++)
        for (int c = 0; c < B; c++) begin
          bt = '0; at = '0; bd = '0;
          if (g < R) begin
            bt = '{valid: 1'b1, kind: MB_L, k: 8'(c), j: 8'd0}; bd = $realtobits(l[g][c]);
          end
          if (g > 0) begin
            item_t e;
            real t;
            at = '{valid: 1'b1, first: (c == 0), row: 16'(g - 1), col: 8'(c)};
            t = 0.0;
            for (int k = 0; k < B; k++) t = t + l[g-1][k] * u[k][c];
            e.row = 16'(g - 1); e.col = 8'(c); e.d = $realtobits(t); e.due = cyc + LAT;
            expq.push_back(e);
          end
          @(posedge clk); #1;
        end
      bt = '0; at = '0;
      repeat (LAT + 2) @(posedge clk);
      #1;
      checks++;
      if (last_out - first_out != R * B - 1) begin
        failures++; $display("sweep results spread over %0d cycles", last_out - first_out + 1);
      end
      first_out = -1;
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
