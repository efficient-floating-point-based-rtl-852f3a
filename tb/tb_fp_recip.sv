// tb_fp_recip: self-checking testbench for the table-based single-precision
// reciprocator. Random normal inputs are issued one per clock; each result
// must be within a relative error of 2^-13 of the exact reciprocal, must
// carry the input's sign, and its significand must equal round(2^24/m) for
// the midpoint m of the input's table interval (computed here with real
// arithmetic). Zero, infinity and the 4-cycle latency are checked too.
module tb_fp_recip;
  localparam int LAT = 4, N = 2000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, y;
  int checks = 0, failures = 0;

  fp_recip u_dut (.clk, .a, .y);

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] inq [$];
  initial begin
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        a = $urandom;
        a[30:23] = 8'($urandom_range(30, 220));
        inq.push_back(a);
      end
      @(posedge clk); #1;
      if (i >= LAT - 1 && inq.size() > 0) begin
        logic [31:0] x;
        real xr, yr, m, rel;
        longint v;
        x = inq.pop_front();
        xr = $bitstoreal({x[31], 11'(11'(x[30:23]) + 11'd896), x[22:0], 29'd0});
        yr = $bitstoreal({y[31], 11'(11'(y[30:23]) + 11'd896), y[22:0], 29'd0});
        rel = (yr * xr) - 1.0;
        if (rel < 0.0) rel = -rel;
        m = 1.0 + (real'(x[22:10]) + 0.5) / 8192.0;
        v = longint'($rtoi(16777216.0 / m + 0.5));
        checks++;
        if (rel > 1.0 / 8192.0 || y[31] != x[31] || y[22:0] != v[22:0]) begin
          failures++;
          if (failures < 10) $display("1/%h: got %h (rel err %g)", x, y, rel);
        end
      end
    end
    a = 32'h0000_0000;
    repeat (LAT - 1) @(posedge clk);
    a = 32'h7f80_0000;
    #1 checks++;
    if (y === 32'h7f80_0000) begin failures++; $display("result too early"); end
    @(posedge clk); #1;
    checks++;
    if (y !== 32'h7f80_0000) begin failures++; $display("1/0 gave %h", y); end
    repeat (LAT) @(posedge clk);
    #1 checks++;
    if (y !== 32'h0000_0000) begin failures++; $display("1/inf gave %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
