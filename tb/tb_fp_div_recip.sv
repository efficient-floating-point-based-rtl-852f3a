// tb_fp_div_recip: self-checking testbench for the single-precision
// reciprocator-and-multiplier divider at its default depth (11 cycles).
// Random normal operands are issued one per clock; each quotient must carry
// the right sign and lie within a relative error of 2^-12 of the exact
// quotient computed with real arithmetic (table error about 2^-14 plus one
// rounding). Zero dividends, equal operands and the latency are checked too.
module tb_fp_div_recip;
  localparam int LAT = 11, N = 3000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_div_recip u_dut (.clk, .a, .b, .y);

  function automatic real sp2r(input logic [31:0] x);
    if (x[30:23] == 8'd0) return 0.0;
    return $bitstoreal({x[31], 11'(11'(x[30:23]) + 11'd896), x[22:0], 29'd0});
  endfunction

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] inq [$];
  initial begin
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        a = $urandom; a[30:23] = 8'($urandom_range(80, 170));
        b = $urandom; b[30:23] = 8'($urandom_range(80, 170));
        if (i % 10 == 3) b = a;
        if (i % 10 == 7) a = 32'h0;
        inq.push_back({a, b});
      end
      @(posedge clk); #1;
      if (i >= LAT - 1 && inq.size() > 0) begin
        logic [63:0] ab;
        real q, rel;
        ab = inq.pop_front();
        q  = sp2r(ab[63:32]) / sp2r(ab[31:0]);
        checks++;
        if (q == 0.0) begin
          if (y[30:0] != 31'd0) begin
            failures++; $display("0/%h gave %h", ab[31:0], y);
          end
        end else begin
          rel = sp2r(y) / q - 1.0;
          if (rel < 0.0) rel = -rel;
          if (rel > 1.0 / 4096.0 || y[31] != (ab[63] ^ ab[31])) begin
            failures++;
            if (failures < 10) $display("%h/%h: got %h (rel err %g)", ab[63:32], ab[31:0], y, rel);
          end
        end
      end
    end
    // latency: 6.0 / 2.0 issued once, appears after exactly LAT clocks
    a = 32'h40c0_0000; b = 32'h4000_0000;
    @(posedge clk); #1;
    a = 32'h0; b = 32'h3f80_0000;
    for (int k = 1; k < LAT - 1; k++) begin
      @(posedge clk); #1;
      checks++;
      if (y[30:23] == 8'd128) begin failures++; $display("result appeared early at %0d", k); end
    end
    @(posedge clk); #1;
    checks++;
    if (y[31:23] != 9'd128 || sp2r(y) < 2.999 || sp2r(y) > 3.001) begin
      failures++; $display("latency: got %h", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
