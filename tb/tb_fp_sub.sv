// tb_fp_sub: self-checking testbench for fp_sub at its default double-precision
// format and pipeline depth. Random normal operands (exponents kept well
// inside the normal range, plus operands that nearly cancel, equal values,
// zeros and sign mixes) are issued one per clock; each result is compared
// bit for bit with the simulator's own IEEE double arithmetic, and the
// pipeline depth is checked by counting the cycles from issue to result.
module tb_fp_sub;
  localparam int LAT = 19;
  localparam int N   = 3000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [63:0] a, b, y;
  logic [63:0] exp_q [$];
  int checks = 0, failures = 0;
  int cyc = 0;

  fp_sub u_dut (.clk(clk), .a(a), .b(b), .y(y));

  function automatic logic [63:0] rnd_double(input int span);
    logic [63:0] v;
    v = {$urandom, $urandom};
    v[62:52] = 11'(1023 - span + int'($urandom_range(0, 2 * span)));
    return v;
  endfunction

  initial begin : watchdog
    repeat (N + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb;
    logic [63:0] e;
    a = '0; b = '0;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        a = rnd_double(40);
        case (i % 6)
          0: b = rnd_double(40);
          1: b = {a[63:20], 20'($urandom)};                 // near cancellation
          2: b = a;                                           // exact cancellation / 1.0
          3: b = {a[63], 11'(a[62:52] - 11'($urandom_range(0, 60))), 52'({$urandom, $urandom})};
          4: b = (i % 12 == 4) ? 64'h0 : rnd_double(3);
          default: b = {~a[63], rnd_double(2)[62:0]};
        endcase
        if ($bitstoreal(b) == 0.0 && "sub" == "div") b = 64'h3ff0000000000000;
        ra = $bitstoreal(a); rb = $bitstoreal(b);
        e = $realtobits(ra - rb);
        exp_q.push_back(e);
      end
      @(posedge clk); #1;
      cyc++;
      if (cyc >= LAT && exp_q.size() > 0 && i >= LAT - 1) begin
        e = exp_q.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("MISMATCH cycle %0d got %h expected %h", cyc, y, e);
        end
      end
    end
    // latency check: a marker operand appears after exactly LAT clocks
    a = 64'h4000000000000000; b = 64'h3ff0000000000000;
    @(posedge clk); #1;
    a = 64'h0; b = 64'h3ff0000000000000;
    ra = $bitstoreal(64'h4000000000000000); rb = 1.0;
    e = $realtobits(ra - rb);
    for (int k = 1; k < LAT - 1; k++) begin
      @(posedge clk); #1;
      checks++;
      if (y === e) begin failures++; $display("result appeared early at %0d", k); end
    end
    @(posedge clk); #1;
    checks++;
    if (y !== e) begin failures++; $display("latency: got %h expected %h", y, e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
