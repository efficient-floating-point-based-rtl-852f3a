// tb_block_lu_full: end-to-end test of the block LU engine with every
// parameter at its default (double precision, B = 10, S = 32, NMAX = 1000,
// pipeline depths 12/19/32), decomposing a 100 x 100 matrix (10 x 10 blocks),
// the smallest problem size of the source document's latency comparison.
// See tb_blu_harness for what is checked.
module tb_block_lu_full;
  int checks, failures;
  bit finished;
  tb_blu_harness #(.DEFAULTS(1'b1), .B(10), .S(32), .NMAX(1000), .LM(12), .LS(19), .LD(32),
                   .NBLK(10), .WATCHDOG(600000)) u_h (.checks, .failures, .finished);
  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
