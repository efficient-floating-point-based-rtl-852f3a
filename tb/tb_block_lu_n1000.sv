// tb_block_lu_n1000: end-to-end run of the block LU engine at its default
// parameters (double precision, B = 10, S = 32, NMAX = 1000, pipeline depths
// 12/19/32) on the largest matrix it holds, 1000 x 1000 (100 x 100 blocks).
// This is the largest problem size of the source document's latency table;
// the smaller sizes of that table differ only in NBLK. Every one of the
// 1,000,000 result words is compared bit-exactly with a reference block LU,
// and the operation counters and the cycle count (34,906,666) are checked.
// See tb_blu_harness for the details. Runs in a few minutes.
module tb_block_lu_n1000;
  int checks, failures;
  bit finished;
  tb_blu_harness #(.DEFAULTS(1'b1), .B(10), .S(32), .NMAX(1000), .LM(12), .LS(19), .LD(32),
                   .NBLK(100), .WATCHDOG(40000000)) u_h (.checks, .failures, .finished);
  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
