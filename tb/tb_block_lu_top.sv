// tb_block_lu_top: end-to-end test of the block LU engine at a reduced size:
// B = 4 PEs per array, stacks of S = 5 blocks, short floating-point pipelines
// (multiplier 2, subtractor 3, divider 4 stages) and a 16 x 16 matrix
// (4 x 4 blocks), so that opL/opU needs two stacks in the first iteration
// and zero padding occurs in every iteration. See tb_blu_harness.
module tb_block_lu_top;
  int checks, failures;
  bit finished;
  tb_blu_harness #(.DEFAULTS(1'b0), .B(4), .S(5), .NMAX(16), .LM(2), .LS(3), .LD(4),
                   .NBLK(4), .WATCHDOG(100000)) u_h (.checks, .failures, .finished);
  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
