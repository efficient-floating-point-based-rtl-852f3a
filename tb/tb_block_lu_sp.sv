// tb_block_lu_sp: end-to-end test of the block LU engine built in single
// precision with the reciprocator-and-multiplier divider, on the small
// problem of the source document's single-precision energy study: a
// 48 x 48 matrix with block size b = 4 and stack size s = 19. The pipeline
// depths are that document's medium single-precision units (multiplier 7,
// subtractor 12, reciprocator 4 + multiplier 7 = 11 for division); with
// them s = 19 satisfies the stacking rule (19*4 >= 3*19 + 11 + 1).
// Results are compared with a double-precision reference block LU within a
// tolerance; counters, cycle count and mechanisms as in tb_blu_harness.
module tb_block_lu_sp;
  int checks, failures;
  bit finished;
  tb_blu_harness #(.SP(1'b1), .B(4), .S(19), .NMAX(48), .LM(7), .LS(12), .LD(11),
                   .NBLK(12), .WATCHDOG(200000)) u_h (.checks, .failures, .finished);
  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
