// tb_pca_accel_full: one complete run of the accelerator at its default
// parameters (12 bands, blocks of 4) on a full 949 x 220 pixel image, the
// size of the 12-band hyperspectral scene the design targets, with a memory
// that never refuses and an always-ready write port. See pca_accel_bench for
// what is checked.
module tb_pca_accel_full;
  pca_accel_bench #(.NR(949 * 220), .STALLS(1'b0), .THRESH(99), .WATCHDOG(20000000)) bench ();
  initial begin
    wait (bench.finished);
    $finish;
  end
endmodule
