// tb_pca_accel: end-to-end test of the accelerator on a small 12-band image
// (300 pixels) with random stalls on memory reads and output writes. See
// pca_accel_bench for what is checked.
module tb_pca_accel;
  pca_accel_bench #(.NR(300), .STALLS(1'b1), .THRESH(99), .WATCHDOG(400000)) bench ();
  initial begin
    wait (bench.finished);
    $finish;
  end
endmodule
