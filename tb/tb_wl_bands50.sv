// tb_wl_bands50: end-to-end run on a 100 x 100 pixel, 50-band image with
// blocks of 10 bands (five blocks per pixel, three Diag RAM reloads per
// pixel), the smallest image of the GPU and many-core comparison. See
// pca_accel_bench for what is checked.
module tb_wl_bands50;
  pca_accel_wl_bench #(.NR(100 * 100), .STALLS(1'b0), .THRESH(99), .WATCHDOG(60000000),
                       .BANDS(50), .BLOCK(10)) bench ();
  initial begin
    wait (bench.finished);
    $finish;
  end
endmodule
