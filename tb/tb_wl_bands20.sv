// tb_wl_bands20: end-to-end run on a 300 x 300 pixel, 20-band image with
// blocks of 10 bands, one of the image sizes used to compare the accelerator
// with GPU and many-core implementations. See pca_accel_bench for what is
// checked.
module tb_wl_bands20;
  pca_accel_wl_bench #(.NR(300 * 300), .STALLS(1'b0), .THRESH(99), .WATCHDOG(20000000),
                       .BANDS(20), .BLOCK(10)) bench ();
  initial begin
    wait (bench.finished);
    $finish;
  end
endmodule
