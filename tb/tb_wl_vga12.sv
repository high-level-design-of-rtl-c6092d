// tb_wl_vga12: end-to-end run on a 640 x 480 pixel, 12-band image with
// blocks of 3 bands (four blocks per pixel, two Diag RAM reloads per pixel),
// the image size and block size used to compare the accelerator with other
// high-level-synthesis PCA designs. See pca_accel_bench for what is checked.
module tb_wl_vga12;
  pca_accel_wl_bench #(.NR(640 * 480), .STALLS(1'b0), .THRESH(99), .WATCHDOG(40000000),
                       .BANDS(12), .BLOCK(3)) bench ();
  initial begin
    wait (bench.finished);
    $finish;
  end
endmodule
