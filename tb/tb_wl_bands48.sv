// tb_wl_bands48: end-to-end run on a 300 x 300 pixel, 48-band image with
// blocks of 8 bands (six blocks per pixel, four Diag RAM reloads per pixel),
// the image used to study how block size and band count change latency.
// See pca_accel_bench for what is checked.
module tb_wl_bands48;
  pca_accel_wl_bench #(.NR(300 * 300), .STALLS(1'b0), .THRESH(99), .WATCHDOG(60000000),
                       .BANDS(48), .BLOCK(8)) bench ();
  initial begin
    wait (bench.finished);
    $finish;
  end
endmodule
