// tb_wl_table4: end-to-end run on a 30-pixel, 16-band matrix with blocks of
// 8 bands (two blocks per pixel, so no Diag RAM reload), the size used to
// compare the accelerator with other PCA designs. Random stalls on memory
// and output. See pca_accel_bench for what is checked.
module tb_wl_table4;
  pca_accel_wl_bench #(.NR(30), .STALLS(1'b1), .THRESH(99), .WATCHDOG(2000000),
                       .BANDS(16), .BLOCK(8)) bench ();
  initial begin
    wait (bench.finished);
    $finish;
  end
endmodule
