// pca_accel_wl_bench: end-to-end bench of pca_accel at a chosen number of
// bands (BANDS) and block size (BLOCK), for the image sizes the accelerator
// is evaluated on. Same stimulus, reference and checks as pca_accel_bench.
module pca_accel_wl_bench #(
  parameter int  NR     = 300,
  parameter bit  STALLS = 1'b1,
  parameter int  THRESH = 95,
  parameter longint WATCHDOG = 200000,
  parameter int  BANDS  = 16,
  parameter int  BLOCK  = 8
) ();
  import pca_pkg::*;
  localparam int B     = BANDS;
  localparam int BMAX  = BLOCK;
  localparam int NB    = B / BMAX;
  localparam int NPAIR = NB * (NB - 1) / 2;
  localparam int LAT   = 2;
  localparam logic [ADDR_W-1:0] IN_BASE  = 32'h0000_1000;
  localparam logic [ADDR_W-1:0] OUT_BASE = 32'h0100_0000;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [R_W-1:0] rows;
  logic [6:0] threshold;
  logic [ADDR_W-1:0] in_base, out_base, rd_req_addr, wr_addr;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready, wr_valid, wr_ready;
  logic [B*DW-1:0] rd_rsp_data;
  y_t wr_data;
  logic [$clog2(B+1)-1:0] num_pc;
  h_t eigval [B];

  pca_accel #(.B(B), .BMAX(BMAX)) dut (.*);

  `include "pca_bench_body.svh"
endmodule
