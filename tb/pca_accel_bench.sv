// pca_accel_bench: end-to-end bench for pca_accel, used by tb_pca_accel
// (small image, random stalls everywhere) and tb_pca_accel_full (a full
// 949 x 220 pixel, 12-band image at the design's default parameters).
//
// It generates a synthetic 12-band image with three latent components plus
// noise, stores it in a behavioural external memory (one pixel per word,
// answered in order after a fixed delay, optionally refusing requests at
// random) and runs one complete PCA. Checks, each against values computed
// here independently of the design:
//   * the mean vector, exactly (floor(sum * 2^8 / R));
//   * every covariance element written by the covariance unit, exactly;
//   * the sorted eigenvalues, against a double-precision Jacobi of the same
//     covariance matrix (relative tolerance);
//   * the number of selected components L against the same reference;
//   * every output word: address, count, and value against the projection on
//     the double-precision eigenvectors (sign-aligned with the design's PCs);
//   * the covariance streaming rate, R*(NB + NB(NB-1)/2) cycles plus a small
//     margin, when nothing stalls.
// Mechanisms are counted, and one that never happened counts as a failure:
// full FIFO sets stalling the dispatcher, Diag RAM reloads, selection of
// fewer components than bands, and (with STALLS) refused memory requests and
// write-port back-pressure.
module pca_accel_bench #(
  parameter int  NR     = 300,
  parameter bit  STALLS = 1'b1,
  parameter int  THRESH = 95,
  parameter longint WATCHDOG = 200000
) ();
  import pca_pkg::*;
  localparam int B     = 12;   // the accelerator's defaults
  localparam int BMAX  = 4;
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

  pca_accel dut (.*);

  `include "pca_bench_body.svh"
endmodule
