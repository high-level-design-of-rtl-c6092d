// pca_accel: flexible PCA accelerator with block-streaming covariance.
//
// Computes Y = (X - M) * PC for an R x B input matrix X held in external
// memory (R = rows pixels, B bands), where M repeats the column means and PC
// holds the eigenvectors of the covariance matrix that carry at least
// threshold percent of the total energy. Structure:
//
//   dispatcher --Mean FIFOs--> mean_unit --> mean_mem --+--> cov_unit
//              --Diag FIFOs--------------------------> cov_unit --> evd_jacobi
//              --Off FIFOs---------------------------> cov_unit      |
//              --PU FIFOs----> proj_unit <-- sort_select <-----------+
//
// Each FIFO set is BMAX FIFOs wide, i.e. one block of BMAX bands per transfer.
// The dispatcher and the PCA core run concurrently: the dispatcher streams
// the data three times (for the mean, the covariance and the projection) and
// stalls on full FIFOs, while the core runs its units in sequence: mean, then
// covariance, then EVD (two-sided Jacobi), then sort and select, then
// projection, which writes Y row by row to out_base + r*L + l.
//
// Interface: pulse start for one cycle with rows (>= 2), threshold (percent),
// in_base and out_base stable until done pulses. num_pc gives L and eigval the
// sorted eigenvalues once the projection has started. The memory ports are
// valid/ready channels: reads return one pixel (B*DW bits) per word, in
// request order; writes carry one Y_W-bit result each.
//
// The block diagram, the unit order, the block-streaming method and the
// Jacobi EVD follow the fixed-point version of the accelerator; FIFO depths,
// handshakes, number formats and memory layout are this implementation's
// choices. B must be a multiple of BMAX.
module pca_accel #(
  parameter int B          = 12,
  parameter int BMAX       = 4,
  parameter int FIFO_DEPTH = 4,
  parameter int SWEEPS     = B
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [pca_pkg::R_W-1:0]      rows,
  input  logic [6:0]                   threshold,
  input  logic [pca_pkg::ADDR_W-1:0]   in_base,
  input  logic [pca_pkg::ADDR_W-1:0]   out_base,
  output logic                         rd_req_valid,
  input  logic                         rd_req_ready,
  output logic [pca_pkg::ADDR_W-1:0]   rd_req_addr,
  input  logic                         rd_rsp_valid,
  output logic                         rd_rsp_ready,
  input  logic [B*pca_pkg::DW-1:0]     rd_rsp_data,
  output logic                         wr_valid,
  input  logic                         wr_ready,
  output logic [pca_pkg::ADDR_W-1:0]   wr_addr,
  output pca_pkg::y_t                  wr_data,
  output logic [$clog2(B+1)-1:0]       num_pc,
  output pca_pkg::h_t                  eigval [B],
  output logic                         busy,
  output logic                         done
);
  import pca_pkg::*;

  if (B % BMAX != 0) begin : g_bad_block
    $error("B must be a multiple of BMAX");
  end

  // ---------------- dispatcher and FIFO sets ----------------
  logic            m_in_v, m_in_r, d_in_v, d_in_r, o_in_v, o_in_r, p_in_v, p_in_r;
  logic [DW-1:0]   blk_data [BMAX];
  logic            m_v, m_r, d_v, d_r, o_v, o_r, p_v, p_r;
  logic [DW-1:0]   m_data [BMAX], d_data [BMAX], o_data [BMAX], p_data [BMAX];
  phase_e          disp_phase;
  logic            disp_busy, disp_done;

  dispatcher #(.B(B), .BMAX(BMAX)) u_disp (
    .clk, .rst_n, .start, .rows, .in_base,
    .rd_req_valid, .rd_req_ready, .rd_req_addr,
    .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
    .mean_valid(m_in_v), .mean_ready(m_in_r),
    .diag_valid(d_in_v), .diag_ready(d_in_r),
    .off_valid (o_in_v), .off_ready (o_in_r),
    .pu_valid  (p_in_v), .pu_ready  (p_in_r),
    .blk_data, .phase(disp_phase), .busy(disp_busy), .done(disp_done)
  );

  fifo_set #(.BMAX(BMAX), .DEPTH(FIFO_DEPTH)) u_mean_fifos (
    .clk, .rst_n, .in_valid(m_in_v), .in_ready(m_in_r), .in_data(blk_data),
    .out_valid(m_v), .out_ready(m_r), .out_data(m_data));
  fifo_set #(.BMAX(BMAX), .DEPTH(FIFO_DEPTH)) u_diag_fifos (
    .clk, .rst_n, .in_valid(d_in_v), .in_ready(d_in_r), .in_data(blk_data),
    .out_valid(d_v), .out_ready(d_r), .out_data(d_data));
  fifo_set #(.BMAX(BMAX), .DEPTH(FIFO_DEPTH)) u_off_fifos (
    .clk, .rst_n, .in_valid(o_in_v), .in_ready(o_in_r), .in_data(blk_data),
    .out_valid(o_v), .out_ready(o_r), .out_data(o_data));
  fifo_set #(.BMAX(BMAX), .DEPTH(FIFO_DEPTH)) u_pu_fifos (
    .clk, .rst_n, .in_valid(p_in_v), .in_ready(p_in_r), .in_data(blk_data),
    .out_valid(p_v), .out_ready(p_r), .out_data(p_data));

  // ---------------- PCA core ----------------
  logic                 mean_we, mean_busy, mean_done;
  logic [$clog2(B)-1:0] mean_waddr;
  mean_t                mean_wdata;
  mean_t                mean_vec [B];

  mean_unit #(.B(B), .BMAX(BMAX)) u_mean (
    .clk, .rst_n, .start, .rows,
    .in_valid(m_v), .in_ready(m_r), .in_data(m_data),
    .mem_we(mean_we), .mem_waddr(mean_waddr), .mem_wdata(mean_wdata),
    .busy(mean_busy), .done(mean_done));

  mean_mem #(.B(B)) u_mean_mem (
    .clk, .rst_n, .we(mean_we), .waddr(mean_waddr), .wdata(mean_wdata), .rd_mean(mean_vec));

  logic                 cov_we, cov_busy, cov_done, cov_reload;
  logic [$clog2(B)-1:0] cov_i, cov_j;
  h_t                   cov_data;

  cov_unit #(.B(B), .BMAX(BMAX)) u_cov (
    .clk, .rst_n, .start(mean_done), .rows, .mean(mean_vec),
    .d_valid(d_v), .d_ready(d_r), .d_data(d_data),
    .o_valid(o_v), .o_ready(o_r), .o_data(o_data),
    .cov_we, .cov_i, .cov_j, .cov_data, .diag_reload(cov_reload),
    .busy(cov_busy), .done(cov_done));

  h_t   eig [B];
  rot_t vec [B][B];
  logic evd_busy, evd_done;

  evd_jacobi #(.B(B), .SWEEPS(SWEEPS)) u_evd (
    .clk, .rst_n, .we(cov_we), .wi(cov_i), .wj(cov_j), .wdata(cov_data),
    .start(cov_done), .eig, .vec, .busy(evd_busy), .done(evd_done));

  rot_t pc [B][B];
  logic sort_busy, sort_done;

  sort_select #(.B(B)) u_sort (
    .clk, .rst_n, .start(evd_done), .threshold, .eig, .vec,
    .sval(eigval), .pc, .num_pc, .busy(sort_busy), .done(sort_done));

  logic pu_busy, pu_done;

  proj_unit #(.B(B), .BMAX(BMAX)) u_pu (
    .clk, .rst_n, .start(sort_done), .rows, .num_pc, .out_base,
    .mean(mean_vec), .pc,
    .in_valid(p_v), .in_ready(p_r), .in_data(p_data),
    .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .busy(pu_busy), .done(pu_done));

  // The whole run ends when the projection has written its last result.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= pu_done;
      if (start) busy <= 1'b1;
      else if (pu_done) busy <= 1'b0;
    end
  end
endmodule
