// dispatcher: reads the input matrix from external memory and feeds the
// four FIFO sets of the PCA core.
//
// One memory word holds one pixel with all B bands (band k in bits
// [k*DW +: DW]). The matrix is read three times, rows pixels from word address
// in_base each time:
//   1. mean phase: each pixel goes to the Mean FIFO set as blocks P1..PNB;
//   2. covariance phase: each pixel goes to the Diag FIFO set as P1..PNB and
//      then to the Off-diag FIFO set in block-streaming order, rounds
//      ct = 1..NB-1 each carrying P1..P(NB-ct);
//   3. projection phase: each pixel goes to the PU FIFO set as P1..PNB.
// Read requests use a valid/ready address channel and responses a valid/ready
// data channel returning words in request order; at most RSP_DEPTH requests
// are in flight or buffered, so the response buffer never overflows and
// memory latency overlaps the streaming of earlier pixels. One block leaves
// per cycle while its FIFO set has room; a full FIFO set stalls the dispatcher.
//
// The three passes and the block order follow the accelerator's block-
// streaming description; the memory handshake (a simplified read-address /
// read-data pair standing in for the AXI master), the pixel-per-word layout
// and the response buffer are this implementation's choices.
module dispatcher #(
  parameter int B         = 12,
  parameter int BMAX      = 4,
  parameter int RSP_DEPTH = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [pca_pkg::R_W-1:0]      rows,
  input  logic [pca_pkg::ADDR_W-1:0]   in_base,
  // external memory read port
  output logic                         rd_req_valid,
  input  logic                         rd_req_ready,
  output logic [pca_pkg::ADDR_W-1:0]   rd_req_addr,
  input  logic                         rd_rsp_valid,
  output logic                         rd_rsp_ready,
  input  logic [B*pca_pkg::DW-1:0]     rd_rsp_data,
  // FIFO sets: Mean, Diag, Off-diag, PU
  output logic                         mean_valid,
  input  logic                         mean_ready,
  output logic                         diag_valid,
  input  logic                         diag_ready,
  output logic                         off_valid,
  input  logic                         off_ready,
  output logic                         pu_valid,
  input  logic                         pu_ready,
  output logic [pca_pkg::DW-1:0]       blk_data [BMAX],
  output pca_pkg::phase_e              phase,
  output logic                         busy,
  output logic                         done
);
  import pca_pkg::*;

  localparam int NB   = B / BMAX;
  localparam int NBW  = (NB > 1) ? $clog2(NB) : 1;
  localparam int CRW  = $clog2(RSP_DEPTH + 1);
  localparam int PXW  = B * DW;

  // ---------------- read requests ----------------
  phase_e         req_phase;
  logic [R_W-1:0] req_row;
  logic [CRW-1:0] credits;      // free response-buffer slots not yet requested
  logic           req_fire, pop;

  assign rd_req_valid = (req_phase != PH_IDLE) && (credits != '0);
  assign rd_req_addr  = in_base + ADDR_W'(req_row);
  assign req_fire     = rd_req_valid && rd_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_phase <= PH_IDLE;
      req_row   <= '0;
      credits   <= CRW'(RSP_DEPTH);
    end else begin
      if (start && phase == PH_IDLE && rows != '0) begin
        req_phase <= PH_MEAN;
        req_row   <= '0;
      end else if (req_fire) begin
        if (req_row == rows - 1'b1) begin
          req_row <= '0;
          case (req_phase)
            PH_MEAN: req_phase <= PH_COV;
            PH_COV:  req_phase <= PH_PROJ;
            default: req_phase <= PH_IDLE;
          endcase
        end else begin
          req_row <= req_row + 1'b1;
        end
      end
      case ({req_fire, pop})
        2'b10:   credits <= credits - 1'b1;
        2'b01:   credits <= credits + 1'b1;
        default: credits <= credits;
      endcase
    end
  end

  // ---------------- response buffer ----------------
  logic           px_valid;
  logic [PXW-1:0] px;

  stream_fifo #(.WIDTH(PXW), .DEPTH(RSP_DEPTH)) u_rsp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rd_rsp_valid),
    .in_ready (rd_rsp_ready),
    .in_data  (rd_rsp_data),
    .out_valid(px_valid),
    .out_ready(pop),
    .out_data (px)
  );

  // ---------------- block emission ----------------
  logic [R_W-1:0] row;
  logic           off_step;     // covariance phase: in the off-diagonal rounds
  logic [NBW-1:0] blk, ct;
  logic           sel_ready, fire, last_blk;

  always_comb begin
    for (int k = 0; k < BMAX; k++) blk_data[k] = px[(int'(blk)*BMAX + k)*DW +: DW];
  end

  assign mean_valid = px_valid && (phase == PH_MEAN);
  assign diag_valid = px_valid && (phase == PH_COV) && !off_step;
  assign off_valid  = px_valid && (phase == PH_COV) && off_step;
  assign pu_valid   = px_valid && (phase == PH_PROJ);

  always_comb begin
    case (phase)
      PH_MEAN: sel_ready = mean_ready;
      PH_COV:  sel_ready = off_step ? off_ready : diag_ready;
      PH_PROJ: sel_ready = pu_ready;
      default: sel_ready = 1'b0;
    endcase
  end

  assign fire = px_valid && sel_ready && (phase != PH_IDLE);
  // last block of the current pixel
  always_comb begin
    if (phase == PH_COV)
      last_blk = (NB == 1) ? 1'b1 : (off_step && int'(ct) == NB - 1);
    else
      last_blk = (blk == NBW'(NB - 1));
  end
  assign pop  = fire && last_blk;
  assign busy = (phase != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      row      <= '0;
      off_step <= 1'b0;
      blk      <= '0;
      ct       <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && phase == PH_IDLE && rows != '0) begin
        phase    <= PH_MEAN;
        row      <= '0;
        off_step <= 1'b0;
        blk      <= '0;
        ct       <= '0;
      end else if (fire) begin
        if (phase == PH_COV && !off_step) begin
          // diagonal blocks P1..PNB, then round 1 of the off-diagonal ones
          if (blk == NBW'(NB - 1)) begin
            blk <= '0;
            if (NB > 1) begin
              off_step <= 1'b1;
              ct       <= NBW'(1);
            end
          end else begin
            blk <= blk + 1'b1;
          end
        end else if (phase == PH_COV) begin
          // round ct streams P1..P(NB-ct)
          if (int'(blk) == NB - 1 - int'(ct)) begin
            blk <= '0;
            if (int'(ct) == NB - 1) off_step <= 1'b0;
            else ct <= ct + 1'b1;
          end else begin
            blk <= blk + 1'b1;
          end
        end else begin
          blk <= (blk == NBW'(NB - 1)) ? '0 : blk + 1'b1;
        end
        if (last_blk) begin
          if (row == rows - 1'b1) begin
            row <= '0;
            case (phase)
              PH_MEAN: phase <= PH_COV;
              PH_COV:  phase <= PH_PROJ;
              default: begin
                phase <= PH_IDLE;
                done  <= 1'b1;
              end
            endcase
          end else begin
            row <= row + 1'b1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) credits <= CRW'(RSP_DEPTH));
endmodule
