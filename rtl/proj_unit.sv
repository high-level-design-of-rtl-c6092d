// proj_unit: projection of the centred data onto the selected principal
// components (step 5 of PCA), Y = (X - M) * PC.
//
// The input matrix is streamed a second time through the unit's FIFO set, a
// pixel as NB = B/BMAX blocks of BMAX bands. For each pixel the unit makes L
// passes over its NB blocks, one block per cycle with BMAX multipliers; pass
// l accumulates the dot product of the centred pixel with column l of pc and
// then issues Y[r][l]. During the first pass each block is taken from the
// FIFO, centred with the mean vector and kept in a register file, which the
// later passes reuse, so a pixel costs L*NB cycles.
//
// Every result goes out on a valid/ready write port as one Y_W-bit word with
// YF fraction bits (truncated) to word address out_base + r*L + l. The unit
// stalls while a result waits for wr_ready. done pulses after the last write
// is accepted. The loop structure follows the accelerator's projection code;
// the write port, the number formats and the reuse of the first pass are
// this implementation's choices.
module proj_unit #(
  parameter int B    = 12,
  parameter int BMAX = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [pca_pkg::R_W-1:0]      rows,
  input  logic [$clog2(B+1)-1:0]       num_pc,
  input  logic [pca_pkg::ADDR_W-1:0]   out_base,
  input  pca_pkg::mean_t               mean [B],
  input  pca_pkg::rot_t                pc [B][B],
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [pca_pkg::DW-1:0]       in_data [BMAX],
  output logic                         wr_valid,
  input  logic                         wr_ready,
  output logic [pca_pkg::ADDR_W-1:0]   wr_addr,
  output pca_pkg::y_t                  wr_data,
  output logic                         busy,
  output logic                         done
);
  import pca_pkg::*;

  localparam int NB    = B / BMAX;
  localparam int NBW   = (NB > 1) ? $clog2(NB) : 1;
  localparam int LW    = $clog2(B + 1);
  localparam int PRD_W = CEN_W + ROT_W;
  localparam int SUM_W = PRD_W + $clog2(B) + 1;
  localparam int SH    = MF + RF - YF;

  typedef logic signed [PRD_W-1:0] prd_t;
  typedef logic signed [SUM_W-1:0] sum_t;
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DONE} state_e;
  state_e state;

  cen_t           nrml [B];
  logic [NBW-1:0] blk;
  logic [LW-1:0]  pass;
  logic [R_W-1:0] row;
  sum_t           acc;
  logic [ADDR_W-1:0] addr;

  cen_t cen  [BMAX];
  cen_t opnd [BMAX];
  sum_t part, acc_next;
  logic first, stall, beat;

  assign first = (pass == '0);
  assign stall = wr_valid && !wr_ready;
  assign beat  = (state == S_RUN) && !stall && (!first || in_valid);

  always_comb begin
    part = '0;
    for (int k = 0; k < BMAX; k++) begin
      cen[k]  = cen_t'({1'b0, in_data[k], MF'(0)}) - cen_t'({1'b0, mean[int'(blk)*BMAX + k]});
      opnd[k] = first ? cen[k] : nrml[int'(blk)*BMAX + k];
      part   += SUM_W'(prd_t'(opnd[k] * pc[int'(blk)*BMAX + k][pass]));
    end
    acc_next = acc + part;
  end

  assign in_ready = (state == S_RUN) && first && !stall;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      blk      <= '0;
      pass     <= '0;
      row      <= '0;
      acc      <= '0;
      addr     <= '0;
      wr_valid <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
      done     <= 1'b0;
      for (int x = 0; x < B; x++) nrml[x] <= '0;
    end else begin
      done <= 1'b0;
      if (wr_valid && wr_ready) wr_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          blk   <= '0;
          pass  <= '0;
          row   <= '0;
          acc   <= '0;
          addr  <= out_base;
          state <= (rows == '0) ? S_DONE : S_RUN;
        end
        S_RUN: if (beat) begin
          if (first)
            for (int k = 0; k < BMAX; k++) nrml[int'(blk)*BMAX + k] <= cen[k];
          if (blk == NBW'(NB - 1)) begin
            blk      <= '0;
            acc      <= '0;
            wr_valid <= 1'b1;
            wr_addr  <= addr;
            wr_data  <= y_t'(acc_next >>> SH);
            addr     <= addr + 1'b1;
            if (pass == num_pc - 1'b1) begin
              pass <= '0;
              row  <= row + 1'b1;
              if (row == rows - 1'b1) state <= S_FLUSH;
            end else begin
              pass <= pass + 1'b1;
            end
          end else begin
            blk <= blk + 1'b1;
            acc <= acc_next;
          end
        end
        S_FLUSH: if (!wr_valid || wr_ready) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A result is held stable until the write port takes it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_valid && !wr_ready |=> wr_valid && $stable(wr_data) && $stable(wr_addr));
endmodule
