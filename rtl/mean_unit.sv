// mean_unit: column means of the input matrix (step 1 of PCA).
//
// The unit receives every pixel as NB = B/BMAX consecutive blocks of BMAX
// bands from its FIFO set and adds each sample to the running sum of its
// band, one block per cycle (the pixel loop is pipelined, the band loop is
// spread over BMAX parallel adders). After rows pixels it divides the B sums
// by rows with one shared sequential divider and writes each mean, with MF
// fraction bits, into the mean memory. done pulses once the last mean is
// written.
//
// Timing: rows*NB accepted blocks, then B divisions of about 37 cycles each.
// The accumulate-then-divide structure follows the accelerator's mean code;
// the single shared divider and the fixed-point format are this
// implementation's own choices. rows must be at least 1.
module mean_unit #(
  parameter int B    = 12,
  parameter int BMAX = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [pca_pkg::R_W-1:0]  rows,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [pca_pkg::DW-1:0]   in_data [BMAX],
  output logic                     mem_we,
  output logic [$clog2(B)-1:0]     mem_waddr,
  output pca_pkg::mean_t           mem_wdata,
  output logic                     busy,
  output logic                     done
);
  import pca_pkg::*;

  localparam int NB    = B / BMAX;
  localparam int NBW   = (NB > 1) ? $clog2(NB) : 1;
  localparam int SUM_W = DW + R_W;
  localparam int NUM_W = SUM_W + MF;

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_DIV, S_WAIT} state_e;
  state_e state;

  logic [SUM_W-1:0]     sum [B];
  logic [NBW-1:0]       blk;
  logic [R_W-1:0]       row;
  logic [$clog2(B)-1:0] band;
  logic                 div_start, div_busy, div_done;
  logic [NUM_W-1:0]     div_quot;
  logic [R_W-1:0]       div_rem;

  assign in_ready = (state == S_ACC);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      blk       <= '0;
      row       <= '0;
      band      <= '0;
      div_start <= 1'b0;
      mem_we    <= 1'b0;
      mem_waddr <= '0;
      mem_wdata <= '0;
      done      <= 1'b0;
      for (int i = 0; i < B; i++) sum[i] <= '0;
    end else begin
      div_start <= 1'b0;
      mem_we    <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < B; i++) sum[i] <= '0;
          blk   <= '0;
          row   <= '0;
          state <= (rows == '0) ? S_DIV : S_ACC;
          band  <= '0;
          div_start <= (rows == '0);
        end
        S_ACC: if (in_valid) begin
          for (int k = 0; k < BMAX; k++)
            sum[int'(blk)*BMAX + k] <= sum[int'(blk)*BMAX + k] + SUM_W'(in_data[k]);
          if (blk == NBW'(NB - 1)) begin
            blk <= '0;
            if (row == rows - 1'b1) begin
              state     <= S_DIV;
              band      <= '0;
              div_start <= 1'b1;
            end
            row <= row + 1'b1;
          end else begin
            blk <= blk + 1'b1;
          end
        end
        S_DIV: if (div_done) begin
          mem_we    <= 1'b1;
          mem_waddr <= band;
          mem_wdata <= MEAN_W'(div_quot);
          if (band == $clog2(B)'(B - 1)) begin
            state <= S_WAIT;
          end else begin
            band      <= band + 1'b1;
            div_start <= 1'b1;
          end
        end
        S_WAIT: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  seq_divider #(.NW(NUM_W), .DW(R_W)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .start(div_start),
    .num  ({sum[band], MF'(0)}),
    .den  (rows),
    .busy (div_busy),
    .done (div_done),
    .quot (div_quot),
    .rem  (div_rem)
  );
endmodule
