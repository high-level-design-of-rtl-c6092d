// cov_unit: covariance matrix by block streaming (step 2 of PCA).
//
// The B bands are cut into NB = B/BMAX blocks P1..PNB of BMAX bands. For each
// pixel the unit first takes the NB blocks from the Diag FIFO set, centres
// them with the mean vector and keeps each one in the Diag RAM while adding
// the upper triangle of its own outer product to CovDiag (diagonal blocks
// P11..PNBNB). The last block stays in the Diag RAM. Then it takes blocks from
// the Off-diag FIFO set in rounds ct = 1..NB-1: round ct streams P1..P(NB-ct),
// each block goes into the Off-diag RAM and its outer product with the Diag
// RAM is added to CovOff, giving blocks P(b)(NB-ct+1). At the first beat of
// every round after the first, the Diag RAM is reloaded with the last block
// of the Off-diag RAM, so it holds P(NB-ct+1) without being streamed again.
// Sums over all pixels build up in CovDiag and CovOff.
//
// After rows pixels every upper-triangle element (i <= j) is divided by
// rows-1 and written, one per division, to the output port (cov_we, cov_i,
// cov_j, cov_data) in row-major order; done pulses after the last one.
//
// Timing: one block per cycle when the FIFOs keep up, i.e. NB + NB(NB-1)/2
// cycles per pixel, then B(B+1)/2 divisions of ACC_W+2 cycles each. The
// streaming order, the two RAMs and the reload step follow the block-streaming
// method; fully partitioned registers, the fixed-point widths and the single
// shared divider are this implementation's choices. rows must be >= 2.
module cov_unit #(
  parameter int B    = 12,
  parameter int BMAX = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [pca_pkg::R_W-1:0] rows,
  input  pca_pkg::mean_t          mean [B],
  input  logic                    d_valid,
  output logic                    d_ready,
  input  logic [pca_pkg::DW-1:0]  d_data [BMAX],
  input  logic                    o_valid,
  output logic                    o_ready,
  input  logic [pca_pkg::DW-1:0]  o_data [BMAX],
  output logic                    cov_we,
  output logic [$clog2(B)-1:0]    cov_i,
  output logic [$clog2(B)-1:0]    cov_j,
  output pca_pkg::h_t             cov_data,
  output logic                    diag_reload,
  output logic                    busy,
  output logic                    done
);
  import pca_pkg::*;

  localparam int NB    = B / BMAX;
  localparam int NBW   = (NB > 1) ? $clog2(NB) : 1;
  localparam int NPAIR = (NB * (NB - 1)) / 2;
  localparam int NP    = (NPAIR > 0) ? NPAIR : 1;
  localparam int PW    = (NP > 1) ? $clog2(NP) : 1;
  localparam int IW    = $clog2(B);

  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  typedef enum logic [2:0] {S_IDLE, S_DIAG, S_OFF, S_WSTART, S_WDIV, S_DONE} state_e;
  state_e state;

  cen_t           diag_ram [BMAX];
  cen_t           off_ram  [BMAX];
  acc_t           cov_diag [NB][BMAX][BMAX];
  acc_t           cov_off  [NP][BMAX][BMAX];
  logic [NBW-1:0] blk;      // block being streamed (b)
  logic [NBW-1:0] ct;       // off-diagonal round (1..NB-1)
  logic [PW-1:0]  pidx;     // off-diagonal block pair of this beat
  logic [R_W-1:0] row;
  logic [IW-1:0]  wi, wj;   // element being written
  logic           neg_q;

  cen_t cen_d [BMAX];
  cen_t cen_o [BMAX];
  cen_t dsrc  [BMAX];
  logic reload;

  // Centre a block: x * 2^MF - mean(band).
  always_comb begin
    for (int k = 0; k < BMAX; k++) begin
      cen_d[k] = cen_t'({1'b0, d_data[k], MF'(0)}) - cen_t'({1'b0, mean[int'(blk)*BMAX + k]});
      cen_o[k] = cen_t'({1'b0, o_data[k], MF'(0)}) - cen_t'({1'b0, mean[int'(blk)*BMAX + k]});
    end
  end

  // Step 3(a): the first beat of rounds 2.. takes the Diag operand from the
  // Off-diag RAM, whose last block is the next one to pair with.
  assign reload = (state == S_OFF) && (ct != NBW'(1)) && (blk == '0);
  always_comb begin
    for (int k = 0; k < BMAX; k++) dsrc[k] = reload ? off_ram[k] : diag_ram[k];
  end

  assign d_ready     = (state == S_DIAG);
  assign o_ready     = (state == S_OFF);
  assign busy        = (state != S_IDLE);
  assign diag_reload = reload && o_valid;

  // Accumulator that holds covariance element (i, j), i <= j.
  function automatic acc_t pick(input logic [IW-1:0] i, input logic [IW-1:0] j);
    int bi, bj, p;
    bi = int'(i) / BMAX;
    bj = int'(j) / BMAX;
    if (bi == bj) return cov_diag[bi][int'(i) % BMAX][int'(j) % BMAX];
    // column block bj is paired in round NB-bj; rounds 1..r-1 hold NB-1.. pairs
    p = 0;
    for (int c = 1; c < NB; c++) if (c < NB - bj) p += NB - c;
    return cov_off[p + bi][int'(i) % BMAX][int'(j) % BMAX];
  endfunction

  // Division of the selected sum by rows-1 (magnitude, sign restored after).
  logic             div_start, div_busy, div_done;
  acc_t             wacc;
  logic [ACC_W-1:0] div_num, div_quot;
  logic [R_W-1:0]   div_rem;

  assign wacc    = pick(wi, wj);
  assign div_num = wacc[ACC_W-1] ? ACC_W'(-wacc) : ACC_W'(wacc);

  seq_divider #(.NW(ACC_W), .DW(R_W)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .start(div_start),
    .num  (div_num),
    .den  (rows - 1'b1),
    .busy (div_busy),
    .done (div_done),
    .quot (div_quot),
    .rem  (div_rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      blk       <= '0;
      ct        <= '0;
      pidx      <= '0;
      row       <= '0;
      wi        <= '0;
      wj        <= '0;
      neg_q     <= 1'b0;
      div_start <= 1'b0;
      cov_we    <= 1'b0;
      cov_i     <= '0;
      cov_j     <= '0;
      cov_data  <= '0;
      done      <= 1'b0;
      for (int k = 0; k < BMAX; k++) begin
        diag_ram[k] <= '0;
        off_ram[k]  <= '0;
      end
      for (int b = 0; b < NB; b++)
        for (int x = 0; x < BMAX; x++)
          for (int y = 0; y < BMAX; y++) cov_diag[b][x][y] <= '0;
      for (int p = 0; p < NP; p++)
        for (int x = 0; x < BMAX; x++)
          for (int y = 0; y < BMAX; y++) cov_off[p][x][y] <= '0;
    end else begin
      div_start <= 1'b0;
      cov_we    <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int b = 0; b < NB; b++)
            for (int x = 0; x < BMAX; x++)
              for (int y = 0; y < BMAX; y++) cov_diag[b][x][y] <= '0;
          for (int p = 0; p < NP; p++)
            for (int x = 0; x < BMAX; x++)
              for (int y = 0; y < BMAX; y++) cov_off[p][x][y] <= '0;
          blk   <= '0;
          row   <= '0;
          state <= S_DIAG;
        end

        // Step 1: diagonal blocks of one pixel.
        S_DIAG: if (d_valid) begin
          for (int x = 0; x < BMAX; x++) begin
            diag_ram[x] <= cen_d[x];
            for (int y = x; y < BMAX; y++)
              cov_diag[blk][x][y] <= cov_diag[blk][x][y] + ACC_W'(prod_t'(cen_d[x] * cen_d[y]));
          end
          if (blk == NBW'(NB - 1)) begin
            blk  <= '0;
            ct   <= NBW'(1);
            pidx <= '0;
            if (NB > 1) begin
              state <= S_OFF;
            end else begin
              row <= row + 1'b1;
              if (row == rows - 1'b1) begin
                state <= S_WSTART;
                wi    <= '0;
                wj    <= '0;
              end
            end
          end else begin
            blk <= blk + 1'b1;
          end
        end

        // Steps 2 and 3: off-diagonal blocks of one pixel.
        S_OFF: if (o_valid) begin
          for (int x = 0; x < BMAX; x++) begin
            off_ram[x] <= cen_o[x];
            if (reload) diag_ram[x] <= off_ram[x];
            for (int y = 0; y < BMAX; y++)
              cov_off[pidx][x][y] <= cov_off[pidx][x][y] + ACC_W'(prod_t'(cen_o[x] * dsrc[y]));
          end
          pidx <= pidx + 1'b1;
          if (int'(blk) == NB - 1 - int'(ct)) begin
            blk <= '0;
            if (int'(ct) == NB - 1) begin
              // Step 4: next pixel.
              row <= row + 1'b1;
              if (row == rows - 1'b1) begin
                state <= S_WSTART;
                wi    <= '0;
                wj    <= '0;
              end else begin
                state <= S_DIAG;
              end
            end else begin
              ct <= ct + 1'b1;
            end
          end else begin
            blk <= blk + 1'b1;
          end
        end

        // Write the final matrix: CovOut = write(CovDiag, CovOff) / (rows-1).
        S_WSTART: begin
          div_start <= 1'b1;
          neg_q     <= wacc[ACC_W-1];
          state     <= S_WDIV;
        end
        S_WDIV: if (div_done) begin
          cov_we   <= 1'b1;
          cov_i    <= wi;
          cov_j    <= wj;
          cov_data <= neg_q ? -h_t'(div_quot) : h_t'(div_quot);
          if (wj == IW'(B - 1)) begin
            if (wi == IW'(B - 1)) begin
              state <= S_DONE;
            end else begin
              wi    <= wi + 1'b1;
              wj    <= wi + 1'b1;
              state <= S_WSTART;
            end
          end else begin
            wj    <= wj + 1'b1;
            state <= S_WSTART;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
