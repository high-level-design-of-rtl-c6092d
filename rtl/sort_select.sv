// sort_select: orders the eigenpairs by decreasing eigenvalue and keeps the
// principal components that carry a given share of the energy (step 4).
//
// On start a selection sort over an index list runs, one comparison per
// cycle, so that sval[0] >= sval[1] >= ... . The total energy E is the sum of
// the eigenvalues (a negative eigenvalue, which only fixed-point rounding can
// produce, counts as zero). Walking down the sorted list one eigenvalue per
// cycle, L is the first count whose cumulative energy satisfies
//     100 * (sigma_1 + ... + sigma_L) >= T * E
// with T the threshold in percent (0..100); L is at least 1. Column l of pc
// (pc[.][l]) is then the eigenvector of the l-th largest eigenvalue for
// l < L and zero otherwise. done pulses when pc, sval and num_pc are valid;
// they hold until the next start.
//
// Timing: about B(B+1)/2 + L + 3 cycles. The energy criterion follows the
// PCA algorithm; the sort method and the zeroing of unselected columns are
// this implementation's choices.
module sort_select #(
  parameter int B = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [6:0]             threshold,
  input  pca_pkg::h_t            eig [B],
  input  pca_pkg::rot_t          vec [B][B],
  output pca_pkg::h_t            sval [B],
  output pca_pkg::rot_t          pc [B][B],
  output logic [$clog2(B+1)-1:0] num_pc,
  output logic                   busy,
  output logic                   done
);
  import pca_pkg::*;

  localparam int IW = $clog2(B);
  localparam int LW = $clog2(B + 1);
  localparam int EW = H_W + 8 + 8;   // room for B terms times 100

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_SWAP, S_ENERGY, S_SEL, S_COPY, S_DONE} state_e;
  state_e state;

  logic [IW-1:0] ord [B];
  logic [IW-1:0] pos, scan, best;
  logic [EW-1:0] etot, cum;
  logic [LW-1:0] lsel;

  function automatic logic [EW-1:0] energy(input h_t x);
    return x[H_W-1] ? '0 : EW'(x);
  endfunction

  logic [EW-1:0] esum;
  always_comb begin
    esum = '0;
    for (int x = 0; x < B; x++) esum += energy(eig[x]);
  end

  logic [EW-1:0] cum_next;
  assign cum_next = cum + energy(eig[ord[lsel]]);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pos    <= '0;
      scan   <= '0;
      best   <= '0;
      etot   <= '0;
      cum    <= '0;
      lsel   <= '0;
      num_pc <= '0;
      done   <= 1'b0;
      for (int x = 0; x < B; x++) begin
        ord[x]  <= IW'(x);
        sval[x] <= '0;
        for (int y = 0; y < B; y++) pc[x][y] <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int x = 0; x < B; x++) ord[x] <= IW'(x);
          pos   <= '0;
          best  <= '0;
          scan  <= IW'(1);
          state <= (B > 1) ? S_SCAN : S_ENERGY;
        end
        // Find the largest remaining eigenvalue from position pos on.
        S_SCAN: begin
          if (eig[ord[scan]] > eig[ord[best]]) best <= scan;
          if (scan == IW'(B - 1)) state <= S_SWAP;
          else scan <= scan + 1'b1;
        end
        S_SWAP: begin
          ord[pos]  <= ord[best];
          ord[best] <= ord[pos];
          if (pos == IW'(B - 2)) begin
            state <= S_ENERGY;
          end else begin
            pos   <= pos + 1'b1;
            best  <= pos + 1'b1;
            scan  <= pos + IW'(2);
            state <= S_SCAN;
          end
        end
        S_ENERGY: begin
          etot  <= esum;
          cum   <= '0;
          lsel  <= '0;
          state <= S_SEL;
        end
        // Equation (2): smallest L with 100 * cumulative >= T * E.
        S_SEL: begin
          cum  <= cum_next;
          lsel <= lsel + 1'b1;
          if ((cum_next * EW'(100) >= EW'(threshold) * etot) || (int'(lsel) == B - 1)) begin
            num_pc <= lsel + 1'b1;
            state  <= S_COPY;
          end
        end
        S_COPY: begin
          for (int l = 0; l < B; l++) begin
            sval[l] <= eig[ord[l]];
            for (int c = 0; c < B; c++)
              pc[c][l] <= (l < int'(num_pc)) ? vec[c][ord[l]] : '0;
          end
          state <= S_DONE;
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
