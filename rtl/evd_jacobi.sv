// evd_jacobi: eigenvalue decomposition of the symmetric covariance matrix by
// the two-sided (cyclic) Jacobi method, in fixed point (step 3 of PCA).
//
// The B x B matrix H is loaded through the write port (we, wi, wj, wdata);
// each write sets H[i][j] and H[j][i]. On start V is set to the identity and
// SWEEPS sweeps are run; each sweep visits every pair i < j in row order. For
// a pair with a = H[i][i], b = H[j][j], c = H[i][j] != 0 the rotation that
// zeroes H[i][j] is
//     t  = sign(tau) / (|tau| + sqrt(1 + tau^2)),  tau = (b - a) / (2c)
//     cs = 1 / sqrt(1 + t^2),  sn = cs * t
// then H[i][i] -= c*t, H[j][j] += c*t, H[i][j] = H[j][i] = 0, rows and
// columns i and j of H and columns i and j of V are rotated. t is evaluated
// in the equivalent form 2|c| * sign(tau) / (|b-a| + sqrt((b-a)^2 + 4c^2)),
// which never exceeds 1 and so cannot overflow a fixed-point word; this
// rewriting is this implementation's choice. A pair with c = 0 is skipped.
//
// When done pulses, eig[k] = H[k][k] are the eigenvalues (format of H) and
// column k of vec (vec[.][k]) is the matching unit eigenvector with RF
// fraction bits. Timing per rotated pair: about 2*H_W + 2*RF + B + 215 cycles
// (two square roots and two divisions, one bit per cycle, then one element
// of the rotated rows per cycle). The algorithm and the sweep count (the
// number of bands) follow the accelerator's EVD; word lengths, truncating
// arithmetic and the sequential datapath are this implementation's choices.
module evd_jacobi #(
  parameter int B      = 12,
  parameter int SWEEPS = B
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(B)-1:0] wi,
  input  logic [$clog2(B)-1:0] wj,
  input  pca_pkg::h_t          wdata,
  input  logic                 start,
  output pca_pkg::h_t          eig [B],
  output pca_pkg::rot_t        vec [B][B],
  output logic                 busy,
  output logic                 done
);
  import pca_pkg::*;

  localparam int IW   = $clog2(B);
  localparam int SW   = (SWEEPS > 1) ? $clog2(SWEEPS + 1) : 1;
  localparam int DDW  = H_W + 1;           // b - a
  localparam int SQ1W = 2 * DDW;           // (b-a)^2 + 4c^2
  localparam int RT1W = DDW;               // its root
  localparam int DENW = DDW + 1;           // |b-a| + root
  localparam int N1W  = H_W + 1 + RF;      // 2|c| << RF
  localparam int SQ2W = 2 * RF + 2;        // 2^(2RF) + t^2
  localparam int N2W  = 2 * RF + 2;        // 2^(2RF)

  typedef enum logic [3:0] {
    S_IDLE, S_PAIR, S_SQ1, S_DIV1, S_SQ2, S_DIV2, S_ROT2, S_ROTK, S_NEXT, S_DONE
  } state_e;
  state_e state;

  h_t              h [B][B];
  rot_t            v [B][B];
  logic [IW-1:0]   pi, pj, k;
  logic [SW-1:0]   sweep;
  logic signed [DDW-1:0] d_q;
  h_t              c_q;
  logic            tneg;
  logic [RF:0]     tmag;      // |t| <= 1
  rot_t            t_q, cs_q, sn_q;

  // Square root and divider of the rotation.
  logic             sq1_start, sq1_busy, sq1_done;
  logic [SQ1W-1:0]  sq1_rad;
  logic [RT1W-1:0]  sq1_root;
  logic             dv1_start, dv1_busy, dv1_done;
  logic [N1W-1:0]   dv1_num, dv1_quot;
  logic [DENW-1:0]  dv1_den, dv1_rem;
  logic             sq2_start, sq2_busy, sq2_done;
  logic [SQ2W-1:0]  sq2_rad;
  logic [SQ2W/2-1:0] sq2_root;
  logic             dv2_start, dv2_busy, dv2_done;
  logic [N2W-1:0]   dv2_num, dv2_quot;
  logic [SQ2W/2-1:0] dv2_rem;

  logic [DDW-1:0]   d_abs;
  logic [H_W-1:0]   c_abs;
  assign d_abs = d_q[DDW-1] ? DDW'(-d_q) : DDW'(d_q);
  assign c_abs = c_q[H_W-1] ? H_W'(-c_q) : H_W'(c_q);

  assign sq1_rad = SQ1W'(d_abs) * SQ1W'(d_abs) + ((SQ1W'(c_abs) * SQ1W'(c_abs)) << 2);
  assign dv1_num = N1W'({c_abs, 1'b0}) << RF;
  assign dv1_den = DENW'(d_abs) + DENW'(sq1_root);
  assign sq2_rad = (SQ2W'(1) << (2 * RF)) + SQ2W'(tmag) * SQ2W'(tmag);
  assign dv2_num = N2W'(1) << (2 * RF);

  seq_sqrt    #(.W(SQ1W))               u_sq1 (.clk, .rst_n, .start(sq1_start), .rad(sq1_rad),
                                               .busy(sq1_busy), .done(sq1_done), .root(sq1_root));
  seq_divider #(.NW(N1W), .DW(DENW))    u_dv1 (.clk, .rst_n, .start(dv1_start), .num(dv1_num),
                                               .den(dv1_den), .busy(dv1_busy), .done(dv1_done),
                                               .quot(dv1_quot), .rem(dv1_rem));
  seq_sqrt    #(.W(SQ2W))               u_sq2 (.clk, .rst_n, .start(sq2_start), .rad(sq2_rad),
                                               .busy(sq2_busy), .done(sq2_done), .root(sq2_root));
  seq_divider #(.NW(N2W), .DW(SQ2W/2))  u_dv2 (.clk, .rst_n, .start(dv2_start), .num(dv2_num),
                                               .den(sq2_root), .busy(dv2_busy), .done(dv2_done),
                                               .quot(dv2_quot), .rem(dv2_rem));

  // Fixed-point products, truncated back to the format of the second operand.
  function automatic h_t mul_h(input rot_t r, input h_t x);
    logic signed [ROT_W+H_W-1:0] p;
    p = (ROT_W+H_W)'(r) * (ROT_W+H_W)'(x);
    return h_t'(p >>> RF);
  endfunction
  function automatic rot_t mul_r(input rot_t r, input rot_t x);
    logic signed [2*ROT_W-1:0] p;
    p = (2*ROT_W)'(r) * (2*ROT_W)'(x);
    return rot_t'(p >>> RF);
  endfunction

  h_t ct_q;  // c * t
  assign ct_q = mul_h(t_q, c_q);

  always_comb begin
    for (int x = 0; x < B; x++) begin
      eig[x] = h[x][x];
      for (int y = 0; y < B; y++) vec[x][y] = v[x][y];
    end
  end
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pi <= '0; pj <= '0; k <= '0; sweep <= '0;
      d_q <= '0; c_q <= '0; tneg <= 1'b0; tmag <= '0;
      t_q <= '0; cs_q <= '0; sn_q <= '0;
      sq1_start <= 1'b0; dv1_start <= 1'b0; sq2_start <= 1'b0; dv2_start <= 1'b0;
      done <= 1'b0;
      for (int x = 0; x < B; x++)
        for (int y = 0; y < B; y++) begin
          h[x][y] <= '0;
          v[x][y] <= '0;
        end
    end else begin
      sq1_start <= 1'b0;
      dv1_start <= 1'b0;
      sq2_start <= 1'b0;
      dv2_start <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE: begin
          if (we) begin
            h[wi][wj] <= wdata;
            h[wj][wi] <= wdata;
          end
          if (start) begin
            for (int x = 0; x < B; x++)
              for (int y = 0; y < B; y++) v[x][y] <= (x == y) ? rot_t'(1) <<< RF : '0;
            pi    <= '0;
            pj    <= IW'(1);
            sweep <= '0;
            state <= (B > 1 && SWEEPS > 0) ? S_PAIR : S_DONE;
          end
        end
        S_PAIR: begin
          d_q  <= DDW'(h[pj][pj]) - DDW'(h[pi][pi]);
          c_q  <= h[pi][pj];
          if (h[pi][pj] == '0) begin
            state <= S_NEXT;
          end else begin
            state     <= S_SQ1;
            sq1_start <= 1'b1;
          end
        end
        S_SQ1: begin
          // sign(tau) = sign(b - a) * sign(c), with sign(0) = +1
          tneg <= (d_q != '0) && (d_q[DDW-1] ^ c_q[H_W-1]);
          if (sq1_done) begin
            dv1_start <= 1'b1;
            state     <= S_DIV1;
          end
        end
        S_DIV1: if (dv1_done) begin
          tmag      <= (RF+1)'(dv1_quot);
          sq2_start <= 1'b1;
          state     <= S_SQ2;
        end
        S_SQ2: begin
          t_q <= tneg ? -rot_t'(tmag) : rot_t'(tmag);
          if (sq2_done) begin
            dv2_start <= 1'b1;
            state     <= S_DIV2;
          end
        end
        S_DIV2: if (dv2_done) begin
          cs_q  <= rot_t'(dv2_quot);
          sn_q  <= mul_r(rot_t'(dv2_quot), t_q);
          state <= S_ROT2;
        end
        S_ROT2: begin
          h[pi][pi] <= h[pi][pi] - ct_q;
          h[pj][pj] <= h[pj][pj] + ct_q;
          h[pi][pj] <= '0;
          h[pj][pi] <= '0;
          k         <= '0;
          state     <= S_ROTK;
        end
        S_ROTK: begin
          if (k != pi && k != pj) begin
            h[pi][k] <= mul_h(cs_q, h[pi][k]) - mul_h(sn_q, h[pj][k]);
            h[pj][k] <= mul_h(sn_q, h[pi][k]) + mul_h(cs_q, h[pj][k]);
            h[k][pi] <= mul_h(cs_q, h[pi][k]) - mul_h(sn_q, h[pj][k]);
            h[k][pj] <= mul_h(sn_q, h[pi][k]) + mul_h(cs_q, h[pj][k]);
          end
          v[k][pi] <= mul_r(cs_q, v[k][pi]) - mul_r(sn_q, v[k][pj]);
          v[k][pj] <= mul_r(sn_q, v[k][pi]) + mul_r(cs_q, v[k][pj]);
          k <= k + 1'b1;
          if (k == IW'(B - 1)) state <= S_NEXT;
        end
        S_NEXT: begin
          state <= S_PAIR;
          if (pj == IW'(B - 1)) begin
            if (pi == IW'(B - 2)) begin
              pi <= '0;
              pj <= IW'(1);
              sweep <= sweep + 1'b1;
              if (int'(sweep) == SWEEPS - 1) state <= S_DONE;
            end else begin
              pi <= pi + 1'b1;
              pj <= pi + IW'(2);
            end
          end else begin
            pj <= pj + 1'b1;
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
