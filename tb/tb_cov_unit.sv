// tb_cov_unit: self-checking test of the block-streaming covariance unit.
//
// Uses 12 bands in blocks of 3 (four blocks, so the Diag RAM is reloaded
// twice per pixel). The testbench builds a random pixel matrix, computes its
// fixed-point mean, and feeds the Diag and Off-diag streams in the block-
// streaming order. The reference is computed directly from the definition,
// sum over pixels of (x_i*2^MF - m_i)(x_j*2^MF - m_j), divided by rows-1 and
// truncated toward zero, and every upper-triangle element written by the
// unit must match it exactly. A first run with no gaps in the streams also
// checks the rate, NB + NB(NB-1)/2 cycles per pixel, and the number of Diag
// RAM reloads; a second run adds random gaps.
module tb_cov_unit;
  import pca_pkg::*;
  localparam int B     = 12;
  localparam int BMAX  = 3;
  localparam int NB    = B / BMAX;
  localparam int NPAIR = NB * (NB - 1) / 2;
  localparam int RMAX  = 64;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [R_W-1:0] rows;
  mean_t mean [B];
  logic d_valid, d_ready, o_valid, o_ready;
  logic [DW-1:0] d_data [BMAX], o_data [BMAX];
  logic cov_we;
  logic [$clog2(B)-1:0] cov_i, cov_j;
  h_t cov_data;
  logic diag_reload, busy, done;

  cov_unit #(.B(B), .BMAX(BMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned x [RMAX][B];
  longint refc [B][B];
  int written [B][B];
  int reloads, cyc, first_cyc, last_cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (diag_reload) reloads <= reloads + 1;
    if (rst_n && cov_we) begin
      written[cov_i][cov_j] <= written[cov_i][cov_j] + 1;
      checks++;
      if (longint'(cov_data) != refc[cov_i][cov_j]) begin
        failures++;
        $display("FAIL: cov[%0d][%0d] = %0d, want %0d", cov_i, cov_j, cov_data, refc[cov_i][cov_j]);
      end
    end
  end

  task automatic run(input int nrows, input bit gaps);
    int dq [$][BMAX];
    int oq [$][BMAX];
    longint s;
    int dsent, osent, ntot_d, ntot_o;
    // data with a shared component so the bands are correlated
    for (int r = 0; r < nrows; r++) begin
      int base = $urandom_range(0, 180);
      for (int c = 0; c < B; c++) x[r][c] = base * (c % 3 + 1) / 3 + $urandom_range(0, 75);
    end
    for (int c = 0; c < B; c++) begin
      longint sum = 0;
      for (int r = 0; r < nrows; r++) sum += x[r][c];
      mean[c] = mean_t'((sum << MF) / nrows);
    end
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        s = 0;
        for (int r = 0; r < nrows; r++)
          s += (longint'(x[r][i] << MF) - longint'(mean[i])) * (longint'(x[r][j] << MF) - longint'(mean[j]));
        refc[i][j] = s / (nrows - 1);
        written[i][j] = 0;
      end
    // block-streaming order
    for (int r = 0; r < nrows; r++) begin
      int blk [BMAX];
      for (int b = 0; b < NB; b++) begin
        for (int k = 0; k < BMAX; k++) blk[k] = x[r][b*BMAX+k];
        dq.push_back(blk);
      end
      for (int ct = 1; ct < NB; ct++)
        for (int b = 0; b < NB - ct; b++) begin
          for (int k = 0; k < BMAX; k++) blk[k] = x[r][b*BMAX+k];
          oq.push_back(blk);
        end
    end
    ntot_d = dq.size(); ntot_o = oq.size();
    dsent = 0; osent = 0; reloads = 0; first_cyc = -1; last_cyc = 0;
    @(negedge clk);
    rows = R_W'(nrows); start = 1;
    @(negedge clk);
    start = 0;
    while (dsent < ntot_d || osent < ntot_o) begin
      automatic bit fd, fo;
      d_valid = (dsent < ntot_d) && (!gaps || $urandom_range(0, 2) != 0);
      o_valid = (osent < ntot_o) && (!gaps || $urandom_range(0, 2) != 0);
      for (int k = 0; k < BMAX; k++) begin
        d_data[k] = DW'(dq[(dsent < ntot_d) ? dsent : 0][k]);
        o_data[k] = DW'(oq[(osent < ntot_o) ? osent : 0][k]);
      end
      #1;
      fd = d_valid && d_ready;
      fo = o_valid && o_ready;
      if ((fd || fo) && first_cyc < 0) first_cyc = cyc;
      if (fd || fo) last_cyc = cyc;
      @(negedge clk);
      if (fd) dsent++;
      if (fo) osent++;
    end
    d_valid = 0; o_valid = 0;
    while (!done) @(negedge clk);
    if (!gaps) begin
      checks++;
      if (last_cyc - first_cyc + 1 != nrows * (NB + NPAIR)) begin
        failures++;
        $display("FAIL: %0d cycles for %0d pixels, want %0d", last_cyc - first_cyc + 1, nrows, nrows * (NB + NPAIR));
      end
    end
    checks++;
    if (reloads != nrows * (NB - 2)) begin
      failures++;
      $display("FAIL: %0d Diag RAM reloads, want %0d", reloads, nrows * (NB - 2));
    end
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        checks++;
        if (written[i][j] != ((i <= j) ? 1 : 0)) begin
          failures++;
          $display("FAIL: element %0d,%0d written %0d times", i, j, written[i][j]);
        end
      end
  endtask

  initial begin
    start = 0; rows = '0; d_valid = 0; o_valid = 0;
    for (int c = 0; c < B; c++) mean[c] = '0;
    for (int k = 0; k < BMAX; k++) begin d_data[k] = '0; o_data[k] = '0; end
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(40, 1'b0);
    run(RMAX, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
