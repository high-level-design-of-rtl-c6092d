// pca_bench_body.svh: body shared by the end-to-end benches of pca_accel
// (pca_accel_bench at the default parameters, pca_accel_wl_bench at other
// sizes). The including module declares NR, STALLS, THRESH, WATCHDOG, B,
// BMAX, the port signals and the instance dut; this file adds the memory
// model, the reference PCA, the checks and the run. See pca_accel_bench for
// what is checked. The bench does not call $finish itself: it raises
// finished and the testbench top that instantiates it ends the simulation.

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit finished = 1'b0;  // set once TB_RESULT is printed; the tb top then ends the run
  logic [B*DW-1:0] mem [NR];
  longint msum [B];
  longint mref [B];
  longint cref [B][B];
  real    ev [B];
  real    evec [B][B];
  int     lref;
  longint cyc = 0;
  int     nout = 0, ncov = 0;
  int     n_fifo_stall = 0, n_reload = 0, n_rd_stall = 0, n_wr_stall = 0;
  longint cov_first = -1, cov_last = 0;
  real    maxerr = 0.0;

  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction
  function automatic int px(int r, int c); return int'(mem[r][c*DW +: DW]); endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- stimulus ----------------
  task automatic make_image();
    real load [3][B];
    for (int f = 0; f < 3; f++)
      for (int c = 0; c < B; c++) load[f][c] = real'($urandom_range(0, 1000)) / 1000.0 * (f == 0 ? 1.0 : 0.6) - (f == 0 ? 0.0 : 0.3);
    for (int c = 0; c < B; c++) msum[c] = 0;
    for (int r = 0; r < NR; r++) begin
      real s [3];
      s[0] = real'($urandom_range(0, 120));
      s[1] = real'($urandom_range(0, 100)) - 50.0;
      s[2] = real'($urandom_range(0, 60)) - 30.0;
      for (int c = 0; c < B; c++) begin
        real v;
        int iv;
        v = 40.0 + s[0] * load[0][c] + s[1] * load[1][c] + s[2] * load[2][c] + real'($urandom_range(0, 6));
        iv = int'(v);
        if (iv < 0) iv = 0;
        if (iv > 255) iv = 255;
        mem[r][c*DW +: DW] = DW'(iv);
        msum[c] += iv;
      end
    end
  endtask

  // ---------------- reference ----------------
  task automatic reference();
    real h [B][B];
    real v [B][B];
    real tau, t, cs, sn, hik, hjk, vki, vkj, tot, cum;
    int ord [B];
    for (int c = 0; c < B; c++) mref[c] = (msum[c] << MF) / NR;
    for (int i = 0; i < B; i++)
      for (int j = i; j < B; j++) begin
        longint s = 0;
        for (int r = 0; r < NR; r++)
          s += (longint'(px(r, i)) * 256 - mref[i]) * (longint'(px(r, j)) * 256 - mref[j]);
        cref[i][j] = s / (NR - 1);
        cref[j][i] = cref[i][j];
      end
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        h[i][j] = real'(cref[i][j]) / 65536.0;
        v[i][j] = (i == j) ? 1.0 : 0.0;
      end
    for (int l = 0; l < 2 * B; l++)
      for (int i = 0; i < B - 1; i++)
        for (int j = i + 1; j < B; j++) begin
          if (h[i][j] == 0.0) continue;
          tau = (h[j][j] - h[i][i]) / (2.0 * h[i][j]);
          t = ((tau >= 0.0) ? 1.0 : -1.0) / (fabs(tau) + $sqrt(1.0 + tau * tau));
          cs = 1.0 / $sqrt(1.0 + t * t); sn = cs * t;
          h[i][i] = h[i][i] - h[i][j] * t; h[j][j] = h[j][j] + h[i][j] * t;
          h[i][j] = 0.0; h[j][i] = 0.0;
          for (int k = 0; k < B; k++) begin
            if (k != i && k != j) begin
              hik = h[i][k]; hjk = h[j][k];
              h[i][k] = cs * hik - sn * hjk; h[j][k] = sn * hik + cs * hjk;
              h[k][i] = h[i][k]; h[k][j] = h[j][k];
            end
            vki = v[k][i]; vkj = v[k][j];
            v[k][i] = cs * vki - sn * vkj; v[k][j] = sn * vki + cs * vkj;
          end
        end
    for (int i = 0; i < B; i++) ord[i] = i;
    for (int i = 0; i < B; i++)
      for (int j = i + 1; j < B; j++)
        if (h[ord[j]][ord[j]] > h[ord[i]][ord[i]]) begin
          int tmp = ord[i]; ord[i] = ord[j]; ord[j] = tmp;
        end
    tot = 0.0;
    for (int i = 0; i < B; i++) begin
      ev[i] = h[ord[i]][ord[i]];
      for (int c = 0; c < B; c++) evec[c][i] = v[c][ord[i]];
      if (ev[i] > 0.0) tot += ev[i];
    end
    cum = 0.0; lref = B;
    for (int i = 0; i < B; i++) begin
      cum += (ev[i] > 0.0) ? ev[i] : 0.0;
      if (100.0 * cum >= real'(THRESH) * tot) begin lref = i + 1; break; end
    end
    $display("reference eigenvalues: %f %f %f %f ... L=%0d", ev[0], ev[1], ev[2], ev[3], lref);
  endtask

  // ---------------- external memory model ----------------
  logic [ADDR_W-1:0] q_addr [$];
  longint            q_time [$];

  always @(negedge clk) begin
    rd_req_ready <= !STALLS || ($urandom_range(0, 3) != 0);
    wr_ready     <= !STALLS || ($urandom_range(0, 4) != 0);
    if (q_addr.size() > 0 && q_time[0] <= cyc) begin
      rd_rsp_valid <= 1'b1;
      rd_rsp_data  <= mem[q_addr[0] - IN_BASE];
    end else begin
      rd_rsp_valid <= 1'b0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (rd_rsp_valid && rd_rsp_ready) begin
        void'(q_addr.pop_front());
        void'(q_time.pop_front());
      end
      if (rd_req_valid && rd_req_ready) begin
        if (rd_req_addr < IN_BASE || rd_req_addr >= IN_BASE + NR) begin
          check(0, $sformatf("read outside the image: %0h", rd_req_addr));
        end else begin
          q_addr.push_back(rd_req_addr);
          q_time.push_back(cyc + LAT);
        end
      end
      if (rd_req_valid && !rd_req_ready) n_rd_stall++;
      if (wr_valid && !wr_ready) n_wr_stall++;
      if ((dut.m_in_v && !dut.m_in_r) || (dut.d_in_v && !dut.d_in_r) ||
          (dut.o_in_v && !dut.o_in_r) || (dut.p_in_v && !dut.p_in_r)) n_fifo_stall++;
      if (dut.cov_reload) n_reload++;
      if ((dut.d_v && dut.d_r) || (dut.o_v && dut.o_r)) begin
        if (cov_first < 0) cov_first = cyc;
        cov_last = cyc;
      end
      // covariance elements, exact
      if (dut.cov_we) begin
        ncov++;
        check(longint'(dut.cov_data) == cref[dut.cov_i][dut.cov_j],
              $sformatf("cov[%0d][%0d] = %0d want %0d", dut.cov_i, dut.cov_j, dut.cov_data,
                        cref[dut.cov_i][dut.cov_j]));
      end
      // output words
      if (rst_n && wr_valid && wr_ready) begin
        int r, l;
        real y, sgn, d;
        r = nout / lref; l = nout % lref;
        check(wr_addr == OUT_BASE + ADDR_W'(nout), $sformatf("output %0d address %0h", nout, wr_addr));
        sgn = 0.0;
        for (int c = 0; c < B; c++) sgn += real'(dut.u_sort.pc[c][l]) * evec[c][l];
        y = 0.0;
        if (r < NR)
          for (int c = 0; c < B; c++) y += (real'(px(r, c)) - real'(mref[c]) / 256.0) * evec[c][l];
        if (sgn < 0.0) y = -y;
        d = fabs(real'(wr_data) / 65536.0 - y);
        if (d > maxerr) maxerr = d;
        check(d < 0.02 + 1e-3 * fabs(y), $sformatf("Y[%0d][%0d] = %f want %f", r, l, real'(wr_data) / 65536.0, y));
        nout++;
      end
  
    end
  end

  // ---------------- run ----------------
  initial begin
    longint t0, t_end;
    start = 0; rows = '0; threshold = '0; in_base = IN_BASE; out_base = OUT_BASE;
    rd_rsp_valid = 0; rd_rsp_data = '0; rd_req_ready = 0; wr_ready = 0;
    make_image();
    reference();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rows = R_W'(NR); threshold = 7'(THRESH); start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t_end = cyc;
    repeat (2) @(negedge clk);

    for (int c = 0; c < B; c++)
      check(longint'(dut.mean_vec[c]) == mref[c], $sformatf("mean[%0d] = %0d want %0d", c, dut.mean_vec[c], mref[c]));
    check(ncov == B * (B + 1) / 2, $sformatf("%0d covariance elements written", ncov));
    for (int i = 0; i < B; i++)
      check(fabs(real'(eigval[i]) / 65536.0 - ev[i]) < 1e-4 * ev[0] + 1e-3,
            $sformatf("eigenvalue %0d = %f want %f", i, real'(eigval[i]) / 65536.0, ev[i]));
    check(int'(num_pc) == lref, $sformatf("L = %0d want %0d", num_pc, lref));
    check(nout == NR * lref, $sformatf("%0d outputs, want %0d", nout, NR * lref));
    check(!busy, "busy after done");
    if (!STALLS)
      check(cov_last - cov_first + 1 <= longint'(NR) * (NB + NPAIR) * 101 / 100 + 20,
            $sformatf("covariance streaming took %0d cycles for %0d pixels", cov_last - cov_first + 1, NR));
    $display("cycles: total %0d, covariance streaming %0d (%0d per pixel ideal)",
             t_end - t0, cov_last - cov_first + 1, NB + NPAIR);
    $display("largest output error %f", maxerr);
    $display("mechanisms: fifo-full stalls %0d, diag reloads %0d, read stalls %0d, write stalls %0d, L=%0d of %0d",
             n_fifo_stall, n_reload, n_rd_stall, n_wr_stall, num_pc, B);
    check(n_fifo_stall > 0, "no full FIFO set ever stalled the dispatcher");
    check(n_reload == NR * ((NB > 2) ? NB - 2 : 0), $sformatf("%0d Diag RAM reloads", n_reload));
    if (NB > 2) check(n_reload > 0, "no Diag RAM reload");
    check(int'(num_pc) < B, "selection kept every component");
    if (STALLS) begin
      check(n_rd_stall > 0, "no refused memory request");
      check(n_wr_stall > 0, "no write back-pressure");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

  initial begin
    for (longint i = 0; i < WATCHDOG; i++) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end
