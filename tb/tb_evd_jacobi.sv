// tb_evd_jacobi: self-checking test of the fixed-point Jacobi EVD.
//
// Test 1 loads a diagonal matrix: every pair is skipped, so the eigenvalues
// must be the diagonal exactly and V the identity. Tests 2 and 3 load random
// symmetric positive semidefinite matrices A = G*G' (covariance-like). The
// result is checked against properties that do not depend on the unit's own
// arithmetic: V must be orthonormal, V*diag(eig)*V' must rebuild A, and the
// sorted eigenvalues must match those of a double-precision Jacobi
// reference computed here. Tolerances are relative to the largest element.
module tb_evd_jacobi;
  import pca_pkg::*;
  localparam int B = 12;

  logic clk = 0, rst_n = 0;
  logic we, start, busy, done;
  logic [$clog2(B)-1:0] wi, wj;
  h_t wdata;
  h_t eig [B];
  rot_t vec [B][B];

  evd_jacobi #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real a [B][B];

  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction
  function automatic real hr(h_t x);   return real'(x) / 65536.0; endfunction
  function automatic real rr(rot_t x); return real'(x) / real'(64'd1 << RF); endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // double-precision cyclic Jacobi eigenvalues, sorted descending
  task automatic ref_eig(output real ev [B]);
    real h [B][B];
    real tau, t, cs, sn, tmp, hik, hjk;
    h = a;
    for (int l = 0; l < B; l++)
      for (int i = 0; i < B - 1; i++)
        for (int j = i + 1; j < B; j++) begin
          if (h[i][j] == 0.0) continue;
          tau = (h[j][j] - h[i][i]) / (2.0 * h[i][j]);
          t = ((tau >= 0.0) ? 1.0 : -1.0) / (fabs(tau) + $sqrt(1.0 + tau * tau));
          cs = 1.0 / $sqrt(1.0 + t * t); sn = cs * t;
          tmp = h[i][j];
          h[i][i] = h[i][i] - tmp * t; h[j][j] = h[j][j] + tmp * t;
          h[i][j] = 0.0; h[j][i] = 0.0;
          for (int k = 0; k < B; k++) if (k != i && k != j) begin
            hik = h[i][k]; hjk = h[j][k];
            h[i][k] = cs * hik - sn * hjk; h[j][k] = sn * hik + cs * hjk;
            h[k][i] = h[i][k]; h[k][j] = h[j][k];
          end
        end
    for (int i = 0; i < B; i++) ev[i] = h[i][i];
    ev.rsort();
  endtask

  task automatic load_and_run(output int cycles);
    @(negedge clk);
    for (int i = 0; i < B; i++)
      for (int j = i; j < B; j++) begin
        we = 1; wi = i[$clog2(B)-1:0]; wj = j[$clog2(B)-1:0];
        wdata = h_t'(longint'(a[i][j] * 65536.0));
        @(negedge clk);
      end
    we = 0; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    real amax, err, ev [B], got [B];
    int cycles;
    we = 0; start = 0; wi = '0; wj = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Test 1: diagonal matrix, all rotations skipped
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) a[i][j] = (i == j) ? real'(100 * i + 7) + 0.25 : 0.0;
    load_and_run(cycles);
    for (int i = 0; i < B; i++) begin
      check(eig[i] == h_t'(longint'(a[i][i] * 65536.0)), $sformatf("diag eig %0d", i));
      for (int j = 0; j < B; j++)
        check(vec[i][j] == ((i == j) ? rot_t'(1) <<< RF : '0), $sformatf("identity V %0d %0d", i, j));
    end

    for (int test = 0; test < 2; test++) begin
      real g [B][4];
      for (int i = 0; i < B; i++)
        for (int m = 0; m < 4; m++) g[i][m] = real'($urandom_range(0, 2000)) / 20.0 - 50.0;
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++) begin
          a[i][j] = 0.0;
          for (int m = 0; m < 4; m++) a[i][j] += g[i][m] * g[j][m] * (test + 1);
          if (i == j) a[i][j] += 3.5;
        end
      amax = 0.0;
      for (int i = 0; i < B; i++) for (int j = 0; j < B; j++) if (fabs(a[i][j]) > amax) amax = fabs(a[i][j]);
      load_and_run(cycles);
      $display("test %0d: %0d cycles", test, cycles);
      // orthonormal V
      for (int p = 0; p < B; p++)
        for (int q = 0; q < B; q++) begin
          real d;
          d = 0.0;
          for (int k = 0; k < B; k++) d += rr(vec[k][p]) * rr(vec[k][q]);
          check(fabs(d - ((p == q) ? 1.0 : 0.0)) < 1e-5, $sformatf("V'V[%0d][%0d] = %f", p, q, d));
        end
      // reconstruction
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++) begin
          real s;
          s = 0.0;
          for (int k = 0; k < B; k++) s += rr(vec[i][k]) * hr(eig[k]) * rr(vec[j][k]);
          err = fabs(s - a[i][j]);
          check(err < 1e-4 * amax, $sformatf("rebuild [%0d][%0d] %f vs %f", i, j, s, a[i][j]));
        end
      // eigenvalues against the reference
      ref_eig(ev);
      for (int i = 0; i < B; i++) got[i] = hr(eig[i]);
      got.rsort();
      for (int i = 0; i < B; i++)
        check(fabs(got[i] - ev[i]) < 1e-4 * amax, $sformatf("eig %0d %f vs %f", i, got[i], ev[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
