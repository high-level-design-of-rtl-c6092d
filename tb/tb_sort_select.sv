// tb_sort_select: self-checking test of the Sort and Select unit.
//
// Random distinct eigenvalues (some negative) and random eigenvector columns
// are applied with several thresholds (0, 50, 90, 99 and 100 percent and
// random ones). Checks: sval is the eigenvalue list in decreasing order; L
// is the smallest count whose cumulative energy reaches the threshold,
// computed here with 64-bit integers; column l of pc is the eigenvector of
// the l-th largest eigenvalue for l < L and zero beyond.
module tb_sort_select;
  import pca_pkg::*;
  localparam int B = 12;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [6:0] threshold;
  h_t eig [B], sval [B];
  rot_t vec [B][B], pc [B][B];
  logic [$clog2(B+1)-1:0] num_pc;

  sort_select #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lcount [B+1];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input int thr);
    int idx [B];
    longint e, cum, ev;
    int lref;
    // distinct values: a random permutation of spaced levels
    for (int i = 0; i < B; i++) idx[i] = i;
    idx.shuffle();
    for (int i = 0; i < B; i++) begin
      eig[i] = h_t'(longint'(idx[i] * idx[i]) * 40000 - 200000 + $urandom_range(0, 999));
      for (int c = 0; c < B; c++) vec[c][i] = rot_t'($urandom);
    end
    threshold = 7'(thr);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    // reference: sorted order by value
    for (int i = 0; i < B; i++) idx[i] = i;
    for (int i = 0; i < B; i++)
      for (int j = i + 1; j < B; j++)
        if (eig[idx[j]] > eig[idx[i]]) begin
          int t = idx[i];
          idx[i] = idx[j];
          idx[j] = t;
        end
    e = 0;
    for (int i = 0; i < B; i++) e += (eig[i] < 0) ? 0 : longint'(eig[i]);
    cum = 0; lref = B;
    for (int l = 0; l < B; l++) begin
      ev = longint'(eig[idx[l]]);
      cum += (ev < 0) ? 0 : ev;
      if (cum * 100 >= longint'(thr) * e) begin lref = l + 1; break; end
    end
    check(int'(num_pc) == lref, $sformatf("T=%0d: L=%0d want %0d", thr, num_pc, lref));
    lcount[lref]++;
    for (int l = 0; l < B; l++) begin
      check(sval[l] == eig[idx[l]], $sformatf("sval[%0d] = %0d want %0d (idx %0d)", l, sval[l], eig[idx[l]], idx[l]));
      for (int c = 0; c < B; c++)
        check(pc[c][l] == ((l < lref) ? vec[c][idx[l]] : '0), $sformatf("pc[%0d][%0d]", c, l));
    end
  endtask

  initial begin
    start = 0; threshold = '0;
    for (int i = 0; i < B; i++) begin
      eig[i] = '0;
      for (int c = 0; c < B; c++) vec[c][i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0); run(50); run(90); run(99); run(100);
    repeat (20) run($urandom_range(0, 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
