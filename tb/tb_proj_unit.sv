// tb_proj_unit: self-checking test of the Projection unit.
//
// Random means, PCs and pixels are applied; L is varied. Every written result
// must equal floor(sum_c (x_c*2^MF - m_c) * pc[c][l] / 2^(MF+RF-YF)),
// computed here with 64-bit integers, at address out_base + r*L + l, each
// exactly once and in order. A run with an always-ready write port and no
// input gaps checks the rate of L*NB cycles per pixel; other runs stall both
// the input and the write port at random.
module tb_proj_unit;
  import pca_pkg::*;
  localparam int B    = 12;
  localparam int BMAX = 4;
  localparam int NB   = B / BMAX;
  localparam int RMAX = 100;

  logic clk = 0, rst_n = 0;
  logic start, in_valid, in_ready, wr_valid, wr_ready, busy, done;
  logic [R_W-1:0] rows;
  logic [$clog2(B+1)-1:0] num_pc;
  logic [ADDR_W-1:0] out_base, wr_addr;
  mean_t mean [B];
  rot_t pc [B][B];
  logic [DW-1:0] in_data [BMAX];
  y_t wr_data;

  proj_unit #(.B(B), .BMAX(BMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned x [RMAX][B];
  int nout, cyc, first_in, last_out;
  bit wr_gaps;

  function automatic longint yref(int r, int l);
    longint s = 0;
    for (int c = 0; c < B; c++)
      s += (longint'(x[r][c]) * (1 << MF) - longint'(mean[c])) * longint'(pc[c][l]);
    return s >>> (MF + RF - YF);
  endfunction

  always @(negedge clk) if (rst_n) wr_ready <= !wr_gaps || ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && wr_valid && wr_ready) begin
      automatic int r = nout / int'(num_pc);
      automatic int l = nout % int'(num_pc);
      checks++;
      if (wr_addr != out_base + ADDR_W'(nout) || longint'(wr_data) != yref(r, l)) begin
        failures++;
        $display("FAIL: out %0d addr %0d data %0d, want addr %0d data %0d",
                 nout, wr_addr, wr_data, out_base + ADDR_W'(nout), yref(r, l));
      end
      nout <= nout + 1;
      last_out <= cyc;
    end
  end

  task automatic run(input int nrows, input int l, input bit gaps);
    int sent, t0;
    for (int c = 0; c < B; c++) begin
      mean[c] = mean_t'($urandom_range(0, 65535));
      for (int k = 0; k < B; k++) pc[c][k] = (k < l) ? rot_t'($urandom) >>> 1 : '0;
    end
    for (int r = 0; r < nrows; r++) for (int c = 0; c < B; c++) x[r][c] = $urandom_range(0, 255);
    wr_gaps = gaps;
    @(negedge clk);
    nout = 0;
    rows = R_W'(nrows); num_pc = 4'(l); out_base = ADDR_W'($urandom_range(0, 4096)); start = 1;
    @(negedge clk);
    start = 0;
    sent = 0; first_in = -1;
    while (sent < nrows * NB) begin
      automatic bit f;
      in_valid = !gaps || ($urandom_range(0, 2) != 0);
      for (int k = 0; k < BMAX; k++) in_data[k] = DW'(x[sent / NB][(sent % NB) * BMAX + k]);
      #1;
      f = in_valid && in_ready;
      if (f && first_in < 0) first_in = cyc;
      @(negedge clk);
      if (f) sent++;
    end
    in_valid = 0;
    while (!done) @(negedge clk);
    checks++;
    if (nout != nrows * l) begin failures++; $display("FAIL: %0d outputs, want %0d", nout, nrows * l); end
    if (!gaps) begin
      checks++;
      // the last result is registered one cycle after its final block
      if (last_out - first_in != nrows * l * NB) begin
        failures++;
        $display("FAIL: %0d cycles for %0d pixels, want %0d", last_out - first_in, nrows, nrows * l * NB);
      end
    end
  endtask

  initial begin
    start = 0; in_valid = 0; rows = '0; num_pc = '0; out_base = '0; wr_gaps = 0; cyc = 0; nout = 0;
    for (int k = 0; k < BMAX; k++) in_data[k] = '0;
    for (int c = 0; c < B; c++) begin
      mean[c] = '0;
      for (int k = 0; k < B; k++) pc[c][k] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(50, 3, 1'b0);
    run(RMAX, 3, 1'b1);
    run(30, 1, 1'b1);
    run(20, B, 1'b0);
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
