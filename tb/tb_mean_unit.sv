// tb_mean_unit: self-checking test of the Mean unit.
//
// Streams rows random pixels (as NB blocks of BMAX bands, with random gaps in
// a second run) and checks that each band's mean, written into the mean
// memory port, equals floor(sum * 2^MF / rows), that each band is written
// exactly once, and, in the gap-free run, that the unit accepts one block per
// cycle (rows*NB cycles of streaming).
module tb_mean_unit;
  import pca_pkg::*;
  localparam int B    = 12;
  localparam int BMAX = 4;
  localparam int NB   = B / BMAX;
  localparam int RMAX = 300;

  logic clk = 0, rst_n = 0;
  logic start, in_valid, in_ready, mem_we, busy, done;
  logic [R_W-1:0] rows;
  logic [DW-1:0] in_data [BMAX];
  logic [$clog2(B)-1:0] mem_waddr;
  mean_t mem_wdata;

  mean_unit #(.B(B), .BMAX(BMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned x [RMAX][B];
  longint expm [B];
  int nwr [B];

  always @(posedge clk) if (rst_n && mem_we) begin
    nwr[mem_waddr] <= nwr[mem_waddr] + 1;
    checks++;
    if (longint'(mem_wdata) != expm[mem_waddr]) begin
      failures++;
      $display("FAIL: mean[%0d] = %0d, want %0d", mem_waddr, mem_wdata, expm[mem_waddr]);
    end
  end

  task automatic run(input int nrows, input bit gaps);
    int sent, cycles, first;
    for (int c = 0; c < B; c++) begin
      longint s = 0;
      for (int r = 0; r < nrows; r++) begin
        x[r][c] = $urandom_range(0, 255);
        s += x[r][c];
      end
      expm[c] = (s << MF) / nrows;
      nwr[c] = 0;
    end
    @(negedge clk);
    rows = R_W'(nrows); start = 1;
    @(negedge clk);
    start = 0;
    sent = 0; cycles = 0; first = -1;
    while (sent < nrows * NB) begin
      automatic bit f;
      in_valid = !gaps || ($urandom_range(0, 2) != 0);
      for (int k = 0; k < BMAX; k++) in_data[k] = DW'(x[sent / NB][(sent % NB) * BMAX + k]);
      #1;
      f = in_valid && in_ready;
      if (f && first < 0) first = cycles;
      @(negedge clk);
      cycles++;
      if (f) sent++;
    end
    in_valid = 0;
    if (!gaps) begin
      checks++;
      if (cycles - first != nrows * NB) begin
        failures++;
        $display("FAIL: %0d cycles to stream %0d pixels", cycles - first, nrows);
      end
    end
    while (!done) @(negedge clk);
    for (int c = 0; c < B; c++) begin
      checks++;
      if (nwr[c] != 1) begin failures++; $display("FAIL: band %0d written %0d times", c, nwr[c]); end
    end
  endtask

  initial begin
    start = 0; in_valid = 0; rows = '0;
    for (int k = 0; k < BMAX; k++) in_data[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(100, 1'b0);
    run(RMAX, 1'b1);
    run(7, 1'b1);
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
