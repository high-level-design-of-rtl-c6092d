// tb_dispatcher: self-checking test of the Dispatcher.
//
// A memory model answers read requests in order after a random delay and
// with random request acceptance; the four FIFO-set inputs accept at random.
// The blocks seen on each stream are compared with the expected sequences:
// Mean and PU get P1..PNB of every pixel, Diag gets P1..PNB of every pixel,
// Off-diag gets, for every pixel, rounds ct = 1..NB-1 of P1..P(NB-ct). Read
// addresses must be in_base + r for the three passes in turn. Uses 16 bands
// in blocks of 4 (four blocks per pixel).
module tb_dispatcher;
  import pca_pkg::*;
  localparam int B    = 16;
  localparam int BMAX = 4;
  localparam int NB   = B / BMAX;
  localparam int NR   = 37;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [R_W-1:0] rows;
  logic [ADDR_W-1:0] in_base, rd_req_addr;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready;
  logic [B*DW-1:0] rd_rsp_data;
  logic mean_valid, mean_ready, diag_valid, diag_ready, off_valid, off_ready, pu_valid, pu_ready;
  logic [DW-1:0] blk_data [BMAX];
  phase_e phase;

  dispatcher #(.B(B), .BMAX(BMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] mem [NR][B];
  int exp_q [4][$];           // expected block tags per stream: pixel*64 + block
  int got [4], nreq, stalls;
  logic [ADDR_W-1:0] pend_addr [$];
  int pend_time [$];
  int cyc;

  function automatic logic [DW-1:0] val(int r, int c);
    return DW'((r * 13 + c * 29 + 5) & 255);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // memory: accepts requests at random, answers in order after 1..4 cycles
  always @(negedge clk) begin
    rd_req_ready <= ($urandom_range(0, 3) != 0);
    if (pend_addr.size() > 0 && pend_time[0] <= cyc) begin
      rd_rsp_valid <= 1'b1;
      for (int c = 0; c < B; c++) rd_rsp_data[c*DW +: DW] <= mem[pend_addr[0] - in_base][c];
    end else begin
      rd_rsp_valid <= 1'b0;
    end
    mean_ready <= ($urandom_range(0, 3) != 0);
    diag_ready <= ($urandom_range(0, 3) != 0);
    off_ready  <= ($urandom_range(0, 3) != 0);
    pu_ready   <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (rd_rsp_valid && rd_rsp_ready) begin
        void'(pend_addr.pop_front());
        void'(pend_time.pop_front());
      end
      if (rd_req_valid && rd_req_ready) begin
        check(rd_req_addr == in_base + ADDR_W'(nreq % NR), $sformatf("request %0d address %0d", nreq, rd_req_addr));
        pend_addr.push_back(rd_req_addr);
        pend_time.push_back(cyc + $urandom_range(1, 4));
        nreq <= nreq + 1;
      end
      if ((mean_valid && !mean_ready) || (diag_valid && !diag_ready) ||
          (off_valid && !off_ready) || (pu_valid && !pu_ready)) stalls <= stalls + 1;
      begin
        logic [3:0] f;
        f = {pu_valid && pu_ready, off_valid && off_ready, diag_valid && diag_ready, mean_valid && mean_ready};
        check($countones(f) <= 1, "more than one stream written");
        for (int s = 0; s < 4; s++) if (f[s]) begin
          int tag, r, b;
          tag = (exp_q[s].size() > 0) ? exp_q[s].pop_front() : -1;
          r = tag / 64; b = tag % 64;
          if (tag < 0) begin
            check(0, $sformatf("extra block on stream %0d", s));
          end else begin
            for (int k = 0; k < BMAX; k++)
              check(blk_data[k] == val(r, b * BMAX + k),
                    $sformatf("stream %0d pixel %0d block %0d lane %0d", s, r, b, k));
          end
          got[s] <= got[s] + 1;
        end
      end
  
    end
  end

  initial begin
    start = 0; rows = '0; in_base = 32'd1000; cyc = 0; nreq = 0; stalls = 0;
    rd_rsp_valid = 0; rd_rsp_data = '0; rd_req_ready = 0;
    mean_ready = 0; diag_ready = 0; off_ready = 0; pu_ready = 0;
    for (int s = 0; s < 4; s++) got[s] = 0;
    for (int r = 0; r < NR; r++) for (int c = 0; c < B; c++) mem[r][c] = val(r, c);
    for (int r = 0; r < NR; r++) begin
      for (int b = 0; b < NB; b++) begin
        exp_q[0].push_back(r * 64 + b);
        exp_q[1].push_back(r * 64 + b);
        exp_q[3].push_back(r * 64 + b);
      end
      for (int ct = 1; ct < NB; ct++)
        for (int b = 0; b < NB - ct; b++) exp_q[2].push_back(r * 64 + b);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rows = R_W'(NR); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    check(got[0] == NR * NB, "mean block count");
    check(got[1] == NR * NB, "diag block count");
    check(got[2] == NR * NB * (NB - 1) / 2, "off block count");
    check(got[3] == NR * NB, "pu block count");
    check(nreq == 3 * NR, "read count");
    check(!busy && phase == PH_IDLE, "idle at end");
    check(stalls > 0, "FIFO stalls exercised");
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
