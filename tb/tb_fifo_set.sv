// tb_fifo_set: self-checking test of one FIFO set (BMAX lanes).
//
// A producer pushes numbered blocks (lane k carries a value derived from the
// block number and k) and a consumer pops them, both with random stalls. The
// test checks that every block comes out complete and in order, that a full
// set stops accepting after DEPTH blocks, and that an empty set shows no
// data. Inputs change on the falling clock edge only.
module tb_fifo_set;
  localparam int BMAX  = 4;
  localparam int DEPTH = 4;
  localparam int NBLK  = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data [BMAX], out_data [BMAX];
  int checks = 0, failures = 0;
  int sent = 0, got = 0, full_seen = 0;

  fifo_set #(.BMAX(BMAX), .WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] lane_val(int n, int k);
    return 8'((n * 7 + k * 61 + 3) & 255);
  endfunction

  task automatic drive(input logic v, input logic r);
    in_valid  = v;
    out_ready = r;
    for (int k = 0; k < BMAX; k++) in_data[k] = lane_val(sent, k);
    #1;
  endtask

  initial begin
    drive(0, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (out_valid) begin failures++; $display("FAIL: valid after reset"); end
    // fill without reading: exactly DEPTH accepted
    repeat (DEPTH) begin
      drive(1, 0);
      checks++; if (!in_ready) begin failures++; $display("FAIL: not ready while filling"); end
      @(negedge clk);
      sent++;
    end
    drive(1, 0);
    checks++; if (in_ready) begin failures++; $display("FAIL: ready when full"); end else full_seen++;
    // random traffic
    while (got < NBLK) begin
      automatic logic fin, fout;
      drive((sent < NBLK) && ($urandom_range(0, 3) != 0), ($urandom_range(0, 3) != 0));
      fin  = in_valid && in_ready;
      fout = out_valid && out_ready;
      if (fout) begin
        for (int k = 0; k < BMAX; k++) begin
          checks++;
          if (out_data[k] !== lane_val(got, k)) begin
            failures++;
            $display("FAIL: block %0d lane %0d got %0d want %0d", got, k, out_data[k], lane_val(got, k));
          end
        end
      end
      @(negedge clk);
      if (fin) sent++;
      if (fout) got++;
    end
    drive(0, 0);
    checks++; if (out_valid) begin failures++; $display("FAIL: data left over"); end
    $display("full events %0d", full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
