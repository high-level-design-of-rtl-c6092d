// tb_mean_mem: self-checking test of the mean-vector memory.
//
// Checks that reset clears every entry, that a write changes exactly the
// addressed entry from the next cycle on, and that all entries are readable
// at once.
module tb_mean_mem;
  import pca_pkg::*;
  localparam int B = 12;

  logic clk = 0, rst_n = 0;
  logic we;
  logic [$clog2(B)-1:0] waddr;
  mean_t wdata;
  mean_t rd_mean [B];
  mean_t model [B];

  mean_mem #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic compare(input string when);
    for (int i = 0; i < B; i++) begin
      checks++;
      if (rd_mean[i] != model[i]) begin
        failures++;
        $display("FAIL (%s): entry %0d = %0d, want %0d", when, i, rd_mean[i], model[i]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < B; i++) model[i] = '0;
    @(negedge clk);
    compare("reset");
    for (int n = 0; n < 200; n++) begin
      we    = ($urandom_range(0, 3) != 0);
      waddr = $clog2(B)'($urandom_range(0, B - 1));
      wdata = mean_t'($urandom);
      @(negedge clk);
      if (we) model[waddr] = wdata;
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
