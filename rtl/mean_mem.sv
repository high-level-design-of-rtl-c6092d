// mean_mem: internal memory that holds the mean vector of the input matrix.
//
// The Mean unit writes one band's mean per cycle through the write port
// (we, waddr, wdata). The Cov and Projection units need all means of a block
// in the same cycle, so the memory is kept fully partitioned: every entry is
// a register and the whole vector is read in parallel on rd_mean. A write is
// visible on the next cycle. Reset clears the vector. Its place between the
// Mean unit and the Cov and Projection units follows the accelerator's block
// diagram; full partitioning as registers is this implementation's choice.
module mean_mem #(
  parameter int B = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(B)-1:0] waddr,
  input  pca_pkg::mean_t       wdata,
  output pca_pkg::mean_t       rd_mean [B]
);
  pca_pkg::mean_t mem [B];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < B; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rd_mean = mem;

  assert property (@(posedge clk) disable iff (!rst_n) we |-> (int'(waddr) < B));
endmodule
