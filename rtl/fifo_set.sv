// fifo_set: one set of BMAX parallel streaming FIFOs between the dispatcher
// and one unit of the PCA core.
//
// Each FIFO carries one band of a block, so a block of BMAX samples moves
// through the set in one transfer. All lanes are written together and read
// together: the set accepts when every lane has room and delivers when every
// lane holds data, so the lanes never drift apart. Splitting the set into
// BMAX FIFOs follows the accelerator's description; the depth and the
// valid/ready handshake are this implementation's choice.
module fifo_set #(
  parameter int BMAX  = 4,
  parameter int WIDTH = pca_pkg::DW,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data  [BMAX],
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data [BMAX]
);
  logic [BMAX-1:0] lane_in_ready, lane_out_valid;

  assign in_ready  = &lane_in_ready;
  assign out_valid = &lane_out_valid;

  for (genvar k = 0; k < BMAX; k++) begin : g_lane
    stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid && in_ready),
      .in_ready (lane_in_ready[k]),
      .in_data  (in_data[k]),
      .out_valid(lane_out_valid[k]),
      .out_ready(out_ready && out_valid),
      .out_data (out_data[k])
    );
  end
endmodule
