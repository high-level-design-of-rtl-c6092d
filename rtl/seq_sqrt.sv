// seq_sqrt: unsigned integer square root, one result bit per clock.
//
// Digit-by-digit (restoring) method: each cycle two radicand bits enter the
// partial remainder and the trial value {root,01} is subtracted when it fits.
// After W/2 cycles done pulses for one cycle with root = floor(sqrt(rad)),
// held until the next start. W must be even. Used by the Jacobi rotation;
// the method is this implementation's choice.
module seq_sqrt #(
  parameter int W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   rad,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  localparam int HW = W / 2;
  localparam int CW = $clog2(HW + 1);

  logic [W-1:0]  x_q;
  logic [HW-1:0] q_q;
  logic [HW+1:0] r_q;
  logic [CW-1:0] cnt;
  logic [HW+1:0] r_shift, trial;
  logic          ge;

  assign r_shift = {r_q[HW-1:0], x_q[W-1:W-2]};
  assign trial   = {q_q, 2'b01};
  assign ge      = (r_shift >= trial);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q  <= '0;
      q_q  <= '0;
      r_q  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x_q  <= rad;
        q_q  <= '0;
        r_q  <= '0;
        cnt  <= CW'(HW);
        busy <= 1'b1;
      end else if (busy) begin
        x_q <= {x_q[W-3:0], 2'b00};
        r_q <= ge ? (r_shift - trial) : r_shift;
        q_q <= {q_q[HW-2:0], ge};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= {q_q[HW-2:0], ge};
        end
      end
    end
  end
endmodule
