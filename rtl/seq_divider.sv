// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// On start (while idle) it loads num and den and then shifts the numerator
// into a partial remainder MSB first; each cycle it subtracts den when the
// remainder allows and records the quotient bit. After NW cycles done pulses
// for one cycle with quot = num / den (truncated) and rem = num % den, which
// stay valid until the next start. Division by zero returns an all-ones
// quotient. A multi-cycle divider is this implementation's choice for the
// divisions of the mean, the covariance and the Jacobi rotation.
module seq_divider #(
  parameter int NW = 32,  // numerator and quotient width
  parameter int DW = 16   // denominator width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot,
  output logic [DW-1:0] rem
);
  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] n_q;
  logic [DW-1:0] d_q;
  logic [DW:0]   r_q;
  logic [CW-1:0] cnt;
  logic [DW:0]   r_shift;
  logic          ge;

  assign r_shift = {r_q[DW-1:0], n_q[NW-1]};
  assign ge      = (r_shift >= {1'b0, d_q});
  assign rem     = r_q[DW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q  <= '0;
      d_q  <= '0;
      r_q  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        n_q  <= num;
        d_q  <= den;
        r_q  <= '0;
        cnt  <= CW'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        n_q <= {n_q[NW-2:0], ge};
        r_q <= ge ? (r_shift - {1'b0, d_q}) : r_shift;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= {n_q[NW-2:0], ge};
        end
      end
    end
  end
endmodule
