// pipe_divider: fully pipelined unsigned divider, quotient and remainder.
//
// One restoring-division step per pipeline stage: stage k shifts the next
// dividend bit into the partial remainder and subtracts the divisor when it
// fits, producing quotient bit W-1-k. With an input register, W step stages
// and LATENCY-W-1 extra output stages the result appears exactly LATENCY
// clocks after the operands, and a new division may start on every clock.
// Dividing by zero gives an all-ones quotient. This stands in for the
// vendor-generated dividers the document uses; the 18-clock latency of the
// 16-bit instance is the document's figure.
module pipe_divider #(
  parameter int W       = 16,
  parameter int LATENCY = 18   // must be at least W+1
) (
  input  logic         clk,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  // Stage s holds the state after s division steps.
  logic [W-1:0] num_q [W+1];
  logic [W-1:0] den_q [W+1];
  logic [W-1:0] quo_q [W+1];
  logic [W-1:0] rem_q [W+1];

  always_ff @(posedge clk) begin
    num_q[0] <= dividend;
    den_q[0] <= divisor;
    quo_q[0] <= '0;
    rem_q[0] <= '0;
    for (int s = 0; s < W; s++) begin
      logic [W:0] trial;
      trial = {rem_q[s], num_q[s][W-1-s]};
      num_q[s+1] <= num_q[s];
      den_q[s+1] <= den_q[s];
      if (trial >= {1'b0, den_q[s]}) begin
        rem_q[s+1] <= W'(trial - {1'b0, den_q[s]});
        quo_q[s+1] <= quo_q[s] | (W'(1) << (W-1-s));
      end else begin
        rem_q[s+1] <= trial[W-1:0];
        quo_q[s+1] <= quo_q[s];
      end
    end
  end

  localparam int EXTRA = LATENCY - W - 1;

  generate
    if (EXTRA <= 0) begin : g_direct
      assign quotient  = quo_q[W];
      assign remainder = rem_q[W];
    end else begin : g_extra
      logic [W-1:0] qx [EXTRA];
      logic [W-1:0] rx [EXTRA];
      always_ff @(posedge clk) begin
        qx[0] <= quo_q[W];
        rx[0] <= rem_q[W];
        for (int i = 1; i < EXTRA; i++) begin
          qx[i] <= qx[i-1];
          rx[i] <= rx[i-1];
        end
      end
      assign quotient  = qx[EXTRA-1];
      assign remainder = rx[EXTRA-1];
    end
  endgenerate

endmodule
