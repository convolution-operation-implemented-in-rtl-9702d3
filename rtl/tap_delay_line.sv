// tap_delay_line: the sample history x(i), x(i-1) ... x(i-N+1) that a direct-form
// convolution y(i) = sum_k h(k) x(i-k) reads every cycle.
//
// An N-stage shift register of X_W-bit unsigned samples. On a cycle with
// in_valid high, x_in enters taps[0] and every older sample moves one place up;
// taps_valid is high in the following cycle, when taps[k] holds x(i-k) for the
// newest sample i. Without in_valid the taps hold their values. Reset clears the
// history to zero, so the first N-1 results after reset see zero samples before
// the stream (a choice of this design).
module tap_delay_line #(
  parameter int unsigned N   = conv_pkg::DEF_N,
  parameter int unsigned X_W = conv_pkg::DEF_X_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [X_W-1:0] x_in,
  output logic           taps_valid,
  output logic [X_W-1:0] taps [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps       <= '{default: '0};
      taps_valid <= 1'b0;
    end else begin
      taps_valid <= in_valid;
      if (in_valid) begin
        taps[0] <= x_in;
        for (int k = 1; k < N; k++) taps[k] <= taps[k-1];
      end
    end
  end

endmodule
