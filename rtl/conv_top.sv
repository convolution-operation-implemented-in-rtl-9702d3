// conv_top: streaming N-tap constant-coefficient convolver,
// y(i) = sum_{k=0}^{N-1} h(k) x(i-k), built three ways on one sample history.
//
// A tap_delay_line keeps the last N samples. Its taps feed, side by side:
//   - mm_convolver: multiplierless, shifts and add/subtract from CSD digits;
//   - lm_convolver: look-up-table multipliers on C_W-bit slices of each sample;
//   - da_convolver: distributed arithmetic, one table per bit plane and tap group.
// Each ends in a pipelined ripple-carry adder tree with a register stage after
// every K adder layers. The three results are equal by construction; they differ
// in hardware cost and latency, so the top lets them be compared or one chosen.
//
// Interface: one unsigned X_W-bit sample per cycle with in_valid (no
// back-pressure). Each result y_* is signed Y_W bits with its own valid; with the
// defaults (8 taps, 8-bit samples and coefficients, K = 1) the latencies are
// 1 cycle in the delay line plus 5 (MM, 20 CSD operands), 4 (LM, 16 operands) and
// 4 (DA, 16 operands) cycles in the adder trees. Results appear in input order.
// The three schemes are the ones this design is about; building all three side
// by side, the tap count and the coefficient values are choices made here.
module conv_top #(
  parameter int unsigned      N      = conv_pkg::DEF_N,
  parameter int unsigned      X_W    = conv_pkg::DEF_X_W,
  parameter int unsigned      H_W    = conv_pkg::DEF_H_W,
  parameter logic [N*H_W-1:0] COEFFS = conv_pkg::DEF_COEFFS,
  parameter int unsigned      K      = 1,
  parameter int unsigned      C_W    = 4,
  parameter int unsigned      G      = 4,
  parameter int unsigned      Y_W    = conv_pkg::result_width(X_W, H_W, N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [X_W-1:0]        x_in,
  output logic                  y_mm_valid,
  output logic signed [Y_W-1:0] y_mm,
  output logic                  y_lm_valid,
  output logic signed [Y_W-1:0] y_lm,
  output logic                  y_da_valid,
  output logic signed [Y_W-1:0] y_da
);

  logic           taps_valid;
  logic [X_W-1:0] taps [N];

  tap_delay_line #(.N(N), .X_W(X_W)) u_taps (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .x_in       (x_in),
    .taps_valid (taps_valid),
    .taps       (taps)
  );

  mm_convolver #(.N(N), .X_W(X_W), .H_W(H_W), .COEFFS(COEFFS), .K(K), .Y_W(Y_W)) u_mm (
    .clk (clk), .rst_n (rst_n), .taps_valid (taps_valid), .taps (taps),
    .y_valid (y_mm_valid), .y (y_mm)
  );

  lm_convolver #(.N(N), .X_W(X_W), .H_W(H_W), .C_W(C_W), .COEFFS(COEFFS), .K(K), .Y_W(Y_W)) u_lm (
    .clk (clk), .rst_n (rst_n), .taps_valid (taps_valid), .taps (taps),
    .y_valid (y_lm_valid), .y (y_lm)
  );

  da_convolver #(.N(N), .X_W(X_W), .H_W(H_W), .G(G), .COEFFS(COEFFS), .K(K), .Y_W(Y_W)) u_da (
    .clk (clk), .rst_n (rst_n), .taps_valid (taps_valid), .taps (taps),
    .y_valid (y_da_valid), .y (y_da)
  );

endmodule
