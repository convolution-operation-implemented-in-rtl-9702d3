// lm_convolver: convolution with look-up-table multipliers.
//
// Computes y(i) = sum_k h(k) x(i-k). Each X_W-bit sample x(i-k) is cut into
// NC = ceil(X_W/C_W) slices of C_W bits; slice c addresses an lm_lut holding
// h(k) times every possible slice value, and its output is weighted by
// 2^(c*C_W). All N*NC partial products go into one adder_tree, placed tap by
// tap, lowest slice first; the tree sizes each adder from the operands' value
// ranges, which follow from the coefficients. With the default 8-bit samples and C_W = 4 each
// multiplier is two 16-entry tables and one addition.
//
// Interface: taps[k] = x(i-k), unsigned X_W bits, qualified by taps_valid;
// coefficients are constants (COEFFS, coefficient k in bits [k*H_W +: H_W]).
// Timing: the tables are combinational, so y/y_valid follow the taps after the
// adder tree latency, ceil(ceil(log2(N*NC))/K) cycles; one result per cycle.
// Slicing the sample, tables and an adder tree are the scheme; the slice width
// of 4 (a 4-input FPGA LUT) and the combinational tables are choices made here.
module lm_convolver #(
  parameter int unsigned        N      = conv_pkg::DEF_N,
  parameter int unsigned        X_W    = conv_pkg::DEF_X_W,
  parameter int unsigned        H_W    = conv_pkg::DEF_H_W,
  parameter int unsigned        C_W    = 4,
  parameter logic [N*H_W-1:0]   COEFFS = conv_pkg::DEF_COEFFS,
  parameter int unsigned        K      = 1,
  parameter int unsigned        Y_W    = conv_pkg::result_width(X_W, H_W, N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  taps_valid,
  input  logic [X_W-1:0]        taps [N],
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y
);

  localparam int unsigned NC    = (X_W + C_W - 1) / C_W;
  localparam int unsigned N_OPS = N * NC;

  function automatic longint coef(int unsigned k);
    return longint'($signed(COEFFS[k*H_W +: H_W]));
  endfunction

  // Operand ranges for sizing the adders: slice c of tap k holds at most
  // 2^b - 1 (b = bits of the slice), so its operand lies between 0 and
  // h(k) * (2^b - 1) * 2^(c*C_W).
  function automatic logic [64*N_OPS-1:0] op_bound(bit hi);
    logic [64*N_OPS-1:0] r;
    longint              p;
    int unsigned         b;
    r = '0;
    for (int unsigned kk = 0; kk < N; kk++)
      for (int unsigned cc = 0; cc < NC; cc++) begin
        b = (X_W - cc * C_W < C_W) ? X_W - cc * C_W : C_W;
        p = coef(kk) * ((64'sd1 <<< b) - 1) * (64'sd1 <<< (cc * C_W));
        if (hi) r[64*(kk*NC + cc) +: 64] = (p > 0) ? p : 0;
        else    r[64*(kk*NC + cc) +: 64] = (p < 0) ? p : 0;
      end
    return r;
  endfunction

  // Operand shifts: slice c of tap k is weighted by 2^(c*C_W), and a product
  // with h(k) keeps h(k)'s zero low bits.
  function automatic logic [8*N_OPS-1:0] op_sh();
    logic [8*N_OPS-1:0] r;
    for (int unsigned kk = 0; kk < N; kk++)
      for (int unsigned cc = 0; cc < NC; cc++)
        r[8*(kk*NC + cc) +: 8] = 8'(cc * C_W + conv_pkg::trailing_zeros(coef(kk)));
    return r;
  endfunction

  logic signed [Y_W-1:0] ops [N_OPS];

  for (genvar k = 0; k < N; k++) begin : g_tap
    logic [NC*C_W-1:0] xs;
    assign xs = (NC * C_W)'(taps[k]);
    for (genvar c = 0; c < NC; c++) begin : g_slice
      logic signed [H_W+C_W-1:0] prod;
      lm_lut #(
        .C_W  (C_W),
        .H_W  (H_W),
        .COEF (int'($signed(COEFFS[k*H_W +: H_W])))
      ) u_lut (
        .addr (xs[c*C_W +: C_W]),
        .dout (prod)
      );
      assign ops[k*NC + c] = Y_W'(prod) <<< (c * C_W);
    end
  end

  adder_tree #(
    .N_IN (N_OPS),
    .W    (Y_W),
    .K    (K),
    .SUB   ('0),
    .IN_LO (op_bound(1'b0)),
    .IN_HI (op_bound(1'b1)),
    .IN_SH (op_sh())
  ) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (taps_valid),
    .din       (ops),
    .out_valid (y_valid),
    .dout      (y)
  );

endmodule
