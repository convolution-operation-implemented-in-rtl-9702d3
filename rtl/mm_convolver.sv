// mm_convolver: multiplierless constant-coefficient convolution.
//
// Computes y(i) = sum_k h(k) x(i-k) with no multipliers. Each coefficient is
// recoded at elaboration into canonic signed digits (CSD: digits 0, +1, -1 with
// no two adjacent non-zero digits, the fewest non-zero digits of any signed
// binary form). Every non-zero digit d at position p of h(k) becomes one
// operand x(i-k) << p of a single adder_tree, flagged for subtraction when
// d = -1. Example: h = 14 = 16 - 2 gives (x << 4) - (x << 1).
// Operands are placed tap by tap, lowest digit first; that placement is the
// pairing order of the adder tree. Each operand's value range is handed to the
// tree with its shift, which sizes every adder to the range it must hold and
// lets the p zero low bits of x << p bypass the carry chains.
//
// Interface: taps[k] = x(i-k), unsigned X_W bits, qualified by taps_valid;
// coefficients are constants (COEFFS, coefficient k in bits [k*H_W +: H_W]).
// Timing: y/y_valid follow the taps after the adder tree latency,
// ceil(ceil(log2 T)/K) cycles for T operands; one result per cycle.
// CSD recoding and one shared adder tree are the scheme; the operand order is
// this design's simple default, not an optimised one.
module mm_convolver #(
  parameter int unsigned        N      = conv_pkg::DEF_N,
  parameter int unsigned        X_W    = conv_pkg::DEF_X_W,
  parameter int unsigned        H_W    = conv_pkg::DEF_H_W,
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

  // CSD digit positions examined per coefficient (an H_W-bit value needs at most H_W+1).
  localparam int unsigned NPOS = H_W + 1;

  function automatic int coef(int unsigned k);
    return int'($signed(COEFFS[k*H_W +: H_W]));
  endfunction

  // Number of non-zero CSD digits before digit (k, p) in tap-major order.
  function automatic int unsigned term_index(int unsigned k, int unsigned p);
    int unsigned c;
    c = 0;
    for (int unsigned kk = 0; kk < N; kk++)
      for (int unsigned pp = 0; pp < NPOS; pp++)
        if ((kk < k) || ((kk == k) && (pp < p)))
          if (conv_pkg::csd_digit(coef(kk), int'(pp)) != 0) c++;
    return c;
  endfunction

  localparam int unsigned N_TERMS = term_index(N, 0);
  localparam int unsigned N_OPS   = (N_TERMS == 0) ? 1 : N_TERMS;

  function automatic logic [N_OPS-1:0] sub_mask();
    logic [N_OPS-1:0] m;
    m = '0;
    for (int unsigned kk = 0; kk < N; kk++)
      for (int unsigned pp = 0; pp < NPOS; pp++)
        if (conv_pkg::csd_digit(coef(kk), int'(pp)) < 0) m[term_index(kk, pp)] = 1'b1;
    return m;
  endfunction

  // Operand ranges for sizing the adders: x << p lies in [0, (2^X_W - 1) * 2^p].
  function automatic logic [64*N_OPS-1:0] op_hi();
    logic [64*N_OPS-1:0] r;
    r = '0;
    for (int unsigned kk = 0; kk < N; kk++)
      for (int unsigned pp = 0; pp < NPOS; pp++)
        if (conv_pkg::csd_digit(coef(kk), int'(pp)) != 0)
          r[64*term_index(kk, pp) +: 64] = ((64'sd1 <<< X_W) - 1) <<< pp;
    return r;
  endfunction

  // Operand shifts: x << p has p zero low bits.
  function automatic logic [8*N_OPS-1:0] op_sh();
    logic [8*N_OPS-1:0] r;
    r = '0;
    for (int unsigned kk = 0; kk < N; kk++)
      for (int unsigned pp = 0; pp < NPOS; pp++)
        if (conv_pkg::csd_digit(coef(kk), int'(pp)) != 0)
          r[8*term_index(kk, pp) +: 8] = 8'(pp);
    return r;
  endfunction

  logic signed [Y_W-1:0] ops [N_OPS];

  if (N_TERMS == 0) begin : g_zero
    // All coefficients are zero: the sum is a constant zero operand.
    assign ops[0] = '0;
  end else begin : g_terms
    for (genvar k = 0; k < N; k++) begin : g_tap
      for (genvar p = 0; p < NPOS; p++) begin : g_digit
        if (conv_pkg::csd_digit(coef(k), p) != 0) begin : g_op
          localparam int unsigned IDX = term_index(k, p);
          assign ops[IDX] = Y_W'({1'b0, taps[k]}) << p;
        end
      end
    end
  end

  adder_tree #(
    .N_IN (N_OPS),
    .W    (Y_W),
    .K    (K),
    .SUB   (sub_mask()),
    .IN_LO ('0),
    .IN_HI (op_hi()),
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
