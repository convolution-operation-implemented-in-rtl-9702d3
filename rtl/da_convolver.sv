// da_convolver: bit-parallel distributed-arithmetic convolution.
//
// Uses y(i) = sum_j 2^j sum_k h(k) x_j(i-k), where x_j is bit j of a sample:
// the work is done bit plane by bit plane instead of tap by tap. The taps are
// split into NG = ceil(N/G) groups of G; for every bit plane j and group g, the
// j-th bits of the group's samples address a da_lut holding every sum of the
// group's coefficients. All X_W planes are evaluated at once, so a result is
// produced every cycle; the X_W*NG table outputs, each weighted by 2^j, go into
// one adder_tree, placed plane by plane, group by group; the tree sizes each
// adder from the table ranges, which follow from the coefficients. Taps beyond N in the
// last group get coefficient zero.
//
// Interface: taps[k] = x(i-k), unsigned X_W bits, qualified by taps_valid;
// coefficients are constants (COEFFS, coefficient k in bits [k*H_W +: H_W]).
// Timing: the tables are combinational, so y/y_valid follow the taps after the
// adder tree latency, ceil(ceil(log2(X_W*NG))/K) cycles; one result per cycle.
// The bit-plane reordering is the scheme; evaluating all planes in parallel,
// the group size of 4 and unsigned samples are choices made here.
module da_convolver #(
  parameter int unsigned        N      = conv_pkg::DEF_N,
  parameter int unsigned        X_W    = conv_pkg::DEF_X_W,
  parameter int unsigned        H_W    = conv_pkg::DEF_H_W,
  parameter int unsigned        G      = 4,
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

  localparam int unsigned NG    = (N + G - 1) / G;
  localparam int unsigned N_OPS = X_W * NG;
  localparam int unsigned O_W   = H_W + ((G > 1) ? $clog2(G) : 0);

  // Coefficients padded with zeros to NG*G taps.
  localparam logic [NG*G*H_W-1:0] COEFFS_PAD = (NG * G * H_W)'(COEFFS);

  // Operand ranges for sizing the adders: the table of group g spans the sum of
  // its negative coefficients to the sum of its positive ones, times 2^j.
  function automatic logic [64*N_OPS-1:0] op_bound(bit hi);
    logic [64*N_OPS-1:0] r;
    longint              sn;
    longint              sp;
    longint              h;
    r = '0;
    for (int unsigned gg = 0; gg < NG; gg++) begin
      sn = 0;
      sp = 0;
      for (int unsigned t = 0; t < G; t++) begin
        h = longint'($signed(COEFFS_PAD[(gg*G + t)*H_W +: H_W]));
        if (h < 0) sn += h;
        else       sp += h;
      end
      for (int unsigned jj = 0; jj < X_W; jj++)
        r[64*(jj*NG + gg) +: 64] = (hi ? sp : sn) * (64'sd1 <<< jj);
    end
    return r;
  endfunction

  // Operand shifts: plane j is weighted by 2^j, and every sum of the group's
  // coefficients keeps the zero low bits they all share.
  function automatic logic [8*N_OPS-1:0] op_sh();
    logic [8*N_OPS-1:0] r;
    int unsigned         tz;
    int unsigned         t1;
    longint              h;
    for (int unsigned gg = 0; gg < NG; gg++) begin
      tz = 64;
      for (int unsigned t = 0; t < G; t++) begin
        h = longint'($signed(COEFFS_PAD[(gg*G + t)*H_W +: H_W]));
        t1 = conv_pkg::trailing_zeros(h);
        if (h != 0 && t1 < tz) tz = t1;
      end
      if (tz == 64) tz = 0;
      for (int unsigned jj = 0; jj < X_W; jj++)
        r[8*(jj*NG + gg) +: 8] = 8'(jj + tz);
    end
    return r;
  endfunction

  logic [X_W-1:0]        taps_pad [NG*G];
  logic signed [Y_W-1:0] ops      [N_OPS];

  for (genvar k = 0; k < NG * G; k++) begin : g_pad
    if (k < N) begin : g_real
      assign taps_pad[k] = taps[k];
    end else begin : g_none
      assign taps_pad[k] = '0;
    end
  end

  for (genvar j = 0; j < X_W; j++) begin : g_plane
    for (genvar g = 0; g < NG; g++) begin : g_group
      logic [G-1:0]          addr;
      logic signed [O_W-1:0] part;
      for (genvar t = 0; t < G; t++) begin : g_bit
        assign addr[t] = taps_pad[g*G + t][j];
      end
      da_lut #(
        .G      (G),
        .H_W    (H_W),
        .COEFFS (COEFFS_PAD[g*G*H_W +: G*H_W]),
        .O_W    (O_W)
      ) u_lut (
        .addr (addr),
        .dout (part)
      );
      assign ops[j*NG + g] = Y_W'(part) <<< j;
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
