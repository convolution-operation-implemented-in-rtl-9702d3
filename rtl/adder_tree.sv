// adder_tree: pipelined multi-operand adder/subtractor built from two-input
// ripple-carry adders, as suited to FPGA fabrics with a dedicated carry chain.
//
// How it works: operands are combined layer by layer. In every layer neighbours
// 2j and 2j+1 of the previous layer form one adder; an odd node at the end of a
// layer is passed up unchanged, so an n-input tree has ceil(log2 n) layers. The
// pairing order is therefore the order in which the caller places the operands:
// choosing that order well is what lowers the adder cost, and is done when the
// operands are laid out, not in this block.
//
// Operands flagged in SUB are subtracted. Each node carries a sign fixed at
// elaboration: two positive or two negative children are added (a node of two
// negative children stays negative), mixed children are subtracted (positive
// minus negative). Only if every operand is negative is the root negative; it is
// then negated once at the output.
//
// Widths follow value ranges, not only input widths: operand i is known to lie
// in [IN_LO[i], IN_HI[i]] (64-bit signed fields, operand i in bits
// [64*i +: 64]). From these the range of every node is worked out at
// elaboration and each adder is made just wide enough for it, so the number of
// adder bits (ADDER_BITS, the full/half adders of the tree) is what the ranges
// demand. The defaults assume the full W-bit signed range for every operand.
// The operands arrive W bits wide; bits above an operand's range are ignored.
// Operand shifts are used as well: the IN_SH[8*i +: 8] low bits of operand i
// are known to be zero (an operand x << p has p). Where one operand of an adder
// has such zero bits, the other operand's low bits pass straight to the sum
// (for a subtraction only when the subtrahend has them), and only the bits
// above form the carry chain. ADDER_BITS counts those carry-chain bits.
//
// Pipelining follows the FPGA rule of one register stage after every K adder
// layers (not inside a carry chain); the last layer is always registered.
//
// Timing: dout/out_valid follow din/in_valid after LATENCY = ceil(layers/K)
// cycles (1 cycle for a single operand), one new operand set per cycle, no stall.
// dout is the root sign-extended or truncated to W bits: exact when the sum
// fits in W bits. Only the valid bits are reset.
//
// The layer-wise ripple-carry structure, the K-layer pipelining and the sizing
// from ranges and shifts are the scheme this block implements; the node sign
// rules, the uniform W-bit ports and the bypass bookkeeping are its own choices.
module adder_tree #(
  parameter int unsigned        N_IN  = 16,
  parameter int unsigned        W     = 24,
  parameter int unsigned        K     = 1,
  parameter logic [N_IN-1:0]    SUB   = '0,
  parameter logic [64*N_IN-1:0] IN_LO = {N_IN{64'(-(64'sd1 <<< (W - 1)))}},
  parameter logic [64*N_IN-1:0] IN_HI = {N_IN{64'((64'sd1 <<< (W - 1)) - 1)}},
  parameter logic [8*N_IN-1:0]  IN_SH = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din [N_IN],
  output logic                out_valid,
  output logic signed [W-1:0] dout
);

  localparam int unsigned LAYERS = (N_IN <= 1) ? 0 : $clog2(N_IN);

  // Number of nodes in layer l (layer 0 holds the operands).
  function automatic int unsigned nodes(int unsigned l);
    int unsigned c;
    c = N_IN;
    for (int unsigned i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  // Smallest two's complement width that holds every value in [lo, hi].
  function automatic int unsigned range_width(longint lo, longint hi);
    int unsigned w;
    w = 1;
    while ((lo < -(64'sd1 <<< (w - 1))) || (hi > ((64'sd1 <<< (w - 1)) - 1))) w++;
    return w;
  endfunction

  // Node table, worked out once at elaboration. Record (l*N_IN + j), 32 bits,
  // describes node j of layer l:
  //   [7:0]   width, the smallest that holds the node's value range
  //   [15:8]  known zero low bits: the fewer of the two children's
  //   [23:16] low bits that need no carry logic (adders only): the larger zero
  //           count of the two operands for an addition, the subtrahend's for a
  //           subtraction, always leaving at least one bit to the adder
  //   [24]    sign: set when the node holds a value to be subtracted
  // A node holds a + b for equal child signs and (positive - negative) otherwise.
  localparam int unsigned NREC = (LAYERS + 1) * N_IN;

  function automatic logic [32*NREC-1:0] tree_info();
    logic [32*NREC-1:0] r;
    longint             lo_c [N_IN];
    longint             hi_c [N_IN];
    int unsigned        tz_c [N_IN];
    logic [N_IN-1:0]    ng_c;
    longint             lo_n;
    longint             hi_n;
    int unsigned        tz_n;
    int unsigned        ps_n;
    logic               ng_n;
    int unsigned        w_n;
    int unsigned        c;
    r = '0;
    ng_c = SUB;
    for (int unsigned i = 0; i < N_IN; i++) begin
      lo_c[i] = longint'($signed(IN_LO[64*i +: 64]));
      hi_c[i] = longint'($signed(IN_HI[64*i +: 64]));
      tz_c[i] = int'(IN_SH[8*i +: 8]);
      r[32*i +: 32] = {7'd0, ng_c[i], 8'd0, 8'(tz_c[i]), 8'(range_width(lo_c[i], hi_c[i]))};
    end
    c = N_IN;
    for (int unsigned l = 1; l <= LAYERS; l++) begin
      for (int unsigned j = 0; j < (c + 1) / 2; j++) begin
        ps_n = 0;
        if (2 * j + 1 >= c) begin
          lo_n = lo_c[2*j];
          hi_n = hi_c[2*j];
          ng_n = ng_c[2*j];
          tz_n = tz_c[2*j];
        end else begin
          tz_n = (tz_c[2*j] < tz_c[2*j+1]) ? tz_c[2*j] : tz_c[2*j+1];
          if (ng_c[2*j] == ng_c[2*j+1]) begin
            lo_n = lo_c[2*j] + lo_c[2*j+1];
            hi_n = hi_c[2*j] + hi_c[2*j+1];
            ng_n = ng_c[2*j];
            ps_n = (tz_c[2*j] > tz_c[2*j+1]) ? tz_c[2*j] : tz_c[2*j+1];
          end else if (ng_c[2*j+1]) begin
            lo_n = lo_c[2*j] - hi_c[2*j+1];
            hi_n = hi_c[2*j] - lo_c[2*j+1];
            ng_n = 1'b0;
            ps_n = tz_c[2*j+1];
          end else begin
            lo_n = lo_c[2*j+1] - hi_c[2*j];
            hi_n = hi_c[2*j+1] - lo_c[2*j];
            ng_n = 1'b0;
            ps_n = tz_c[2*j];
          end
        end
        w_n = range_width(lo_n, hi_n);
        if (ps_n >= w_n) ps_n = w_n - 1;
        lo_c[j] = lo_n;
        hi_c[j] = hi_n;
        tz_c[j] = tz_n;
        ng_c[j] = ng_n;
        r[32*(l*N_IN + j) +: 32] = {7'd0, ng_n, 8'(ps_n), 8'(tz_n), 8'(w_n)};
      end
      c = (c + 1) / 2;
    end
    return r;
  endfunction

  localparam logic [32*NREC-1:0] INFO = tree_info();

  function automatic int unsigned node_width(int unsigned l, int unsigned j);
    return int'(INFO[32*(l*N_IN + j) +: 8]);
  endfunction

  function automatic int unsigned node_tz(int unsigned l, int unsigned j);
    return int'(INFO[32*(l*N_IN + j) + 8 +: 8]);
  endfunction

  function automatic int unsigned pass_bits(int unsigned l, int unsigned j);
    return int'(INFO[32*(l*N_IN + j) + 16 +: 8]);
  endfunction

  function automatic bit node_neg(int unsigned l, int unsigned j);
    return INFO[32*(l*N_IN + j) + 24];
  endfunction

  // Total carry-chain length of all adders: the full/half adder bits of the tree.
  function automatic int unsigned adder_bits();
    int unsigned s;
    s = 0;
    for (int unsigned l = 1; l <= LAYERS; l++)
      for (int unsigned j = 0; j < nodes(l); j++)
        if (2 * j + 1 < nodes(l - 1)) s += node_width(l, j) - pass_bits(l, j);
    return s;
  endfunction

  // A register stage follows layer l if l is a multiple of K, and after the last layer.
  function automatic bit reg_after(int unsigned l);
    return (l == LAYERS) || ((l % K) == 0);
  endfunction

  localparam bit              ROOT_NEG   = node_neg(LAYERS, 0);
  localparam int unsigned     LATENCY    = (LAYERS == 0) ? 1 : (LAYERS + K - 1) / K;
  localparam int unsigned     ADDER_BITS = adder_bits();

  initial begin
    assert (K >= 1) else $error("adder_tree: K must be at least 1");
  end

  for (genvar l = 0; l <= LAYERS; l++) begin : g_layer
    localparam int unsigned     NC    = nodes(l);
    localparam int unsigned     NP    = (l == 0) ? N_IN : nodes(l - 1);
    // A layer-0 register exists only for a single operand, which has no adder layer.
    localparam bit              REG   = (l == 0) ? (LAYERS == 0) : reg_after(l);
    logic vld;

    for (genvar j = 0; j < NC; j++) begin : g_node
      localparam int unsigned NW = node_width(l, j);
      logic signed [NW-1:0] s;
      logic signed [NW-1:0] v;
      if (l == 0) begin : g_in
        assign s = NW'(din[j]);
      end else if (2 * j + 1 < NP) begin : g_pair
        localparam int unsigned P  = pass_bits(l, j);
        localparam bit          AZ = node_tz(l - 1, 2 * j) >= node_tz(l - 1, 2 * j + 1);
        logic signed [NW-1:0] a;
        logic signed [NW-1:0] b;
        logic signed [NW-1:0] lo;   // operand whose low P bits pass through
        logic signed [NW-P-1:0] hi; // carry-chain part, bits NW-1 .. P
        assign a = NW'(g_layer[l-1].g_node[2*j].v);
        assign b = NW'(g_layer[l-1].g_node[2*j+1].v);
        if (node_neg(l - 1, 2 * j) == node_neg(l - 1, 2 * j + 1)) begin : g_sum
          assign hi = a[NW-1:P] + b[NW-1:P];
          assign lo = AZ ? b : a;
        end else if (node_neg(l - 1, 2 * j + 1)) begin : g_diff
          assign hi = a[NW-1:P] - b[NW-1:P];
          assign lo = a;
        end else begin : g_rdiff
          assign hi = b[NW-1:P] - a[NW-1:P];
          assign lo = b;
        end
        if (P == 0) begin : g_full
          assign s = hi;
        end else begin : g_split
          assign s = {hi, lo[P-1:0]};
        end
      end else begin : g_pass
        assign s = NW'(g_layer[l-1].g_node[2*j].v);
      end
      if (REG) begin : g_reg
        always_ff @(posedge clk) v <= s;
      end else begin : g_comb
        assign v = s;
      end
    end

    if (l == 0) begin : g_vin
      if (REG) begin : g_reg
        always_ff @(posedge clk or negedge rst_n)
          if (!rst_n) vld <= 1'b0;
          else        vld <= in_valid;
      end else begin : g_comb
        assign vld = in_valid;
      end
    end else begin : g_vnext
      if (REG) begin : g_reg
        always_ff @(posedge clk or negedge rst_n)
          if (!rst_n) vld <= 1'b0;
          else        vld <= g_layer[l-1].vld;
      end else begin : g_comb
        assign vld = g_layer[l-1].vld;
      end
    end
  end

  logic signed [W-1:0] root;
  assign root      = W'(g_layer[LAYERS].g_node[0].v);
  assign dout      = ROOT_NEG ? -root : root;
  assign out_valid = g_layer[LAYERS].vld;

endmodule
