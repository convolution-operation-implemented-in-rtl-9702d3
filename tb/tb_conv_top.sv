// tb_conv_top: end-to-end test of the convolver at its default configuration
// (8 taps, 8-bit pixels, 8-bit coefficients 3, -14, 25, 100, 90, 21, -9, 1, K = 1).
//
// A stream of pixels is fed through the top: first a synthetic image of 16 rows
// of 64 pixels (a gradient with a bright square and noise) sent back to back,
// then random pixels with random idle cycles, bursts of all-ones pixels and
// isolated bright pixels (impulse responses).
// A model history of the valid samples gives the reference y(i) = sum h(k) x(i-k)
// (zero history after reset). All three results (MM, LM, DA) must equal it and
// arrive exactly 6, 5 and 5 cycles after their sample: one cycle in the delay
// line, then ceil(log2 T) adder layers for T = 20, 16 and 16 operands.
// Mechanisms counted, each of which must occur: idle input cycles (outputs must
// hold their valid low), back-to-back samples, negative results (subtraction
// terms dominating), results from an all-ones history (largest magnitudes) and
// the first N-1 results that still read the reset history.
module tb_conv_top;
  localparam int N     = 8;
  localparam int X_W   = 8;
  localparam int Y_W   = 19;
  localparam int ROWS  = 16;
  localparam int COLS  = 64;
  localparam int NRAND = 3000;
  localparam int DEPTH = 32;
  localparam int LAT_MM = 6;
  localparam int LAT_LM = 5;
  localparam int LAT_DA = 5;
  localparam int H [N] = '{3, -14, 25, 100, 90, 21, -9, 1};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  logic                  in_valid;
  logic [X_W-1:0]        x_in;
  logic                  y_mm_valid, y_lm_valid, y_da_valid;
  logic signed [Y_W-1:0] y_mm, y_lm, y_da;

  conv_top dut (.clk, .rst_n, .in_valid, .x_in,
                .y_mm_valid, .y_mm, .y_lm_valid, .y_lm, .y_da_valid, .y_da);

  int hist [N];
  int exp_y [DEPTH];
  logic exp_v [DEPTH];

  int n_idle = 0, n_b2b = 0, n_neg = 0, n_allones = 0, n_reset_hist = 0, n_samples = 0;
  logic prev_valid = 1'b0;

  task automatic check(string name, logic gv, logic signed [Y_W-1:0] got, int lat);
    int idx;
    idx = (cyc - lat + DEPTH) % DEPTH;
    checks++;
    if (gv !== exp_v[idx] || (exp_v[idx] && got !== Y_W'(exp_y[idx]))) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s cycle %0d: valid %0d/%0d value %0d expected %0d",
                 name, cyc, gv, exp_v[idx], got, exp_y[idx]);
    end
  endtask

  // Drives one cycle: v = sample valid, x = pixel.
  task automatic step(logic v, logic [X_W-1:0] x);
    int s;
    logic all1;
    @(negedge clk);
    in_valid = v;
    x_in = x;
    if (v) begin
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x);
      s = 0;
      all1 = 1'b1;
      for (int k = 0; k < N; k++) begin
        s += H[k] * hist[k];
        if (hist[k] != 255) all1 = 1'b0;
      end
      if (s < 0) n_neg++;
      if (all1) n_allones++;
      if (n_samples < N - 1) n_reset_hist++;
      if (prev_valid) n_b2b++;
      n_samples++;
      exp_y[cyc % DEPTH] = s;
    end else begin
      n_idle++;
      exp_y[cyc % DEPTH] = 0;
    end
    exp_v[cyc % DEPTH] = v;
    prev_valid = v;
    @(posedge clk);
    cyc++;
    #1;
    if (cyc > LAT_MM) begin
      check("MM", y_mm_valid, y_mm, LAT_MM);
      check("LM", y_lm_valid, y_lm, LAT_LM);
      check("DA", y_da_valid, y_da, LAT_DA);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
    $display("%s: %0d", what, n);
  endtask

  initial begin : watchdog
    repeat (ROWS * COLS + 2 * NRAND + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int px;
    foreach (hist[k]) hist[k] = 0;
    for (int i = 0; i < DEPTH; i++) begin
      exp_y[i] = 0; exp_v[i] = 1'b0;
    end
    in_valid = 1'b0;
    x_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Synthetic image, row by row, one pixel per cycle.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        px = 2 * c + 4 * r + int'($urandom_range(15));
        if (r >= 4 && r < 12 && c >= 20 && c < 40) px = 250 + int'($urandom_range(5));
        if (px > 255) px = 255;
        step(1'b1, X_W'(px));
      end
    // Random pixels, idle cycles and bursts of all-ones pixels.
    for (int it = 0; it < NRAND; it++) begin
      if (it % 300 == 100) begin
        repeat (N + 2) step(1'b1, '1);
      end else if (it % 300 == 200) begin
        // An isolated bright pixel: the impulse response h(k), negative taps included.
        step(1'b1, '1);
        repeat (N + 1) step(1'b1, '0);
      end else begin
        step($urandom_range(3) != 0, X_W'($urandom()));
      end
    end
    repeat (LAT_MM + 2) step(1'b0, '0);
    $display("adder bits: MM %0d, LM %0d, DA %0d", dut.u_mm.u_tree.ADDER_BITS,
             dut.u_lm.u_tree.ADDER_BITS, dut.u_da.u_tree.ADDER_BITS);
    need("idle input cycles", n_idle);
    need("back-to-back samples", n_b2b);
    need("negative results", n_neg);
    need("all-ones histories", n_allones);
    need("results reading the reset history", n_reset_hist);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
