// tb_lm_convolver: self-checking test of lm_convolver.
//
// Two instances are driven with the same random taps and a random valid pattern:
// A with edge-case coefficients h = -128, 127, 0, 14, -1, 85, -86, 64 and K = 1,
// B with the default coefficients, 3-bit slices (24 operands) and K = 2. Every cycle each output is
// compared with sum_k h(k) x(i-k) computed here, and it must arrive exactly
// 4 (A) and 3 (B) cycles after its taps: the adder tree depth over K.
// Some sets use all-ones samples to exercise the largest magnitudes.
module tb_lm_convolver;
  localparam int N    = 8;
  localparam int X_W  = 8;
  localparam int H_W  = 8;
  localparam int Y_W  = 19;
  localparam int NIT  = 3000;
  localparam int DEPTH = 32;
  localparam int LAT_A = 4;
  localparam int LAT_B = 3;

  localparam logic [N*H_W-1:0] COEF_A =
      {8'sd64, -8'sd86, 8'sd85, -8'sd1, 8'sd14, 8'sd0, 8'sd127, -8'sd128};
  localparam logic [N*H_W-1:0] COEF_B =
      {8'sd1, -8'sd9, 8'sd21, 8'sd90, 8'sd100, 8'sd25, -8'sd14, 8'sd3};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  logic                  taps_valid;
  logic [X_W-1:0]        taps [N];
  logic                  va, vb;
  logic signed [Y_W-1:0] ya, yb;

  lm_convolver #(.N(N), .X_W(X_W), .H_W(H_W), .COEFFS(COEF_A), .K(1), .C_W(4)) u_a (
    .clk, .rst_n, .taps_valid, .taps, .y_valid(va), .y(ya));
  lm_convolver #(.N(N), .X_W(X_W), .H_W(H_W), .COEFFS(COEF_B), .K(2), .C_W(3)) u_b (
    .clk, .rst_n, .taps_valid, .taps, .y_valid(vb), .y(yb));

  logic signed [Y_W-1:0] ea [DEPTH], eb [DEPTH];
  logic                  eva [DEPTH], evb [DEPTH];

  function automatic int dot(logic [N*H_W-1:0] h);
    int s;
    s = 0;
    for (int k = 0; k < N; k++) s += int'($signed(h[k*H_W +: H_W])) * int'(taps[k]);
    return s;
  endfunction

  task automatic check(string name, logic gv, logic signed [Y_W-1:0] got,
                       logic ev, logic signed [Y_W-1:0] exp_v);
    checks++;
    if (gv !== ev || (ev && got !== exp_v)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s cycle %0d: valid %0d/%0d value %0d expected %0d", name, cyc, gv, ev, got, exp_v);
    end
  endtask

  initial begin : watchdog
    repeat (NIT + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int i = 0; i < DEPTH; i++) begin
      eva[i] = 0; evb[i] = 0; ea[i] = 0; eb[i] = 0;
    end
    taps_valid = 1'b0;
    foreach (taps[k]) taps[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int it = 0; it < NIT; it++) begin
      @(negedge clk);
      taps_valid = ($urandom_range(3) != 0);
      foreach (taps[k]) taps[k] = X_W'($urandom());
      if (it % 50 == 7) foreach (taps[k]) taps[k] = '1;
      ea[(cyc + LAT_A) % DEPTH] = Y_W'(dot(COEF_A)); eva[(cyc + LAT_A) % DEPTH] = taps_valid;
      eb[(cyc + LAT_B) % DEPTH] = Y_W'(dot(COEF_B)); evb[(cyc + LAT_B) % DEPTH] = taps_valid;
      @(posedge clk);
      cyc++;
      #1;
      check("A", va, ya, eva[cyc % DEPTH], ea[cyc % DEPTH]); eva[cyc % DEPTH] = 0;
      check("B", vb, yb, evb[cyc % DEPTH], eb[cyc % DEPTH]); evb[cyc % DEPTH] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
