// tb_tap_delay_line: self-checking test of the sample history.
//
// Random samples are pushed with a random valid pattern. A model history kept
// here is compared with every tap after each clock: taps[k] must equal the k-th
// most recent valid sample (zero before the stream), taps_valid must follow
// in_valid by one cycle, and the taps must hold when no sample arrives.
module tb_tap_delay_line;
  localparam int N   = 8;
  localparam int X_W = 8;
  localparam int NIT = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic           in_valid;
  logic [X_W-1:0] x_in;
  logic           taps_valid;
  logic [X_W-1:0] taps [N];
  logic [X_W-1:0] model [N];
  int             holds = 0;

  tap_delay_line #(.N(N), .X_W(X_W)) dut (.clk, .rst_n, .in_valid, .x_in, .taps_valid, .taps);

  initial begin : watchdog
    repeat (NIT + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic v;
    foreach (model[k]) model[k] = '0;
    in_valid = 1'b0;
    x_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int it = 0; it < NIT; it++) begin
      @(negedge clk);
      in_valid = ($urandom_range(2) != 0);
      x_in = X_W'($urandom());
      v = in_valid;
      if (v) begin
        for (int k = N - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = x_in;
      end else holds++;
      @(posedge clk);
      #1;
      checks++;
      if (taps_valid !== v) begin
        failures++;
        $display("FAIL cycle %0d: taps_valid %0d expected %0d", it, taps_valid, v);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (taps[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: tap %0d = %0d expected %0d", it, k, taps[k], model[k]);
        end
      end
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL no idle cycle was tested");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
