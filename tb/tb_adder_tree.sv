// tb_adder_tree: self-checking test of the pipelined adder/subtractor tree.
//
// Five trees run side by side on random operands and a random valid pattern:
// 16 operands (K = 1, mixed subtractions), 11 operands (K = 2), 13 operands (all
// subtracted, so the root is negated), 1 operand and 5 operands with K = 3 (a
// single register stage). Each result is compared with a sum computed here,
// and its arrival cycle with the latency ceil(ceil(log2 n)/K) (1 for n = 1).
// A sixth tree of 4 operands is given value ranges and shifts: 0..255; 0..254
// in steps of 2, subtracted; 0..1020 in steps of 4; 0..15. Its adders are then
// 9, 12 and 12 bits wide with 1, 2 and 0 low bits passed through, so 30 adder
// bits in all; it is driven with values at the ends of those ranges.
module tb_adder_tree;
  localparam int W    = 24;
  localparam int NIT  = 3000;
  localparam int DEPTH = 64;

  localparam logic [15:0] SUB16 = 16'hA5C3;
  localparam logic [10:0] SUB11 = 11'h0F0;
  localparam logic [12:0] SUB13 = 13'h1FFF;
  localparam logic [4:0]  SUB5  = 5'b10110;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  logic                in_valid;
  logic signed [W-1:0] d16 [16];
  logic signed [W-1:0] d11 [11];
  logic signed [W-1:0] d13 [13];
  logic signed [W-1:0] d1  [1];
  logic signed [W-1:0] d5  [5];
  logic signed [W-1:0] d4  [4];
  logic                v16, v11, v13, v1, v5, v4;
  logic signed [W-1:0] o16, o11, o13, o1, o5, o4;

  localparam logic [4*64-1:0] LO4 = {64'sd0, 64'sd0, 64'sd0, 64'sd0};
  localparam logic [4*64-1:0] HI4 = {64'sd15, 64'sd1020, 64'sd254, 64'sd255};
  localparam logic [4*8-1:0]  SH4 = {8'd0, 8'd2, 8'd1, 8'd0};

  adder_tree #(.N_IN(16), .W(W), .K(1), .SUB(SUB16)) u16 (.clk, .rst_n, .in_valid, .din(d16), .out_valid(v16), .dout(o16));
  adder_tree #(.N_IN(11), .W(W), .K(2), .SUB(SUB11)) u11 (.clk, .rst_n, .in_valid, .din(d11), .out_valid(v11), .dout(o11));
  adder_tree #(.N_IN(13), .W(W), .K(1), .SUB(SUB13)) u13 (.clk, .rst_n, .in_valid, .din(d13), .out_valid(v13), .dout(o13));
  adder_tree #(.N_IN(1),  .W(W), .K(1), .SUB(1'b0))  u1  (.clk, .rst_n, .in_valid, .din(d1),  .out_valid(v1),  .dout(o1));
  adder_tree #(.N_IN(5),  .W(W), .K(3), .SUB(SUB5))  u5  (.clk, .rst_n, .in_valid, .din(d5),  .out_valid(v5),  .dout(o5));
  adder_tree #(.N_IN(4),  .W(W), .K(1), .SUB(4'b0010), .IN_LO(LO4), .IN_HI(HI4), .IN_SH(SH4))
                                                     u4r (.clk, .rst_n, .in_valid, .din(d4),  .out_valid(v4),  .dout(o4));

  // Expected results, indexed by the cycle in which they must appear.
  logic signed [W-1:0] e16 [DEPTH], e11 [DEPTH], e13 [DEPTH], e1 [DEPTH], e5 [DEPTH];
  logic                ev16 [DEPTH], ev11 [DEPTH], ev13 [DEPTH], ev1 [DEPTH], ev5 [DEPTH];
  logic signed [W-1:0] e4 [DEPTH];
  logic                ev4 [DEPTH];

  function automatic logic signed [W-1:0] rnd();
    // Operands of up to 20 bits, so that sums of 16 fit in W bits.
    return W'($signed(20'($urandom())));
  endfunction

  task automatic check(string name, logic gv, logic signed [W-1:0] got,
                       logic ev, logic signed [W-1:0] exp_v);
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
    logic signed [W-1:0] s;
    for (int i = 0; i < DEPTH; i++) begin
      ev16[i] = 0; ev11[i] = 0; ev13[i] = 0; ev1[i] = 0; ev5[i] = 0;
      e16[i] = 0; e11[i] = 0; e13[i] = 0; e1[i] = 0; e5[i] = 0;
      ev4[i] = 0; e4[i] = 0;
    end
    checks++;
    if (u4r.ADDER_BITS != 30) begin
      failures++;
      $display("FAIL ranged tree has %0d adder bits, expected 30", u4r.ADDER_BITS);
    end
    checks++;
    if (u16.LATENCY != 4 || u11.LATENCY != 2 || u13.LATENCY != 4 || u1.LATENCY != 1 || u5.LATENCY != 1) begin
      failures++;
      $display("FAIL reported latencies differ from the expected ones");
    end
    in_valid = 1'b0;
    foreach (d16[i]) d16[i] = '0;
    foreach (d11[i]) d11[i] = '0;
    foreach (d13[i]) d13[i] = '0;
    d1[0] = '0;
    foreach (d5[i]) d5[i] = '0;
    foreach (d4[i]) d4[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int it = 0; it < NIT; it++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      foreach (d16[i]) d16[i] = rnd();
      foreach (d11[i]) d11[i] = rnd();
      foreach (d13[i]) d13[i] = rnd();
      d1[0] = rnd();
      foreach (d5[i]) d5[i] = rnd();
      d4[0] = W'($urandom_range(255)); d4[1] = W'(2 * $urandom_range(127));
      d4[2] = W'(4 * $urandom_range(255)); d4[3] = W'($urandom_range(15));
      if (it % 7 == 1) begin d4[0] = 0; d4[1] = 254; d4[2] = 0; d4[3] = 0; end
      if (it % 7 == 2) begin d4[0] = 255; d4[1] = 0; d4[2] = 1020; d4[3] = 15; end
      if (it % 97 == 5) foreach (d16[i]) d16[i] = SUB16[i] ? -W'(524288) : W'(524287);
      s = 0; foreach (d16[i]) s = SUB16[i] ? s - d16[i] : s + d16[i];
      e16[(cyc + 4) % DEPTH] = s; ev16[(cyc + 4) % DEPTH] = in_valid;
      s = 0; foreach (d11[i]) s = SUB11[i] ? s - d11[i] : s + d11[i];
      e11[(cyc + 2) % DEPTH] = s; ev11[(cyc + 2) % DEPTH] = in_valid;
      s = 0; foreach (d13[i]) s = s - d13[i];
      e13[(cyc + 4) % DEPTH] = s; ev13[(cyc + 4) % DEPTH] = in_valid;
      e1[(cyc + 1) % DEPTH] = d1[0]; ev1[(cyc + 1) % DEPTH] = in_valid;
      s = 0; foreach (d5[i]) s = SUB5[i] ? s - d5[i] : s + d5[i];
      e5[(cyc + 1) % DEPTH] = s; ev5[(cyc + 1) % DEPTH] = in_valid;
      s = d4[0] - d4[1] + d4[2] + d4[3];
      e4[(cyc + 2) % DEPTH] = s; ev4[(cyc + 2) % DEPTH] = in_valid;
      @(posedge clk);
      cyc++;
      #1;
      check("n16", v16, o16, ev16[cyc % DEPTH], e16[cyc % DEPTH]); ev16[cyc % DEPTH] = 0;
      check("n11", v11, o11, ev11[cyc % DEPTH], e11[cyc % DEPTH]); ev11[cyc % DEPTH] = 0;
      check("n13", v13, o13, ev13[cyc % DEPTH], e13[cyc % DEPTH]); ev13[cyc % DEPTH] = 0;
      check("n1",  v1,  o1,  ev1[cyc % DEPTH],  e1[cyc % DEPTH]);  ev1[cyc % DEPTH]  = 0;
      check("n5",  v5,  o5,  ev5[cyc % DEPTH],  e5[cyc % DEPTH]);  ev5[cyc % DEPTH]  = 0;
      check("n4r", v4,  o4,  ev4[cyc % DEPTH],  e4[cyc % DEPTH]);  ev4[cyc % DEPTH]  = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
