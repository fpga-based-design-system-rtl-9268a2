// tb_two_segment_lfsr: end-to-end testbench of the two-segment generator.
//
// Three generators run side by side from one clock and one clear:
//   2:4 6-bit, seed 17  - checked against the 45-number sequence of that
//                         split (the first rows are the worked example of
//                         the clock controller), then its restart;
//   3:3 6-bit, seed 9   - checked against its 49-number sequence;
//   4:4 8-bit, defaults - checked against a reference model written here
//                         (segment feedback D4 xor D3, segment 2 stepping
//                         every 15th clock) and against the numbers that are
//                         legible in the original simulation trace (17, 33,
//                         65, 145, then 97 and 81 at the 6th and 9th edge).
// After two full periods of every generator a clear is applied at a random
// point, and all three must restart from their seeds. The testbench counts
// how often each mechanism happened: segment 2 stepping, segment 2 holding
// while segment 1 steps, segment 1 wrapping to its seed, the whole output
// wrapping, and a clear; a mechanism that never happened is a failure.
module tb_two_segment_lfsr;

  logic clk = 1'b0;
  logic clear;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected sequences, one number per clock edge starting with the seed.
  localparam int unsigned P24 = 45;
  localparam byte unsigned SEQ24 [P24] = '{
    17, 49, 33, 18, 50, 34, 20, 52, 36, 25, 57, 41, 19, 51, 35,
    22, 54, 38, 29, 61, 45, 26, 58, 42, 21, 53, 37, 27, 59, 43,
    23, 55, 39, 31, 63, 47, 30, 62, 46, 28, 60, 44, 24, 56, 40};
  localparam int unsigned P33 = 49;
  localparam byte unsigned SEQ33 [P33] = '{
     9, 17, 41, 25, 57, 49, 33, 10, 18, 42, 26, 58, 50, 34, 13, 21, 45,
    29, 61, 53, 37, 11, 19, 43, 27, 59, 51, 35, 15, 23, 47, 31, 63, 55,
    39, 14, 22, 46, 30, 62, 54, 38, 12, 20, 44, 28, 60, 52, 36};
  localparam int unsigned P44 = 225;
  // Legible points of the original 4:4 trace: edge number -> value.
  localparam int unsigned TRACE_N = 6;
  localparam int unsigned TRACE_EDGE [TRACE_N] = '{0, 1, 2, 3, 5, 8};
  localparam byte unsigned TRACE_VAL [TRACE_N] = '{17, 33, 65, 145, 97, 81};

  logic [1:0] a24;  logic [3:0] b24;  logic [5:0] r24;
  logic [2:0] a33;  logic [2:0] b33;  logic [5:0] r33;
  logic [3:0] a44;  logic [3:0] b44;  logic [7:0] r44;

  two_segment_lfsr #(.N1(2), .N2(4), .SEED1(2'd1), .SEED2(4'd1)) u_g24 (
    .clk(clk), .clear(clear), .lfsr_out(a24), .lfsr_out1(b24), .lfsr_out12(r24));
  two_segment_lfsr #(.N1(3), .N2(3), .SEED1(3'd1), .SEED2(3'd1)) u_g33 (
    .clk(clk), .clear(clear), .lfsr_out(a33), .lfsr_out1(b33), .lfsr_out12(r33));
  two_segment_lfsr u_g44 (
    .clk(clk), .clear(clear), .lfsr_out(a44), .lfsr_out1(b44), .lfsr_out12(r44));

  // Reference model of the 4:4 generator.
  logic [3:0] ref_a, ref_b;
  int         ref_cnt;
  task automatic ref_reset();
    ref_a = 4'd1; ref_b = 4'd1; ref_cnt = 0;
  endtask
  task automatic ref_step();
    ref_a = {ref_a[2:0], ref_a[3] ^ ref_a[2]};
    if (ref_cnt == 14) begin
      ref_b   = {ref_b[2:0], ref_b[3] ^ ref_b[2]};
      ref_cnt = 0;
    end else begin
      ref_cnt++;
    end
  endtask

  // Mechanism counters.
  int n_seg2_step, n_seg2_hold, n_seg1_wrap, n_full_wrap, n_clear;
  logic [3:0] prev_a44, prev_b44;

  // Checks the three outputs against the edge count since the last clear.
  task automatic check_outputs(input int unsigned k);
    check(r24 == 6'(SEQ24[k % P24]), $sformatf("2:4 edge %0d: got %0d, want %0d", k, r24, SEQ24[k % P24]));
    check(r33 == 6'(SEQ33[k % P33]), $sformatf("3:3 edge %0d: got %0d, want %0d", k, r33, SEQ33[k % P33]));
    check(r44 == {ref_a, ref_b},     $sformatf("4:4 edge %0d: got %0d, want %0d", k, r44, {ref_a, ref_b}));
    check(r44 == {a44, b44} && r24 == {a24, b24} && r33 == {a33, b33},
          "random number is {segment 1, segment 2}");
    for (int t = 0; t < TRACE_N; t++)
      if (k == TRACE_EDGE[t])
        check(r44 == TRACE_VAL[t], $sformatf("4:4 trace edge %0d: got %0d, want %0d", k, r44, TRACE_VAL[t]));
  endtask

  // One clock edge: advance the reference, sample, count mechanisms.
  task automatic clock_edge(input int unsigned k);
    prev_a44 = a44;
    prev_b44 = b44;
    @(posedge clk); #1;
    ref_step();
    if (b44 != prev_b44) n_seg2_step++;
    else if (a44 != prev_a44) n_seg2_hold++;
    if (a44 == 4'd1) n_seg1_wrap++;
    if (r44 == 8'd17) n_full_wrap++;
    check_outputs(k);
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned stop_at;
    {n_seg2_step, n_seg2_hold, n_seg1_wrap, n_full_wrap, n_clear} = '0;
    clear = 1'b1;
    repeat (2) @(posedge clk);
    #1 clear = 1'b0;
    ref_reset();
    check_outputs(0);

    // Two full periods of the longest generator, 450 edges.
    for (int unsigned k = 1; k <= 2 * P44; k++) clock_edge(k);

    // Clear at a random point and restart.
    stop_at = $urandom_range(5, 60);
    for (int unsigned k = 2 * P44 + 1; k <= 2 * P44 + stop_at; k++) clock_edge(k);
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    n_clear++;
    ref_reset();
    check_outputs(0);
    for (int unsigned k = 1; k <= 50; k++) clock_edge(k);

    $display("mechanisms: seg2_step=%0d seg2_hold=%0d seg1_wrap=%0d full_wrap=%0d clear=%0d",
             n_seg2_step, n_seg2_hold, n_seg1_wrap, n_full_wrap, n_clear);
    check(n_seg2_step > 0, "segment 2 stepped");
    check(n_seg2_hold > 0, "segment 2 held while segment 1 stepped");
    check(n_seg1_wrap > 0, "segment 1 wrapped to its seed");
    check(n_full_wrap == 2, "the 4:4 output wrapped once per 225 edges");
    check(n_clear > 0, "clear applied in mid-run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
