// tb_fib_lfsr_segment: self-checking testbench of fib_lfsr_segment.
//
// 1. A 6-bit segment seeded with 32 (X^6 + X^5 + 1) must produce the
//    63-number sequence of the single 6-bit Fibonacci LFSR, listed below as
//    expected data, and then start over with 32, 1, 2, 4, 8.
// 2. A 3-bit segment (feedback D2 xor D3) must step 1, 2, 5, 3, 7, 6, 4, and a
//    5-bit segment (feedback D3 xor D5) must follow a reference model written
//    here from that rule, while its step enable is toggled at random; with
//    step low it must hold.
// 3. A synchronous clear in mid-sequence must reload the seed.
// 4. Segments of every width 2..24 run free from seed 1; each must first
//    return to its seed after exactly 2^n - 1 steps and never read zero.
module tb_fib_lfsr_segment;

  localparam int unsigned MIN_W = 2;
  localparam int unsigned MAX_W = 24;
  localparam int unsigned RUN_CYCLES = (1 << MAX_W) + 16;

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

  // ---------------------------------------------------------------- part 1
  localparam int unsigned SEQ6_LEN = 68;
  localparam byte unsigned SEQ6 [SEQ6_LEN] = '{
    32,  1,  2,  4,  8, 16, 33,  3,  6, 12, 24, 49, 34,  5, 10, 20, 41,
    19, 39, 15, 30, 61, 58, 52, 40, 17, 35,  7, 14, 28, 57, 50, 36,  9,
    18, 37, 11, 22, 45, 27, 55, 46, 29, 59, 54, 44, 25, 51, 38, 13, 26,
    53, 42, 21, 43, 23, 47, 31, 63, 62, 60, 56, 48, 32,  1,  2,  4,  8};

  logic [5:0] q6;
  logic       step6;
  fib_lfsr_segment #(.N(6), .SEED(6'd32)) u_seg6 (
    .clk(clk), .clear(clear), .step(step6), .q(q6));

  // ---------------------------------------------------------------- part 2
  localparam byte unsigned SEQ3 [7] = '{1, 2, 5, 3, 7, 6, 4};
  logic [2:0] q3;
  logic [4:0] q5, ref5;
  logic       step35;
  fib_lfsr_segment #(.N(3), .SEED(3'd1)) u_seg3 (
    .clk(clk), .clear(clear), .step(step35), .q(q3));
  fib_lfsr_segment #(.N(5), .SEED(5'd1)) u_seg5 (
    .clk(clk), .clear(clear), .step(step35), .q(q5));

  // ---------------------------------------------------------------- part 4
  longint unsigned period [MAX_W+1];
  bit              zero_seen [MAX_W+1];
  bit              run_free;

  for (genvar w = MIN_W; w <= MAX_W; w++) begin : g_width
    logic [w-1:0] q;
    longint unsigned steps;
    fib_lfsr_segment #(.N(w), .SEED(w'(1))) u_seg (
      .clk(clk), .clear(clear), .step(run_free), .q(q));
    // Steps are counted at the rising edge and the register sampled at the
    // falling edge, half a cycle after each step.
    always @(posedge clk) begin
      if (clear || !run_free) steps = 0;
      else                    steps++;
    end
    always @(negedge clk) begin
      if (steps > 0) begin
        if (q == '0) zero_seen[w] = 1'b1;
        if (q == w'(1) && period[w] == 0) period[w] = steps;
      end
    end
  end

  // Watchdog.
  initial begin
    repeat (RUN_CYCLES + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned pos;
    int unsigned idx3;
    clear    = 1'b1;
    step6    = 1'b0;
    step35   = 1'b0;
    run_free = 1'b0;
    foreach (period[i]) begin
      period[i]    = 0;
      zero_seen[i] = 1'b0;
    end
    repeat (2) @(posedge clk);
    #1 clear = 1'b0;

    // Part 1: the 6-bit sequence.
    check(q6 == 6'(SEQ6[0]), "6-bit segment loads seed 32");
    step6 = 1'b1;
    for (int i = 1; i < SEQ6_LEN; i++) begin
      @(posedge clk); #1;
      check(q6 == 6'(SEQ6[i]), $sformatf("6-bit step %0d: got %0d, want %0d", i, q6, SEQ6[i]));
    end
    step6 = 1'b0;

    // Part 2: 3-bit and 5-bit segments under a random enable.
    ref5 = 5'd1;
    idx3 = 0;
    for (int i = 0; i < 200; i++) begin
      step35 = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (step35) begin
        ref5 = {ref5[3:0], ref5[4] ^ ref5[2]};
        idx3 = (idx3 + 1) % 7;
      end
      check(q3 == 3'(SEQ3[idx3]), $sformatf("3-bit cycle %0d: got %0d, want %0d", i, q3, SEQ3[idx3]));
      check(q5 == ref5, $sformatf("5-bit cycle %0d: got %0d, want %0d", i, q5, ref5));
    end

    // Part 3: clear in mid-sequence.
    step35 = 1'b1;
    step6  = 1'b1;
    clear  = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    check(q3 == 3'd1 && q5 == 5'd1 && q6 == 6'd32, "clear reloads the seeds");
    step35 = 1'b0;
    step6  = 1'b0;
    @(posedge clk); #1;
    check(q3 == 3'd1 && q5 == 5'd1 && q6 == 6'd32, "registers hold with step low");

    // Part 4: free-running periods.
    clear = 1'b1;
    @(posedge clk); #1;
    clear    = 1'b0;
    run_free = 1'b1;
    pos = 0;
    repeat (RUN_CYCLES) @(posedge clk);
    #2;
    for (int w = MIN_W; w <= MAX_W; w++) begin
      check(period[w] == lfsr_pkg::lfsr_period(w),
            $sformatf("width %0d: period %0d, want %0d", w, period[w], lfsr_pkg::lfsr_period(w)));
      check(!zero_seen[w], $sformatf("width %0d: reached zero", w));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
