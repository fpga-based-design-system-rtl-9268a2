// tb_two_segment_periods: period of the generator for every segment split.
//
// Nine generators run free from seed {1, 1}: the 6-bit splits 2:4, 4:2 and
// 3:3, the 8-bit splits 2:6, 6:2, 3:5, 5:3 and 4:4, and the 18-bit split
// 9:9. For each the testbench counts the clock edges until the random
// number first comes back to its seed, and checks that this period is
// (2^N1 - 1)(2^N2 - 1): 45, 45, 49, 189, 189, 217, 217, 225 and 261,121.
// It also checks that no output ever has an all-zero segment, and, for the
// 4:4 split, that the 225 numbers of one period are all different and that
// 00010000 and 00000010, which need a single flip-flop high, never appear.
// The 32-bit split 16:16 and the 64-bit split 32:32 have periods far too long
// to simulate; for them the testbench checks what fits in the same run:
// 16:16 segment 1 first returns to its seed, and segment 2 first moves, on
// edge 65,535; 32:32 segment 2 does not move at all while segment 1 runs.
module tb_two_segment_periods;

  localparam int unsigned NCFG = 9;
  localparam int unsigned CFG_N1 [NCFG] = '{2, 4, 3, 2, 6, 3, 5, 4, 9};
  localparam int unsigned CFG_N2 [NCFG] = '{4, 2, 3, 6, 2, 5, 3, 4, 9};
  localparam int unsigned CFG_P  [NCFG] = '{45, 45, 49, 189, 189, 217, 217, 225, 261121};
  localparam int unsigned RUN_CYCLES = 261121 + 10;

  logic clk = 1'b0;
  logic clear;
  bit   running;
  int   checks = 0;
  int   failures = 0;
  int unsigned period [NCFG];
  bit          zero_seg [NCFG];

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int unsigned N1 = CFG_N1[i];
    localparam int unsigned N2 = CFG_N2[i];
    logic [N1-1:0]    a;
    logic [N2-1:0]    b;
    logic [N1+N2-1:0] r;
    int unsigned      edges;
    two_segment_lfsr #(.N1(N1), .N2(N2), .SEED1(N1'(1)), .SEED2(N2'(1))) u_gen (
      .clk(clk), .clear(clear), .lfsr_out(a), .lfsr_out1(b), .lfsr_out12(r));
    // Edges are counted at the rising edge and the outputs sampled at the
    // falling edge, half a cycle after each step.
    always @(posedge clk) begin
      if (!running) edges = 0;
      else          edges++;
    end
    always @(negedge clk) begin
      if (edges > 0) begin
        if (a == '0 || b == '0) zero_seg[i] = 1'b1;
        if (r == {N1'(1), N2'(1)} && period[i] == 0) period[i] = edges;
      end
    end
  end

  // The long splits, 16:16 and 32:32.
  logic [15:0] a16, b16;
  logic [31:0] r16;
  logic [31:0] a32, b32;
  logic [63:0] r32;
  int unsigned first_a16, first_b16;
  bit          b32_moved, a32_zero;
  two_segment_lfsr #(.N1(16), .N2(16), .SEED1(16'd1), .SEED2(16'd1)) u_g16 (
    .clk(clk), .clear(clear), .lfsr_out(a16), .lfsr_out1(b16), .lfsr_out12(r16));
  two_segment_lfsr #(.N1(32), .N2(32), .SEED1(32'd1), .SEED2(32'd1)) u_g32 (
    .clk(clk), .clear(clear), .lfsr_out(a32), .lfsr_out1(b32), .lfsr_out12(r32));
  always @(negedge clk) begin
    if (g_cfg[0].edges > 0) begin
      if (a16 == 16'd1 && first_a16 == 0) first_a16 = g_cfg[0].edges;
      if (b16 != 16'd1 && first_b16 == 0) first_b16 = g_cfg[0].edges;
      if (b32 != 32'd1) b32_moved = 1'b1;
      if (a32 == '0)    a32_zero  = 1'b1;
    end
  end

  // Distinct values of the 4:4 generator over its first period.
  bit seen44 [256];
  int unsigned distinct44;
  always @(negedge clk) begin
    if (g_cfg[7].edges > 0 && g_cfg[7].edges <= 225) begin
      if (!seen44[g_cfg[7].r]) distinct44++;
      seen44[g_cfg[7].r] = 1'b1;
    end
  end

  initial begin
    repeat (RUN_CYCLES + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    running    = 1'b0;
    first_a16  = 0;
    first_b16  = 0;
    b32_moved  = 1'b0;
    a32_zero   = 1'b0;
    distinct44 = 0;
    foreach (period[i]) begin
      period[i]   = 0;
      zero_seg[i] = 1'b0;
    end
    foreach (seen44[v]) seen44[v] = 1'b0;
    clear = 1'b1;
    repeat (2) @(posedge clk);
    #1 clear = 1'b0;
    running = 1'b1;
    repeat (RUN_CYCLES) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < NCFG; i++) begin
      $display("%0d:%0d period %0d", CFG_N1[i], CFG_N2[i], period[i]);
      check(period[i] == CFG_P[i],
            $sformatf("%0d:%0d: period %0d, want %0d", CFG_N1[i], CFG_N2[i], period[i], CFG_P[i]));
      check(!zero_seg[i], $sformatf("%0d:%0d: a segment reached zero", CFG_N1[i], CFG_N2[i]));
    end
    check(first_a16 == 65535, $sformatf("16:16: segment 1 back at seed on edge %0d, want 65535", first_a16));
    check(first_b16 == 65535, $sformatf("16:16: segment 2 first moved on edge %0d, want 65535", first_b16));
    check(r16[15:0] == b16 && r16[31:16] == a16, "16:16: output is {segment 1, segment 2}");
    check(!b32_moved, "32:32: segment 2 held during the run");
    check(!a32_zero, "32:32: segment 1 never zero");
    check(distinct44 == 225, $sformatf("4:4: %0d distinct numbers in one period, want 225", distinct44));
    check(!seen44[8'b0001_0000], "4:4: 00010000 never produced");
    check(!seen44[8'b0000_0010], "4:4: 00000010 never produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
