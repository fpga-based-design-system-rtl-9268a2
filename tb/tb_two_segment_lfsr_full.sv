// tb_two_segment_lfsr_full: the generator at its default size (4:4, 8 bits,
// seed 17) taken through one complete operation: one full period of 225
// random numbers and the start of the next.
//
// Every number is compared with a reference model written here: two 4-bit
// Fibonacci registers with feedback D4 xor D3, the second one stepped on
// every 15th clock edge. The testbench also checks the cycle timing: one new
// number on every clock edge, segment 2 moving on edges 15, 30, ... only,
// and the output returning to 17 first on edge 225.
module tb_two_segment_lfsr_full;

  logic       clk = 1'b0;
  logic       clear;
  logic [3:0] seg1, seg2;
  logic [7:0] rnd;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  two_segment_lfsr u_dut (
    .clk(clk), .clear(clear), .lfsr_out(seg1), .lfsr_out1(seg2), .lfsr_out12(rnd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ra, rb, prev_b;
    int         first_return;
    clear = 1'b1;
    repeat (2) @(posedge clk);
    #1 clear = 1'b0;
    ra = 4'd1;
    rb = 4'd1;
    check(rnd == 8'd17, $sformatf("seed: got %0d, want 17", rnd));
    first_return = 0;
    for (int k = 1; k <= 240; k++) begin
      prev_b = seg2;
      @(posedge clk); #1;
      ra = {ra[2:0], ra[3] ^ ra[2]};
      if (k % 15 == 0) rb = {rb[2:0], rb[3] ^ rb[2]};
      check(rnd == {ra, rb}, $sformatf("edge %0d: got %0d, want %0d", k, rnd, {ra, rb}));
      check((seg2 != prev_b) == (k % 15 == 0), $sformatf("edge %0d: segment 2 timing", k));
      if (rnd == 8'd17 && first_return == 0) first_return = k;
    end
    check(first_return == 225, $sformatf("period %0d, want 225", first_return));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
