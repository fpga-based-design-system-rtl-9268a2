// clock_controller: paces the second segment of the two-segment generator.
//
// Segment 1 has P1 = 2^N1 - 1 states. Segment 2 must move only once segment 1
// has run through its whole period, so the controller is a synchronous
// modulo-P1 counter of N1 flip-flops, clocked by the external clock. It
// counts 0, 1, ..., P1-1, 0, ... and raises seg2_step during the cycle in
// which it holds P1-1; on that edge segment 2 steps and the counter wraps.
// After a clear the first step of segment 2 therefore falls on the P1-th
// clock edge, the same edge on which segment 1 returns to its seed.
//
// The counter of N1 flip-flops and the step on every P1-th clock follow the
// original scheme. Delivering "clock 2" as a one-cycle enable in the single
// clock domain, rather than as a derived clock, and the synchronous clear
// are this design's choices.
//
// Interface: clk, clear (synchronous, counter to 0), seg2_step (decoded
// combinationally from the registered count; high one cycle in every P1).
module clock_controller #(
  parameter int unsigned N1 = 4
) (
  input  logic          clk,
  input  logic          clear,
  output logic          seg2_step
);

  logic [N1-1:0] count;

  localparam logic [N1-1:0] LAST = {{(N1-1){1'b1}}, 1'b0};  // P1 - 1 = 2^N1 - 2

  if (N1 < 2) begin : g_n1_check
    $error("clock_controller: N1=%0d, needs at least 2", N1);
  end

  always_comb seg2_step = (count == LAST);

  always_ff @(posedge clk) begin
    if (clear)          count <= '0;
    else if (seg2_step) count <= '0;
    else                count <= count + 1'b1;
  end

  // The counter never reaches 2^N1 - 1 (it wraps one state earlier).
  assert property (@(posedge clk) disable iff (clear) count != '1)
    else $error("clock_controller: counter left its modulo-P1 range");

endmodule
