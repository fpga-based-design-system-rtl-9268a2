// two_segment_lfsr: random-number generator built from two Fibonacci LFSR
// segments, the second paced by a clock controller.
//
// Segment 1 (N1 flip-flops) steps on every rising edge of the external
// clock. Segment 2 (N2 flip-flops) steps only once per full period of
// segment 1, that is every P1 = 2^N1 - 1 clocks, paced by a modulo-P1
// counter. The random number is {segment 1, segment 2}: segment 1 forms the
// upper N1 bits. The output therefore runs through P1 * P2 =
// (2^N1 - 1)(2^N2 - 1) different values before it repeats, slightly fewer
// than the 2^(N1+N2) - 1 of a single LFSR of the same width, and never shows
// a value in which either segment is all zeros. The whole generator uses
// N1 + N2 flip-flops in the segments plus N1 in the counter.
//
// Defaults are the 4:4 8-bit generator with seed 17 ({0001, 0001}) that was
// put on an FPGA board; other splits such as 2:4, 3:3, 3:5 or 9:9 are set
// with N1, N2, SEED1 and SEED2. Each segment has its own seed, as the two may
// differ in width.
//
// Interface (names of the outputs follow the original simulation):
//   clk        external clock; one new random number after every rising edge
//   clear      synchronous; loads both seeds and zeroes the counter
//   lfsr_out   segment 1 (N1 bits)
//   lfsr_out1  segment 2 (N2 bits)
//   lfsr_out12 the random number {lfsr_out, lfsr_out1}
// The first edge after clear is released moves segment 1 away from its
// seed; segment 2 first moves on the P1-th edge. Single clock domain with an
// enable in place of a second clock, and the synchronous clear, are this
// design's choices.
module two_segment_lfsr #(
  parameter int unsigned   N1    = 4,
  parameter int unsigned   N2    = 4,
  parameter logic [N1-1:0] SEED1 = N1'(1),
  parameter logic [N2-1:0] SEED2 = N2'(1)
) (
  input  logic             clk,
  input  logic             clear,
  output logic [N1-1:0]    lfsr_out,
  output logic [N2-1:0]    lfsr_out1,
  output logic [N1+N2-1:0] lfsr_out12
);

  logic seg2_step;

  fib_lfsr_segment #(.N(N1), .SEED(SEED1)) u_segment1 (
    .clk   (clk),
    .clear (clear),
    .step  (1'b1),
    .q     (lfsr_out)
  );

  clock_controller #(.N1(N1)) u_clock_controller (
    .clk       (clk),
    .clear     (clear),
    .seg2_step (seg2_step)
  );

  fib_lfsr_segment #(.N(N2), .SEED(SEED2)) u_segment2 (
    .clk   (clk),
    .clear (clear),
    .step  (seg2_step),
    .q     (lfsr_out1)
  );

  always_comb lfsr_out12 = {lfsr_out, lfsr_out1};

  // Segment 2 steps on the edge on which segment 1 comes back to its seed,
  // as long as both started from their seeds together.
  assert property (@(posedge clk) disable iff (clear) seg2_step |=> lfsr_out == SEED1)
    else $error("two_segment_lfsr: segment 2 stepped out of phase with segment 1");

endmodule
