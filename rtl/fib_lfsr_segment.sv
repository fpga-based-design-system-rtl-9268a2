// fib_lfsr_segment: one segment of the two-segment generator, an N-bit
// Fibonacci LFSR.
//
// The segment is a chain of N D flip-flops D1..DN (q[0] is D1, q[N-1] is DN).
// On a step every flip-flop takes the value of its predecessor and D1 takes
// the XOR of the tapped flip-flops, as set by TAPS (bit k-1 set = DK is
// tapped). With a maximal-length polynomial the register runs through all
// 2^N - 1 non-zero states before it repeats; the all-zero state is never
// reached from a non-zero seed. The 3-bit segment (taps D3, D2), the 2- and
// 4-bit segments of the 2:4 split and the 5-bit segment (taps D5, D3) are
// the ones the generator was specified with; the other widths use the
// polynomials in lfsr_pkg.
//
// Interface and timing (single clock, all transfers on the rising edge):
//   clear  synchronous; loads SEED on the next edge and wins over step.
//   step   clock enable; the register moves one state on an edge where it
//          is high and holds otherwise. The original scheme gives the second
//          segment its own slowed clock; this design keeps one clock and
//          turns that clock into this enable, which gives the same states.
//   q      the register, valid right after the edge (no output delay).
// The synchronous clear and the enable are this design's choices.
module fib_lfsr_segment #(
  parameter int unsigned                  N    = 4,
  parameter logic [N-1:0]                 SEED = N'(1),
  parameter lfsr_pkg::tap_mask_t          TAPS = lfsr_pkg::fib_taps(N)
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         step,
  output logic [N-1:0] q
);

  // Elaboration checks: a width with no known polynomial, or a seed of all
  // zeros, would leave the register stuck.
  if (N < 2 || N > lfsr_pkg::MAX_WIDTH) begin : g_width_check
    $error("fib_lfsr_segment: N=%0d is out of range 2..%0d", N, lfsr_pkg::MAX_WIDTH);
  end
  if (TAPS[N-1:0] == '0) begin : g_taps_check
    $error("fib_lfsr_segment: no feedback polynomial for N=%0d", N);
  end
  if (SEED == '0) begin : g_seed_check
    $error("fib_lfsr_segment: the seed must not be zero");
  end

  logic feedback;

  always_comb feedback = ^(q & TAPS[N-1:0]);

  always_ff @(posedge clk) begin
    if (clear)     q <= SEED;
    else if (step) q <= {q[N-2:0], feedback};
  end

  // A non-zero register can never become zero.
  assert property (@(posedge clk) disable iff (clear) q != '0 |=> q != '0)
    else $error("fib_lfsr_segment: register reached the all-zero state");

endmodule
