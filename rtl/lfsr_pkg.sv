// lfsr_pkg: constants shared by the two-segment Fibonacci LFSR generator.
//
// A Fibonacci LFSR of n D flip-flops D1..Dn shifts D1 -> D2 -> ... -> Dn on
// every step and loads D1 with the XOR of the tapped flip-flops. In this
// design bit i of a register vector is flip-flop D(i+1), so the register
// shifts towards its MSB and the feedback enters at bit 0.
//
// fib_taps(n) returns the tap mask of a maximal-length feedback polynomial:
// bit k-1 is set when the polynomial has the term X^k (the constant term is
// the feed into D1 and has no bit). The polynomials for 2-8, 18 and 19 bits
// are the ones the generator was specified with (for example X^4 + X^3 + 1
// taps D4 and D3). The entries for 9-17, 20-32 and 64 bits are taken from the
// common published table of maximal-length polynomials, so that the larger
// segment splits (9:9, 16:16, 32:32) can be built; they are this design's
// own addition. Widths with no entry return 0, which the segment rejects.
//
// lfsr_period(n) is the maximal period 2^n - 1: every state but all-zeros.
package lfsr_pkg;

  localparam int unsigned MAX_WIDTH = 64;

  typedef logic [MAX_WIDTH-1:0] tap_mask_t;

  // Mask with a bit set for every exponent listed (exponents 1..64).
  function automatic tap_mask_t taps_of(input int unsigned e0, input int unsigned e1 = 0,
                                        input int unsigned e2 = 0, input int unsigned e3 = 0);
    tap_mask_t m;
    m = '0;
    if (e0 != 0) m[e0-1] = 1'b1;
    if (e1 != 0) m[e1-1] = 1'b1;
    if (e2 != 0) m[e2-1] = 1'b1;
    if (e3 != 0) m[e3-1] = 1'b1;
    return m;
  endfunction

  function automatic tap_mask_t fib_taps(input int unsigned n);
    case (n)
      2:  return taps_of(2, 1);
      3:  return taps_of(3, 2);
      4:  return taps_of(4, 3);
      5:  return taps_of(5, 3);
      6:  return taps_of(6, 5);
      7:  return taps_of(7, 6);
      8:  return taps_of(8, 6, 5, 4);
      9:  return taps_of(9, 5);
      10: return taps_of(10, 7);
      11: return taps_of(11, 9);
      12: return taps_of(12, 11, 10, 4);
      13: return taps_of(13, 12, 11, 8);
      14: return taps_of(14, 13, 12, 2);
      15: return taps_of(15, 14);
      16: return taps_of(16, 15, 13, 4);
      17: return taps_of(17, 14);
      18: return taps_of(18, 11);
      19: return taps_of(19, 18, 17, 14);
      20: return taps_of(20, 17);
      21: return taps_of(21, 19);
      22: return taps_of(22, 21);
      23: return taps_of(23, 18);
      24: return taps_of(24, 23, 22, 17);
      25: return taps_of(25, 22);
      26: return taps_of(26, 6, 2, 1);
      27: return taps_of(27, 5, 2, 1);
      28: return taps_of(28, 25);
      29: return taps_of(29, 27);
      30: return taps_of(30, 6, 4, 1);
      31: return taps_of(31, 28);
      32: return taps_of(32, 22, 2, 1);
      64: return taps_of(64, 63, 61, 60);
      default: return '0;
    endcase
  endfunction

  function automatic longint unsigned lfsr_period(input int unsigned n);
    return (longint'(1) << n) - 1;
  endfunction

endpackage
