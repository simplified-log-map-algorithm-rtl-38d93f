// maxstar_pkg: constants and trellis helpers shared by the n-input max*
// datapath and the a posteriori (APO) unit.
//
// Number format: every metric and LLR is a p-bit two's-complement value
// with M_FRAC = 3 fractional bits, so one LSB is 1/8. The max* correction
// term f_c(delta) = log(1 + exp(-delta)) is approximated by the constant
// 3/8 (binary 0.011) when delta < 2.0 and by 0 otherwise; 2.0 is bit
// M_FRAC+1 of a metric, so "delta < 2" is "bits p-2 .. M_FRAC+1 of delta
// are all zero". These numbers follow the algorithm; nothing here is
// clocked.
//
// The trellis helpers describe a recursive systematic convolutional (RSC)
// code of memory `mem` from its feedback polynomial `gfb` and feedforward
// polynomial `gff`, written as integers whose most significant of the
// mem+1 bits is the D^0 coefficient (the usual octal convention, e.g.
// 23 octal = 1 + D^3 + D^4). State bit 0 holds the newest register bit.
// The default code, feedback 23 / feedforward 33 (octal), is the 16-state
// CCSDS turbo code component.
package maxstar_pkg;

  localparam int unsigned M_FRAC = 3;   // fractional bits of every metric
  localparam int unsigned CORR_LSB = 3; // correction constant 3/8 in LSBs

  // Coefficient of D^i in a polynomial of degree `mem` written MSB = D^0.
  function automatic bit poly_coef(input int unsigned poly, input int unsigned mem,
                                   input int unsigned i);
    return bit'((poly >> (mem - i)) & 1);
  endfunction

  // Feedback bit a_k = u_k xor sum over i >= 1 of gfb_i * a_{k-i}.
  function automatic bit rsc_feedback(input int unsigned state, input bit u,
                                      input int unsigned mem, input int unsigned gfb);
    bit a;
    a = u;
    for (int unsigned i = 1; i <= mem; i++)
      if (poly_coef(gfb, mem, i)) a ^= bit'((state >> (i - 1)) & 1);
    return a;
  endfunction

  // Next state after input u from `state`.
  function automatic int unsigned rsc_next_state(input int unsigned state, input bit u,
                                                 input int unsigned mem, input int unsigned gfb);
    bit a;
    a = rsc_feedback(state, u, mem, gfb);
    return ((state << 1) | int'(a)) & ((1 << mem) - 1);
  endfunction

  // Parity bit c_k = sum over i of gff_i * a_{k-i} (a_k from the feedback).
  function automatic bit rsc_parity(input int unsigned state, input bit u,
                                    input int unsigned mem, input int unsigned gfb,
                                    input int unsigned gff);
    bit a, c;
    a = rsc_feedback(state, u, mem, gfb);
    c = poly_coef(gff, mem, 0) & a;
    for (int unsigned i = 1; i <= mem; i++)
      if (poly_coef(gff, mem, i)) c ^= bit'((state >> (i - 1)) & 1);
    return c;
  endfunction

endpackage
