// fpsa_pkg -- shared constants and width functions of the floating-point
// sequence adder.
//
// The adder is parameterised by two numbers of the floating-point format:
//   N  mantissa width including the hidden bit (n), e.g. 11 for half, 24 for single
//   M  exponent width (m), e.g. 5 for half, 8 for single
// Every other width follows from them:
//   EMAX   = 2**M - 1                 largest biased exponent
//   R      = EMAX + 1 + N             width of the fixed-point accumulator (sign included)
//   L      = R - 1 = EMAX + N         width of the accumulator magnitude
//   G      = ceil(L / N)              number of N-bit groups of the magnitude
//   W      = L mod N (N if that is 0) width of the most significant group
//   SELW   = ceil(log2(G))            width of the group select
// For half precision this gives R = 43, G = 4, a 16-entry group ROM of 8-bit
// words and a 22-bit window; for single precision R = 280, G = 12, a 4096-entry
// ROM of 13-bit words and a 48-bit window.
package fpsa_pkg;

  // Format presets: half (SF) and single (F) precision.
  localparam int unsigned SF_N = 11;
  localparam int unsigned SF_M = 5;
  localparam int unsigned F_N  = 24;
  localparam int unsigned F_M  = 8;

  function automatic int unsigned emax_of(int unsigned m);
    return (1 << m) - 1;
  endfunction

  function automatic int unsigned range_of(int unsigned n, int unsigned m);
    return emax_of(m) + 1 + n;
  endfunction

  function automatic int unsigned groups_of(int unsigned n, int unsigned m);
    return (emax_of(m) + n + n - 1) / n;
  endfunction

  function automatic int unsigned senior_of(int unsigned n, int unsigned m);
    int unsigned w;
    w = (emax_of(m) + n) % n;
    return (w == 0) ? n : w;
  endfunction

  function automatic int unsigned selw_of(int unsigned n, int unsigned m);
    int unsigned g;
    g = groups_of(n, m);
    return (g <= 2) ? 1 : $clog2(g);
  endfunction

endpackage
