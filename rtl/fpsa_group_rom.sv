// fpsa_group_rom -- the ROM of segment 3: decodes which N-bit group of the
// accumulator magnitude is the highest non-zero one.
//
// The address is the output of OR 1, one bit per group (bit g is the OR of
// magnitude bits g*N .. g*N+N-1). Each word holds three fields:
//   e_base  the exponent the result would have if its leading one sat just
//           below the highest non-zero group j, that is (j-1)*N;
//   zero    set only at address 0 (the accumulator is zero); e_base is 0 there;
//   sel     the MUX 3 select: the window made of group j and group j-1.
// When the leading one is in group 0 the window of groups 1 and 0 is used
// (e_base 0), so the select always names a window whose lower half exists.
// The table has 2**G words of M + 1 + SELW bits (16 x 8 for half precision,
// 4096 x 13 for single). It is computed at elaboration from the formula above
// and read combinationally; the encoding of the fields is this design's own.
module fpsa_group_rom
  import fpsa_pkg::*;
#(
  parameter int unsigned N = F_N,
  parameter int unsigned M = F_M,
  localparam int unsigned G    = groups_of(N, M),
  localparam int unsigned SELW = selw_of(N, M),
  localparam int unsigned DW   = M + 1 + SELW
) (
  input  logic [G-1:0]    addr,
  output logic [M-1:0]    e_base,
  output logic            zero,
  output logic [SELW-1:0] sel
);

  // Content of one word, as {e_base, zero, sel}
  function automatic logic [DW-1:0] word_of(int unsigned a);
    int unsigned j;
    logic [M-1:0]    e;
    logic [SELW-1:0] s;
    j = 1;
    for (int unsigned g = 1; g < G; g++) begin
      if (a[g]) j = g;
    end
    e = M'((j - 1) * N);
    s = SELW'(j);
    return {e, (a == 0), s};
  endfunction

  logic [DW-1:0] rom [2**G];

  for (genvar a = 0; a < 2**G; a++) begin : g_word
    assign rom[a] = word_of(a);
  end

  assign {e_base, zero, sel} = rom[addr];

endmodule
