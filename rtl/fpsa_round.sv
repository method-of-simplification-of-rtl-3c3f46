// fpsa_round -- second half of segment 3: normalisation, rounding and exponent
// correction of the registered window. Purely combinational.
//
//   Coder    counts the zeros k in front of the first one of the 2N-bit window
//            and gives the exponent correction: W - k for the window of the most
//            significant group (senior = 1), N - k for every other window, and
//            0 for an all-zero window (a zero result).
//   MUX 4    passes the N bits that follow the first one (the hidden bit itself
//            is dropped): N-1 fraction bits and one guard bit; bits beyond the
//            end of the window read as zero.
//   CTR 2    adds one at the guard position: the upper N-1 bits are the
//            fraction rounded to nearest (a tie rounds away from zero) and the
//            carry out marks a mantissa that rounded up to 2.0.
//   sum e_o  e_i + correction + CTR 2 carry.
//   MUX 5    gives that sum, or EMAX when it exceeds EMAX; `inf` reports the
//            latter and the AND group then clears the fraction.
// The exponent adder is two bits wider than M so that a result below exponent 0
// (only possible when a subtraction cancels below the smallest operand
// magnitude) is seen as negative; such a result is flushed to exponent 0 and
// fraction 0. That flush is this design's choice.
module fpsa_round
  import fpsa_pkg::*;
#(
  parameter int unsigned N = F_N,
  parameter int unsigned M = F_M
) (
  input  logic [M-1:0]   e_i,      // RG e_o^I
  input  logic [2*N-1:0] f_i,      // RG f_o^I
  input  logic           senior,   // window of the most significant group
  output logic [M-1:0]   e_o,      // result exponent
  output logic [N-2:0]   f_o,      // result fraction, hidden bit removed
  output logic           inf       // exponent overflow: e_o = EMAX, f_o = 0
);

  localparam int unsigned EMAX = emax_of(M);
  localparam int unsigned W    = senior_of(N, M);
  localparam int unsigned KW   = $clog2(2 * N);
  localparam int unsigned EW   = M + 2;

  // Coder
  logic [KW-1:0] k;
  logic          allz;
  always_comb begin
    k    = KW'(2 * N - 1);
    allz = (f_i == '0);
    for (int i = 0; i < 2 * N; i++) begin
      if (f_i[i]) k = KW'(2 * N - 1 - i);
    end
  end

  logic signed [EW-1:0] corr;
  always_comb begin
    if (allz)        corr = '0;
    else if (senior) corr = EW'(W) - EW'(k);
    else             corr = EW'(N) - EW'(k);
  end

  // MUX 4: the N bits after the first one
  logic [2*N-1:0] shifted;
  logic [N-1:0]   mux4;
  assign shifted = f_i << (k + 1'b1);
  assign mux4    = shifted[2*N-1 -: N];

  // CTR 2
  logic [N-1:0] ctr2;
  logic         ctr2_carry;
  assign {ctr2_carry, ctr2} = {1'b0, mux4} + (N+1)'(1);

  // sum e_o
  logic signed [EW-1:0] esum;
  assign esum = $signed(EW'(e_i)) + corr + $signed(EW'(ctr2_carry));

  logic under;
  assign inf   = (esum > $signed(EW'(EMAX)));
  assign under = esum[EW-1];

  // MUX 5 and the AND group
  assign e_o = inf ? M'(EMAX) : (under ? '0 : esum[M-1:0]);
  assign f_o = ctr2[N-1:1] & {(N-1){~inf & ~under}};

endmodule
