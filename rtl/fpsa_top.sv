// fpsa_top -- floating-point sequence adder: a three-segment pipeline that
// computes o = o + x (or o - x with sign_x set) over a stream of operands, one
// operand per clock, keeping the running sum exact in an R-bit fixed-point
// accumulator and converting it back to the floating-point format with one
// rounding at the output.
//
// Segment 1 (fpsa_operand) registers the operand and aligns it into the
// fixed-point range; segment 2 (fpsa_accum) adds it into RG f_o; segment 3
// (fpsa_group_select, fpsa_round) converts the previous content of RG f_o to
// sign, exponent and rounded fraction. Because the sum is exact, adding the same
// operands in any order gives the same result.
//
// Interface: f_x is the fraction without its hidden bit, e_x the biased
// exponent, sign_x the sign (1 = subtract). x_valid qualifies an operand;
// seq_reset marks the first operand of a new sequence (the sum restarts from
// that operand). Results: sign_o, e_o, f_o (fraction without hidden bit), inf
// (exponent overflow: e_o = EMAX and f_o = 0), zero (sum is zero) and
// overflow (the sum reached the top exponent EMAX and left the range).
// Timing, for an operand presented before rising edge t:
//   overflow  during the clock after edge t (it belongs to the sum written at t+1);
//   zero      during the clock after edge t+1;
//   sign_o, e_o, f_o, inf  after edge t+2, i.e. a latency of three clocks.
// The output values are those of the sum including that operand. Defaults are
// the single-precision format (N = 24, M = 8); N = 11, M = 5 gives half
// precision.
module fpsa_top
  import fpsa_pkg::*;
#(
  parameter int unsigned N = F_N,
  parameter int unsigned M = F_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_valid,
  input  logic         seq_reset,
  input  logic [N-2:0] f_x,
  input  logic [M-1:0] e_x,
  input  logic         sign_x,
  output logic         overflow,
  output logic         zero,
  output logic         sign_o,
  output logic [M-1:0] e_o,
  output logic [N-2:0] f_o,
  output logic         inf
);

  localparam int unsigned R = range_of(N, M);

  logic [R-1:0]   addend;
  logic           carry_in;
  logic           start;
  logic [R-1:0]   acc;
  logic [M-1:0]   e_i;
  logic [2*N-1:0] f_i;
  logic           senior;

  fpsa_operand #(.N(N), .M(M)) u_operand (
    .clk, .rst_n, .x_valid, .seq_reset, .f_x, .e_x, .sign_x,
    .addend, .carry_in, .start
  );

  fpsa_accum #(.N(N), .M(M)) u_accum (
    .clk, .rst_n, .addend, .carry_in, .start,
    .f_o (acc), .overflow
  );

  fpsa_group_select #(.N(N), .M(M)) u_select (
    .clk, .rst_n, .f_o (acc), .zero,
    .sign_q (sign_o), .e_i_q (e_i), .f_i_q (f_i), .senior_q (senior)
  );

  fpsa_round #(.N(N), .M(M)) u_round (
    .e_i, .f_i, .senior, .e_o, .f_o, .inf
  );

endmodule
