// fpsa_accum -- segment 2 of the sequence adder: the exact fixed-point
// accumulator.
//
// The R-bit adder (sum f_o) adds the aligned operand from segment 1, its carry
// input and the accumulated value from RG f_o; the result is written to RG f_o
// on every rising clock edge. R = EMAX + 1 + N bits hold any operand without
// losing a bit, so the running sum is exact and independent of the order of the
// operands as long as it stays in range.
// overflow is the XOR of the two most significant bits of the adder output. It
// is combinational: it belongs to the sum that the next edge writes to RG f_o.
// It goes high once the sum's magnitude reaches bit R-2, that is the top
// exponent EMAX.
// A new sequence is started by `start` (the registered seq_reset of the first
// operand): the accumulated value is then replaced by zero at the adder input,
// so RG f_o receives the first operand alone while the complete old sum is
// still read by segment 3 in the same clock. Using the reset this way, instead
// of clearing RG f_o outright, is this design's reading of the reset input.
module fpsa_accum
  import fpsa_pkg::*;
#(
  parameter int unsigned N = F_N,
  parameter int unsigned M = F_M,
  localparam int unsigned R = range_of(N, M)
) (
  input  logic         clk,
  input  logic         rst_n,     // synchronous initialisation, active low
  input  logic [R-1:0] addend,
  input  logic         carry_in,
  input  logic         start,     // first operand of a new sequence
  output logic [R-1:0] f_o,       // RG f_o, two's complement
  output logic         overflow   // sum has left the range
);

  logic [R-1:0] sum;

  assign sum      = addend + (start ? '0 : f_o) + R'(carry_in);
  assign overflow = sum[R-1] ^ sum[R-2];

  always_ff @(posedge clk) begin
    if (!rst_n) f_o <= '0;
    else        f_o <= sum;
  end

endmodule
