// fpsa_operand -- segment 1 of the sequence adder: operand registers and
// alignment of the operand into the fixed-point range.
//
// On each rising clock edge the operand (fraction f_x without its hidden bit,
// biased exponent e_x, sign sign_x) is captured in RG f_x, RG e_x and Tg sign_x,
// together with x_valid and seq_reset. From these registers, combinationally:
//   MUX 1      gives {1, f_x} for a positive operand and its one's complement
//              {0, ~f_x} for a negative one (hidden bit restored);
//   DC         decodes e_x into a one-hot select of 2**M lines;
//   Block keys places the N-bit MUX 1 word at bit e_x of an R-bit word and fills
//              every other bit with the sign.
// Together with carry_in = sign this is the R-bit two's complement of
// x * 2**(N-1) * 2**(-bias) in units of the accumulator LSB: the hidden bit of an
// operand with exponent e lands on bit e + N - 1.
// The hidden bit is always restored, also for e_x = 0: exponent 0 is treated as
// an ordinary exponent, as in the source description; there is no special
// encoding for zero, subnormals, infinity or NaN on the input.
// x_valid and the registers that carry it (and seq_reset) are additions of
// this design: with x_valid low the addend and carry are zero, so an idle
// cycle leaves the sum unchanged.
// Timing: addend, carry_in and start are valid one clock after the operand
// was presented.
module fpsa_operand
  import fpsa_pkg::*;
#(
  parameter int unsigned N = F_N,
  parameter int unsigned M = F_M,
  localparam int unsigned R = range_of(N, M)
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous initialisation, active low
  input  logic         x_valid,    // an operand is presented this cycle
  input  logic         seq_reset,  // the operand is the first of a new sequence
  input  logic [N-2:0] f_x,        // fraction without hidden bit
  input  logic [M-1:0] e_x,        // biased exponent
  input  logic         sign_x,     // 1: subtract
  output logic [R-1:0] addend,     // one's complement aligned operand
  output logic         carry_in,   // completes the two's complement
  output logic         start       // registered seq_reset
);

  logic [N-2:0] rg_f_x;
  logic [M-1:0] rg_e_x;
  logic         tg_sign_x;
  logic         tg_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rg_f_x    <= '0;
      rg_e_x    <= '0;
      tg_sign_x <= 1'b0;
      tg_valid  <= 1'b0;
      start     <= 1'b0;
    end else begin
      rg_f_x    <= f_x;
      rg_e_x    <= e_x;
      tg_sign_x <= sign_x;
      tg_valid  <= x_valid;
      start     <= seq_reset;
    end
  end

  // MUX 1: direct or inverse code with the hidden bit restored
  logic [N-1:0] mux1;
  assign mux1 = tg_sign_x ? {1'b0, ~rg_f_x} : {1'b1, rg_f_x};

  // DC: one-hot exponent decoder, enabled by a valid operand
  logic [2**M-1:0] dc;
  always_comb begin
    dc = '0;
    if (tg_valid) dc[rg_e_x] = 1'b1;
  end

  // Block keys: sign fill everywhere, MUX 1 word at the decoded position
  always_comb begin
    addend = tg_valid ? {R{tg_sign_x}} : '0;
    for (int e = 0; e < 2**M; e++) begin
      if (dc[e]) addend[e +: N] = mux1;
    end
  end

  assign carry_in = tg_valid & tg_sign_x;

endmodule
