// fpsa_group_select -- first half of segment 3: sign-magnitude conversion and
// selection of the 2N-bit window that holds the leading one.
//
// From RG f_o (R bits, two's complement), combinationally:
//   MUX 2 + CTR 1  take the direct or inverted lower R-1 bits and add the sign,
//                  giving the magnitude (L = R-1 bits) without the sign bit;
//   OR 1           G OR gates, one per N-bit group of the magnitude (the top
//                  group has W inputs);
//   ROM            turns the OR 1 vector into e_base, zero and the MUX 3 select
//                  (see fpsa_group_rom);
//   MUX 3          passes the highest non-zero group and the group below it.
// On the next rising edge the sign goes to Tg sign_o, e_base to RG e_o^I and the
// window to RG f_o^I. The window of the most significant group is left-aligned
// in RG f_o^I (its W bits on top, then N bits, then N-W zeros); the flag
// `senior` is registered with it so that segment 3 can apply the exponent
// correction of that group. The flag register is this design's addition.
// `zero` comes straight from the ROM and therefore describes the current
// content of RG f_o, one clock ahead of the registered outputs.
module fpsa_group_select
  import fpsa_pkg::*;
#(
  parameter int unsigned N = F_N,
  parameter int unsigned M = F_M,
  localparam int unsigned R = range_of(N, M)
) (
  input  logic           clk,
  input  logic           rst_n,     // synchronous initialisation, active low
  input  logic [R-1:0]   f_o,       // RG f_o
  output logic           zero,      // RG f_o is zero (combinational)
  output logic           sign_q,    // Tg sign_o
  output logic [M-1:0]   e_i_q,     // RG e_o^I
  output logic [2*N-1:0] f_i_q,     // RG f_o^I
  output logic           senior_q   // window is the most significant group
);

  localparam int unsigned L    = R - 1;
  localparam int unsigned G    = groups_of(N, M);
  localparam int unsigned W    = senior_of(N, M);
  localparam int unsigned SELW = selw_of(N, M);

  // MUX 2 and CTR 1
  logic         sgn;
  logic [L-1:0] mag;
  assign sgn = f_o[R-1];
  assign mag = (sgn ? ~f_o[L-1:0] : f_o[L-1:0]) + L'(sgn);

  // magnitude padded to whole groups
  logic [G*N-1:0] mag_ext;
  assign mag_ext = (G*N)'(mag);

  // OR 1
  logic [G-1:0] or1;
  always_comb begin
    for (int g = 0; g < G; g++) or1[g] = |mag_ext[g*N +: N];
  end

  // ROM
  logic [M-1:0]    e_base;
  logic [SELW-1:0] sel;
  fpsa_group_rom #(.N(N), .M(M)) u_rom (
    .addr   (or1),
    .e_base (e_base),
    .zero   (zero),
    .sel    (sel)
  );

  // MUX 3: window j = {group j, group j-1}; the top window left-aligned
  logic [2*N-1:0] win [G];
  always_comb begin
    win[0] = '0;
    for (int j = 1; j < G - 1; j++) win[j] = mag_ext[(j-1)*N +: 2*N];
    win[G-1] = (2*N)'(mag[L-1 -: W+N]) << (N - W);
  end

  logic [2*N-1:0] mux3;
  assign mux3 = win[sel];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sign_q   <= 1'b0;
      e_i_q    <= '0;
      f_i_q    <= '0;
      senior_q <= 1'b0;
    end else begin
      sign_q   <= sgn;
      e_i_q    <= e_base;
      f_i_q    <= mux3;
      senior_q <= (sel == SELW'(G - 1));
    end
  end

  // A non-zero magnitude always leaves its leading one inside the window.
  always_ff @(posedge clk) begin
    if (rst_n) assert (zero || mux3 != '0)
      else $error("group window misses the leading one");
  end

endmodule
