// tb_fpsa_group_select -- test of the first half of segment 3 (MUX 2, CTR 1,
// OR 1, ROM, MUX 3 and the segment-3 registers) at single precision.
// RG f_o is driven with signed values of random length. Before the clock the
// testbench checks `zero`; after it, Tg sign_o, RG e_o^I, RG f_o^I and the
// top-group flag. The expected window is cut from the magnitude computed by
// negation in the testbench: groups j and j-1 for the highest non-zero group j
// (group 1 when only group 0 is non-zero), left-aligned for the top group. It
// also checks that the leading one always lies in the upper part of the window.
module tb_fpsa_group_select;
  import fpsa_pkg::*;

  localparam int unsigned N = F_N;
  localparam int unsigned M = F_M;
  localparam int unsigned R = range_of(N, M);
  localparam int unsigned L = R - 1;
  localparam int unsigned G = groups_of(N, M);
  localparam int unsigned W = senior_of(N, M);

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [R-1:0]   f_o = '0;
  logic           zero, sign_q, senior_q;
  logic [M-1:0]   e_i_q;
  logic [2*N-1:0] f_i_q;

  fpsa_group_select dut (.clk, .rst_n, .f_o, .zero, .sign_q, .e_i_q, .f_i_q, .senior_q);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_senior = 0, n_zero = 0, n_low = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [R-1:0]   mag;
    logic [R+N-1:0] tmp;
    logic [2*N-1:0] exp_win;
    logic           s;
    int             bits, p, j;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      bits = (i % 10 == 0) ? 0 : $urandom_range(1, L);
      for (int w = 0; w < R; w += 32) mag[w +: 32] = $urandom;
      mag = mag & ((R'(1) << bits) - 1);
      s = $urandom_range(0, 1);
      f_o = s ? (~mag + 1'b1) : mag;
      #1;
      checks++;
      if (zero !== (mag == '0)) begin failures++; $display("FAIL zero"); end
      p = -1;
      for (int b = 0; b < L; b++) if (mag[b]) p = b;
      j = (p < 0) ? 1 : p / int'(N);
      if (j < 1) j = 1;
      if (j == int'(G) - 1) begin
        tmp = (R+N)'(mag) << (N - W);
        exp_win = tmp[(G-2)*N +: 2*N] & ({2*N{1'b1}} << (N - W));
      end else begin
        exp_win = mag[(j-1)*N +: 2*N];
      end
      @(posedge clk); #1;
      checks += 5;
      if (sign_q !== (s && mag != '0))        begin failures++; $display("FAIL sign"); end
      if (e_i_q !== M'((j - 1) * N))          begin failures++; $display("FAIL e_i %0d exp %0d", e_i_q, (j-1)*N); end
      if (f_i_q !== exp_win)                  begin failures++; $display("FAIL window p=%0d got %h exp %h j=%0d", p, f_i_q, exp_win, j); end
      if (senior_q !== (j == int'(G) - 1))    begin failures++; $display("FAIL senior"); end
      if (p >= int'(N) && f_i_q[2*N-1 -: N] == '0) begin failures++; $display("FAIL leading one not in upper half"); end
      n_senior += int'(senior_q);
      n_zero   += int'(mag == '0);
      n_low    += int'(p >= 0 && p < int'(N));
    end
    checks += 3;
    if (n_senior == 0) begin failures++; $display("never: top group"); end
    if (n_zero == 0)   begin failures++; $display("never: zero"); end
    if (n_low == 0)    begin failures++; $display("never: group 0 only"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
