// tb_fpsa_round -- test of the second half of segment 3 (Coder, MUX 4, CTR 2,
// sum e_o, MUX 5, AND group) at single precision.
// Windows are generated as segment 3 would register them: for a random group j
// the base exponent is (j-1)*N, the upper group is non-zero (except for j = 1)
// and the top-group window is left-aligned. The testbench places the window at
// its absolute bit position in a wide integer and converts that integer with
// its own leading-one search and round-half-up at the guard bit, then compares
// e_o, f_o and inf. Directed windows cover rounding to 2.0, exponent overflow
// and a zero window.
module tb_fpsa_round;
  import fpsa_pkg::*;

  localparam int unsigned N    = F_N;
  localparam int unsigned M    = F_M;
  localparam int unsigned EMAX = emax_of(M);
  localparam int unsigned G    = groups_of(N, M);
  localparam int unsigned W    = senior_of(N, M);
  localparam int unsigned VW   = G * N + N;

  logic [M-1:0]   e_i = '0;
  logic [2*N-1:0] f_i = '0;
  logic           senior = 1'b0;
  logic [M-1:0]   e_o;
  logic [N-2:0]   f_o;
  logic           inf;

  fpsa_round dut (.e_i, .f_i, .senior, .e_o, .f_o, .inf);

  int checks = 0, failures = 0, n_inf = 0, n_carry = 0, n_zero = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int j, logic [2*N-1:0] win);
    logic [VW-1:0] v;
    logic [N-1:0]  fg;
    logic [N:0]    rnd;
    int            b, p, ex;
    logic [M-1:0]  ee;
    logic [N-2:0]  ef;
    logic          ei;
    senior = (j == int'(G) - 1);
    e_i    = M'((j - 1) * N);
    f_i    = win;
    b      = senior ? int'((G - 2) * N - (N - W)) : (j - 1) * int'(N);
    v      = VW'(win) << b;
    p = -1;
    for (int i = 0; i < VW; i++) if (v[i]) p = i;
    ee = '0; ef = '0; ei = 1'b0;
    if (p >= 0) begin
      fg = '0;
      for (int i = 1; i <= N; i++) fg[N-i] = (p - i >= 0) ? v[p-i] : 1'b0;
      rnd = {1'b0, fg} + 1'b1;
      n_carry += int'(rnd[N]);
      ex = p - (N - 1) + int'(rnd[N]);
      if (ex > int'(EMAX)) begin ei = 1'b1; ee = M'(EMAX); end
      else if (ex >= 0) begin ee = M'(ex); ef = rnd[N-1:1]; end
    end else n_zero++;
    #1;
    checks++;
    if ({e_o, f_o, inf} !== {ee, ef, ei}) begin
      failures++;
      $display("FAIL j=%0d win=%h got e%0d f%h i%0b exp e%0d f%h i%0b", j, win, e_o, f_o, inf, ee, ef, ei);
    end
    n_inf += int'(ei);
  endtask

  function automatic logic [2*N-1:0] rand_win(int j);
    logic [2*N-1:0] w;
    w = {$urandom, $urandom};
    if (j == int'(G) - 1) begin
      w = w & ({2*N{1'b1}} << (N - W));
      if (w[2*N-1 -: W] == '0) w[2*N-1] = 1'b1;
    end else if (j > 1) begin
      if (w[2*N-1 -: N] == '0) w[2*N-1 - $urandom_range(0, N - 1)] = 1'b1;
    end else begin
      w = w >> $urandom_range(0, 2 * N);
    end
    return w;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int j;
      j = $urandom_range(1, G - 1);
      check(j, rand_win(j));
    end
    // directed: rounding up to 2.0 in an ordinary window and at the top
    check(2, {{(N+1){1'b1}}, {(N-1){1'b0}}});
    check(int'(G) - 1, {{(W+N){1'b1}}, {(N-W){1'b0}}});
    check(1, '0);
    check(1, 1);
    checks += 3;
    if (n_inf == 0)   begin failures++; $display("never: inf"); end
    if (n_carry == 0) begin failures++; $display("never: rounding carry"); end
    if (n_zero == 0)  begin failures++; $display("never: zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
