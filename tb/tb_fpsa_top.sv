// tb_fpsa_top -- end-to-end test of the floating-point sequence adder at its
// default size (single precision, N = 24, M = 8).
//
// A cycle-accurate reference runs beside the design: it keeps the exact sum as
// a wide integer, pipelines it like the design does, and converts it to sign,
// exponent and fraction with its own leading-one search and round-half-up at
// the guard bit. Every clock the testbench compares overflow (one clock after
// the operand), zero (two clocks after) and sign_o/e_o/f_o/inf (three clocks
// after) with the reference.
// Phases: (A) the same set of positive operands summed in three orders must give
// bit-identical results; (B) random additions and subtractions with idle cycles
// and sequence restarts; (C) directed cases for range overflow, exponent
// overflow after rounding, zero, negative results, underflow and an explicit
// check that one operand reaches the outputs after three clocks. Each
// mechanism is counted and one that never occurs counts as a failure.
module tb_fpsa_top;
  import fpsa_pkg::*;

  localparam int unsigned N    = F_N;
  localparam int unsigned M    = F_M;
  localparam int unsigned EMAX = emax_of(M);
  localparam int unsigned R    = range_of(N, M);
  localparam int unsigned L    = R - 1;
  localparam int unsigned W    = senior_of(N, M);
  localparam int unsigned G    = groups_of(N, M);

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         x_valid = 1'b0, seq_reset = 1'b0, sign_x = 1'b0;
  logic [N-2:0] f_x = '0;
  logic [M-1:0] e_x = '0;
  logic         overflow, zero, sign_o, inf;
  logic [M-1:0] e_o;
  logic [N-2:0] f_o;

  fpsa_top dut (
    .clk, .rst_n, .x_valid, .seq_reset, .f_x, .e_x, .sign_x,
    .overflow, .zero, .sign_o, .e_o, .f_o, .inf
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_start = 0, n_sub = 0, n_idle = 0, n_ovf = 0, n_inf = 0, n_zero = 0;
  int n_neg = 0, n_rcarry = 0, n_senior = 0, n_under = 0, n_assoc = 0;

  // ---------------- reference ----------------
  typedef struct packed {
    logic         sgn;
    logic [M-1:0] e;
    logic [N-2:0] f;
    logic         inf;
    logic         rcarry;
    logic         senior;
    logic         under;
  } fp_t;

  function automatic logic [R-1:0] value_of(logic [N-2:0] f, logic [M-1:0] e, logic s);
    logic [R-1:0] v;
    v = R'({1'b1, f}) << e;
    return s ? (~v + 1'b1) : v;
  endfunction

  function automatic fp_t to_fp(logic [R-1:0] a);
    fp_t r;
    logic [L-1:0] mag;
    int p, ex;
    logic [N-1:0] fg;
    logic [N:0]   rnd;
    r = '0;
    r.sgn = a[R-1];
    mag = r.sgn ? L'(~a + 1'b1) : a[L-1:0];
    p = -1;
    for (int i = 0; i < L; i++) if (mag[i]) p = i;
    if (p < 0) return r;
    fg = '0;
    for (int i = 1; i <= N; i++) fg[N-i] = (p - i >= 0) ? mag[p-i] : 1'b0;
    rnd = {1'b0, fg} + 1'b1;
    ex = p - (N - 1) + int'(rnd[N]);
    r.rcarry = rnd[N];
    r.senior = (p >= int'((G - 1) * N));
    if (ex > int'(EMAX)) begin
      r.inf = 1'b1; r.e = M'(EMAX); r.f = '0;
    end else if (ex < 0) begin
      r.under = 1'b1; r.e = '0; r.f = '0;
    end else begin
      r.e = M'(ex); r.f = rnd[N-1:1];
    end
    return r;
  endfunction

  logic         m_valid, m_start;
  logic [R-1:0] m_val, m_acc, m_acc_d;
  logic [R-1:0] m_sum;
  assign m_sum = (m_start ? '0 : m_acc) + (m_valid ? m_val : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_valid <= 1'b0; m_start <= 1'b0; m_val <= '0; m_acc <= '0; m_acc_d <= '0;
    end else begin
      m_valid <= x_valid;
      m_start <= seq_reset;
      m_val   <= value_of(f_x, e_x, sign_x);
      m_acc   <= m_sum;
      m_acc_d <= m_acc;
    end
  end

  logic checking = 1'b0;
  always @(negedge clk) begin
    if (checking) begin
      fp_t ex;
      logic ovf_exp;
      ex = to_fp(m_acc_d);
      ovf_exp = m_sum[R-1] ^ m_sum[R-2];
      checks += 3;
      if (overflow !== ovf_exp) begin
        failures++; $display("FAIL overflow got %0b exp %0b", overflow, ovf_exp);
      end
      if (zero !== (m_acc == '0)) begin
        failures++; $display("FAIL zero got %0b", zero);
      end
      if ({sign_o, e_o, f_o, inf} !== {ex.sgn, ex.e, ex.f, ex.inf}) begin
        failures++;
        $display("FAIL result got s%0b e%0d f%h inf%0b exp s%0b e%0d f%h inf%0b",
                 sign_o, e_o, f_o, inf, ex.sgn, ex.e, ex.f, ex.inf);
      end
      if (ovf_exp) n_ovf++;
      if (m_acc == '0) n_zero++;
      if (ex.inf) n_inf++;
      if (ex.sgn && m_acc_d != '0) n_neg++;
      if (ex.rcarry) n_rcarry++;
      if (ex.senior) n_senior++;
      if (ex.under) n_under++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic put(logic v, logic rs, logic [N-2:0] f, logic [M-1:0] e, logic s);
    @(negedge clk);
    x_valid = v; seq_reset = rs; f_x = f; e_x = e; sign_x = s;
    if (rs) n_start++;
    if (v && s) n_sub++;
    if (!v) n_idle++;
  endtask

  task automatic idle(int k);
    repeat (k) put(1'b0, 1'b0, '0, '0, 1'b0);
  endtask

  localparam int K = 48;
  localparam int SPAN = (3 * N < EMAX - 1) ? 3 * N : EMAX - 1;
  logic [N-2:0] sf [K];
  logic [M-1:0] se [K];
  int           ord [K];
  logic [M+N-1:0] res [3];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    checking = 1'b1;

    // (A) associativity: one set, three orders
    for (int rep = 0; rep < 20; rep++) begin
      int base;
      base = $urandom_range(0, EMAX - 1 - SPAN);
      for (int i = 0; i < K; i++) begin
        sf[i] = N'($urandom);
        se[i] = M'(base + $urandom_range(0, SPAN));
        ord[i] = i;
      end
      for (int o = 0; o < 3; o++) begin
        if (o == 1) for (int i = 0; i < K; i++) ord[i] = K - 1 - i;
        if (o == 2) for (int i = K - 1; i > 0; i--) begin
          int j, t;
          j = $urandom_range(0, i);
          t = ord[i]; ord[i] = ord[j]; ord[j] = t;
        end
        for (int i = 0; i < K; i++) put(1'b1, (i == 0), sf[ord[i]], se[ord[i]], 1'b0);
        idle(3);
        @(posedge clk); #1;
        res[o] = {e_o, f_o};
      end
      checks++;
      if (res[0] !== res[1] || res[0] !== res[2]) begin
        failures++; $display("FAIL associativity %h %h %h", res[0], res[1], res[2]);
      end else n_assoc++;
    end

    // (B) random mixed sequences with idle cycles and restarts
    for (int i = 0; i < 6000; i++) begin
      logic v, rs, s;
      v  = ($urandom_range(0, 7) != 0);
      rs = ($urandom_range(0, 60) == 0);
      s  = $urandom_range(0, 2) == 0;
      put(v, rs, N'($urandom), M'($urandom_range(0, EMAX - 2)), s);
    end

    // (C) directed cases
    // zero and a negative result: x, -x, then -2x
    put(1'b1, 1'b1, N'(5), M'(EMAX / 4), 1'b0);
    put(1'b1, 1'b0, N'(5), M'(EMAX / 4), 1'b1);
    idle(3);
    put(1'b1, 1'b0, N'(5), M'(EMAX / 4 + 1), 1'b1);
    idle(3);
    // range overflow: an operand at the top exponent
    put(1'b1, 1'b1, N'(0), M'(EMAX), 1'b0);
    idle(3);
    // exponent overflow after rounding: all-ones mantissa at EMAX plus a guard bit
    put(1'b1, 1'b1, '1, M'(EMAX), 1'b0);
    put(1'b1, 1'b0, '0, M'(EMAX - N), 1'b0);
    idle(3);
    // rounding carry without overflow
    put(1'b1, 1'b1, '1, M'(N + 2), 1'b0);
    put(1'b1, 1'b0, '0, M'(2), 1'b0);
    idle(3);
    // latency: from a zero sum, a single operand must reach e_o after exactly
    // three rising edges
    put(1'b1, 1'b1, '0, M'(0), 1'b0);
    put(1'b1, 1'b0, '0, M'(0), 1'b1);
    idle(3);
    begin
      int lat;
      put(1'b1, 1'b1, N'(3), M'(N + 1), 1'b0);
      @(posedge clk); #1;
      x_valid = 1'b0; seq_reset = 1'b0;
      lat = 1;
      while (e_o != M'(N + 1) && lat < 10) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 3 || f_o != N'(3)) begin
        failures++; $display("FAIL latency %0d", lat);
      end
    end
    idle(3);
    // underflow: cancellation below the smallest exponent
    put(1'b1, 1'b1, N'(1), M'(0), 1'b0);
    put(1'b1, 1'b0, N'(0), M'(0), 1'b1);
    idle(4);

    checking = 1'b0;
    $display("mechanisms: start=%0d sub=%0d idle=%0d overflow=%0d inf=%0d zero=%0d neg=%0d round_carry=%0d senior=%0d underflow=%0d assoc=%0d",
             n_start, n_sub, n_idle, n_ovf, n_inf, n_zero, n_neg, n_rcarry, n_senior, n_under, n_assoc);
    checks++; if (n_start  == 0) begin failures++; $display("never: sequence restart"); end
    checks++; if (n_sub    == 0) begin failures++; $display("never: subtraction"); end
    checks++; if (n_idle   == 0) begin failures++; $display("never: idle cycle"); end
    checks++; if (n_ovf    == 0) begin failures++; $display("never: range overflow"); end
    checks++; if (n_inf    == 0) begin failures++; $display("never: exponent overflow"); end
    checks++; if (n_zero   == 0) begin failures++; $display("never: zero"); end
    checks++; if (n_neg    == 0) begin failures++; $display("never: negative result"); end
    checks++; if (n_rcarry == 0) begin failures++; $display("never: rounding carry"); end
    checks++; if (n_senior == 0) begin failures++; $display("never: top-group window"); end
    checks++; if (n_under  == 0) begin failures++; $display("never: underflow"); end
    checks++; if (n_assoc  == 0) begin failures++; $display("never: associativity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
