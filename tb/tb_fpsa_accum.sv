// tb_fpsa_accum -- test of segment 2 (adder sum f_o, RG f_o, overflow) at
// single precision.
// Random addends (sign-extended values of random length), carry inputs and
// start pulses are applied each clock. A reference accumulator predicts RG f_o
// one clock later; overflow is checked before the edge against the XOR of the
// two top bits of the predicted sum. Every start, and the overflow flag in both
// states, must occur.
module tb_fpsa_accum;
  import fpsa_pkg::*;

  localparam int unsigned N = F_N;
  localparam int unsigned M = F_M;
  localparam int unsigned R = range_of(N, M);

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [R-1:0] addend = '0;
  logic         carry_in = 1'b0, start = 1'b0;
  logic [R-1:0] f_o;
  logic         overflow;

  fpsa_accum dut (.clk, .rst_n, .addend, .carry_in, .start, .f_o, .overflow);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ovf = 0, n_start = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [R-1:0] rand_wide(int bits);
    logic [R-1:0] v;
    for (int w = 0; w < R; w += 32) v[w +: 32] = $urandom;
    v = v & ((R'(1) << bits) - 1);
    return ($urandom_range(0, 1) != 0) ? ~v : v;
  endfunction

  initial begin
    logic [R-1:0] model, sum;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      addend   = rand_wide($urandom_range(1, (i % 500 < 250) ? R / 2 : R - 1));
      carry_in = $urandom_range(0, 1);
      start    = ($urandom_range(0, 30) == 0);
      n_start += int'(start);
      #1;
      sum = addend + (start ? '0 : model) + R'(carry_in);
      checks++;
      if (overflow !== (sum[R-1] ^ sum[R-2])) begin failures++; $display("FAIL overflow"); end
      n_ovf += int'(overflow);
      @(posedge clk); #1;
      model = sum;
      checks++;
      if (f_o !== model) begin failures++; $display("FAIL f_o at %0d", i); end
    end
    checks += 2;
    if (n_ovf == 0)   begin failures++; $display("never: overflow"); end
    if (n_start == 0) begin failures++; $display("never: start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
