// tb_fpsa_operand -- test of segment 1 (operand registers, MUX 1, DC, Block
// keys) at single precision.
// Random operands, with random valid and seq_reset, are presented one per
// clock. One clock later the testbench checks that addend is the operand's
// magnitude {1, f_x} << e_x, bitwise inverted for a negative operand, that
// addend + carry_in is the operand's two's complement value, that an invalid
// cycle gives zero, and that start repeats seq_reset with a delay of one clock.
module tb_fpsa_operand;
  import fpsa_pkg::*;

  localparam int unsigned N = F_N;
  localparam int unsigned M = F_M;
  localparam int unsigned R = range_of(N, M);

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         x_valid = 1'b0, seq_reset = 1'b0, sign_x = 1'b0;
  logic [N-2:0] f_x = '0;
  logic [M-1:0] e_x = '0;
  logic [R-1:0] addend;
  logic         carry_in, start;

  fpsa_operand dut (.clk, .rst_n, .x_valid, .seq_reset, .f_x, .e_x, .sign_x,
                    .addend, .carry_in, .start);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [R-1:0] mag, exp_add, exp_val;
    logic v, rs, s;
    logic [N-2:0] f;
    logic [M-1:0] e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0); rs = $urandom_range(0, 1); s = $urandom_range(0, 1);
      f = N'($urandom); e = M'($urandom);
      if (i < 2 * (2**M)) e = M'(i / 2);   // every exponent, both signs
      if (i < 2 * (2**M)) begin v = 1'b1; s = i[0]; end
      x_valid = v; seq_reset = rs; sign_x = s; f_x = f; e_x = e;
      @(posedge clk); #1;
      mag = R'({1'b1, f}) << e;
      exp_add = !v ? '0 : (s ? ~mag : mag);
      exp_val = !v ? '0 : (s ? (~mag + 1'b1) : mag);
      checks += 4;
      if (addend !== exp_add) begin failures++; $display("FAIL addend e=%0d s=%0b", e, s); end
      if (addend + R'(carry_in) !== exp_val) begin failures++; $display("FAIL value"); end
      if (carry_in !== (v & s)) begin failures++; $display("FAIL carry_in"); end
      if (start !== rs) begin failures++; $display("FAIL start"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
