// tb_fpsa_group_rom -- exhaustive test of the group ROM at single precision
// (4096 addresses). For each address the highest set bit j is found by a
// different method (shifting right until zero), and the testbench expects
// sel = max(j, 1), e_base = (max(j, 1) - 1) * N and zero only at address 0.
module tb_fpsa_group_rom;
  import fpsa_pkg::*;

  localparam int unsigned N    = F_N;
  localparam int unsigned M    = F_M;
  localparam int unsigned G    = groups_of(N, M);
  localparam int unsigned SELW = selw_of(N, M);

  logic [G-1:0]    addr;
  logic [M-1:0]    e_base;
  logic            zero;
  logic [SELW-1:0] sel;

  fpsa_group_rom dut (.addr, .e_base, .zero, .sel);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**G; a++) begin
      int j, t;
      addr = G'(a);
      #1;
      j = -1; t = a;
      while (t != 0) begin t = t >> 1; j++; end
      if (j < 1) j = 1;
      checks += 3;
      if (zero !== (a == 0))           begin failures++; $display("FAIL zero %0d", a); end
      if (sel !== SELW'(j))            begin failures++; $display("FAIL sel %0d", a); end
      if (e_base !== M'((j - 1) * N))  begin failures++; $display("FAIL e_base %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
