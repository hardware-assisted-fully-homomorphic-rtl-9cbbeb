// tb_twiddle_rom: recomputes every ROM entry from its definition for both
// primes (n = 1024) and checks the root-of-unity properties: psi^n = -1,
// w_m has order m, the forward start value squares to w_m, step * inverse
// step = 1, n * n^-1 = 1 and q_other * q_other^-1 = 1.
`timescale 1ns/1ps
module tb_twiddle_rom;
  import fv_pkg::*;
  import fv_ref_pkg::*;
  localparam int unsigned NN = 1024;

  logic [5:0]  idx;
  logic [39:0] d0, d1;
  twiddle_rom #(.Q(Q0), .PSI1024(PSI0_1024), .Q_OTHER(Q1), .N(NN)) r0 (.idx, .data(d0));
  twiddle_rom #(.Q(Q1), .PSI1024(PSI1_1024), .Q_OTHER(Q0), .N(NN)) r1 (.idx, .data(d1));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64 rom [2][ROM_DEPTH];
    for (int i = 0; i < int'(ROM_DEPTH); i++) begin
      idx = 6'(i); #1;
      rom[0][i] = d0; rom[1][i] = d1;
    end
    for (int c = 0; c < 2; c++) begin
      u64 q, psi, qo;
      q   = (c == 0) ? Q0 : Q1;
      qo  = (c == 0) ? Q1 : Q0;
      psi = (c == 0) ? PSI0_1024 : PSI1_1024;
      check(powm(psi, NN, q) == q - 1, "psi^n = -1");
      for (int s = 0; s < 10; s++) begin
        u64 m, wm;
        m = u64'(2) << s;
        wm = rom[c][ROM_FWD_STEP + s];
        check(wm == powm(psi, 2 * NN / m, q), $sformatf("w_m stage %0d", s));
        check(powm(wm, m, q) == 1 && (m == 1 || powm(wm, m / 2, q) == q - 1),
              $sformatf("w_m order stage %0d", s));
        check(mulm(rom[c][ROM_FWD_START + s], rom[c][ROM_FWD_START + s], q) == wm,
              $sformatf("start^2 = w_m stage %0d", s));
        check(mulm(wm, rom[c][ROM_INV_STEP + s], q) == 1, $sformatf("inverse step %0d", s));
        check(rom[c][ROM_FWD_SQ + s] == mulm(wm, wm, q), $sformatf("w_m^2 stage %0d", s));
        check(mulm(rom[c][ROM_FWD_SQ + s], rom[c][ROM_INV_SQ + s], q) == 1,
              $sformatf("w_m^-2 stage %0d", s));
      end
      check(mulm(rom[c][ROM_NINV], NN, q) == 1, "n^-1");
      check(mulm(rom[c][ROM_PSI_INV], psi, q) == 1, "psi^-1");
      check(rom[c][ROM_NINV_HALF] == mulm(rom[c][ROM_NINV], powm(psi, 2 * NN - NN / 2, q), q),
            "n^-1 psi^-n/2");
      check(mulm(rom[c][ROM_QINV], qo % q, q) == 1, "q_other^-1");
      check(rom[c][ROM_QOTHER] == qo, "q_other");
      check(rom[c][ROM_ONE] == 1, "one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
