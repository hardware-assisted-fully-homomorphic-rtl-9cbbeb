// tb_icrt: for random a in [0, q) the testbench forms the two partial
// products [a_i * q_other^-1]_qi * q_other as the PALUs would, feeds them to
// the inverse-CRT adder and checks that a comes back, one cycle later.
`timescale 1ns/1ps
module tb_icrt;
  import fv_pkg::*;
  import fv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [39:0] p0, p1, a;
  icrt dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      u64 x;
      x = (i == 0) ? 0 : (i == 1) ? QQ - 1 : ({u64'($urandom), u64'($urandom)} % QQ);
      @(negedge clk);
      in_valid = 1;
      p0 = 40'(mulm(x % Q0, powm(Q1 % Q0, Q0 - 2, Q0), Q0) * Q1);
      p1 = 40'(mulm(x % Q1, powm(Q0 % Q1, Q1 - 2, Q1), Q1) * Q0);
      @(negedge clk);
      in_valid = 0;
      checks += 2;
      if (!out_valid) begin failures++; $display("FAIL: no out_valid"); end
      if (a != 40'(x)) begin failures++; $display("FAIL: %0d -> %0d", x, a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
