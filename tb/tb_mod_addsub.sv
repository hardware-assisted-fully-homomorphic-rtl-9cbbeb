// tb_mod_addsub: checks the modular adder/subtractor against (z+t) mod Q and
// (z-t) mod Q for random and boundary operands below Q.
`timescale 1ns/1ps
module tb_mod_addsub;
  localparam int unsigned Q = 878593;
  logic [19:0] z, t, s, d;
  mod_addsub #(.Q(Q)) dut (.z, .t, .sum(s), .diff(d));

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint es, ed;
      if (i < 9) begin
        z = (i % 3 == 0) ? 20'd0 : (i % 3 == 1) ? 20'(Q - 1) : 20'(Q / 2);
        t = (i / 3 == 0) ? 20'd0 : (i / 3 == 1) ? 20'(Q - 1) : 20'(Q / 2 + 1);
      end else begin
        z = 20'($urandom_range(Q - 1)); t = 20'($urandom_range(Q - 1));
      end
      #1;
      es = (longint'(z) + longint'(t)) % Q;
      ed = (longint'(z) - longint'(t) + Q) % Q;
      checks += 2;
      if (s != 20'(es)) begin failures++; $display("FAIL: %0d+%0d=%0d", z, t, s); end
      if (d != 20'(ed)) begin failures++; $display("FAIL: %0d-%0d=%0d", z, t, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
