// tb_decode_encode: checks the t = 2 decoding thresholds exactly at and
// around q/4 and 3q/4 and on random values, and that the re-encoded bit is
// floor(q/2) * m in both residues.
`timescale 1ns/1ps
module tb_decode_encode;
  import fv_pkg::*;
  import fv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, bit_out;
  logic [39:0] a;
  logic [19:0] enc0, enc1;
  decode_encode dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    u64 edges [8];
    edges = '{0, QQ / 4, QQ / 4 + 1, (3 * QQ) / 4, (3 * QQ) / 4 + 1, QQ / 2, QQ - 1, 1};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      u64 x;
      bit m;
      x = (i < 8) ? edges[i] : ({u64'($urandom), u64'($urandom)} % QQ);
      m = (4 * x > QQ) && (4 * x < 3 * QQ);
      @(negedge clk);
      in_valid = 1; a = 40'(x);
      @(negedge clk);
      in_valid = 0;
      checks += 3;
      if (!out_valid || bit_out != m) begin failures++; $display("FAIL: decode %0d -> %0d", x, bit_out); end
      if (enc0 != (m ? 20'((QQ / 2) % Q0) : 20'd0)) begin failures++; $display("FAIL: enc0"); end
      if (enc1 != (m ? 20'((QQ / 2) % Q1) : 20'd0)) begin failures++; $display("FAIL: enc1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
