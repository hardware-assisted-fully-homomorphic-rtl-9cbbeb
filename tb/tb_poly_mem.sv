// tb_poly_mem: fills all six blocks of a memory file with distinct random
// words, reads them back through both read ports (port a and port b on
// different blocks in the same cycle) and checks the one-cycle read latency
// and that a write to one block leaves the others untouched.
`timescale 1ns/1ps
module tb_poly_mem;
  import fv_pkg::*;
  localparam int D = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_a_en = 0, rd_b_en = 0, wr_en = 0;
  bank_t rd_a_bank = 0, rd_b_bank = 0, wr_bank = 0;
  logic [8:0] rd_a_addr = 0, rd_b_addr = 0, wr_addr = 0;
  word_t rd_a_data, rd_b_data, wr_data = 0;

  poly_mem #(.DEPTH(D)) dut (.*);

  word_t model [6][D];
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
    for (int b = 0; b < 6; b++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = bank_t'(b); wr_addr = 9'(a);
        wr_data = {8'(b), 9'(a), 23'($urandom)};
        model[b][a] = wr_data;
      end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      int ba, bb, aa, ab;
      ba = $urandom_range(5);
      bb = (ba + 1 + $urandom_range(4)) % 6;
      aa = $urandom_range(D - 1); ab = $urandom_range(D - 1);
      @(negedge clk);
      rd_a_en = 1; rd_a_bank = bank_t'(ba); rd_a_addr = 9'(aa);
      rd_b_en = 1; rd_b_bank = bank_t'(bb); rd_b_addr = 9'(ab);
      // a concurrent write to a third block
      wr_en = 1; wr_bank = bank_t'((bb + 1) % 6 == ba ? (bb + 2) % 6 : (bb + 1) % 6);
      wr_addr = 9'($urandom_range(D - 1)); wr_data = 40'($urandom);
      @(negedge clk);
      wr_en = 0; rd_a_en = 0; rd_b_en = 0;
      checks += 2;
      if (rd_a_data != model[ba][aa]) begin failures++; $display("FAIL: port a %0d/%0d", ba, aa); end
      if (rd_b_data != model[bb][ab]) begin failures++; $display("FAIL: port b %0d/%0d", bb, ab); end
      model[wr_bank][wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
