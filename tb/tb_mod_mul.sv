// tb_mod_mul: checks the window-reduction modular multiplier for both
// primes of the design against a*b mod Q computed with 64-bit integers,
// including the extreme operands, checks the raw product output and the
// 4-cycle latency of the pipeline.
`timescale 1ns/1ps
module tb_mod_mul;
  localparam int unsigned QA = 878593, QB = 890881;
  localparam int LAT = 4, NV = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        iv = 0;
  logic [19:0] a [2], b [2];
  logic        ov [2];
  logic [19:0] r [2];
  logic [39:0] p [2];

  mod_mul #(.Q(QA)) u0 (.clk, .rst_n, .in_valid(iv), .a(a[0]), .b(b[0]),
                        .out_valid(ov[0]), .res(r[0]), .prod(p[0]));
  mod_mul #(.Q(QB)) u1 (.clk, .rst_n, .in_valid(iv), .a(a[1]), .b(b[1]),
                        .out_valid(ov[1]), .res(r[1]), .prod(p[1]));

  int checks = 0, failures = 0;
  longint unsigned ea [2][$], eb [2][$];
  int issue_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && ov[0]) begin
    int ic;
    ic = issue_cyc.pop_front();
    checks++;
    // issued before edge ic+1, visible to this checker at edge ic+LAT+1
    if (cyc - ic != LAT + 1) begin
      failures++; $display("FAIL: latency %0d", cyc - ic);
    end
    for (int c = 0; c < 2; c++) begin
      longint unsigned x, y, qq;
      x = ea[c].pop_front(); y = eb[c].pop_front();
      qq = (c == 0) ? QA : QB;
      checks += 2;
      if (r[c] != 20'((x * y) % qq)) begin
        failures++; $display("FAIL: q%0d %0d*%0d -> %0d", c, x, y, r[c]);
      end
      if (p[c] != 40'(x * y)) begin
        failures++; $display("FAIL: raw product q%0d", c);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      iv = 1;
      for (int c = 0; c < 2; c++) begin
        int unsigned qq;
        qq = (c == 0) ? QA : QB;
        if (i < 4) begin
          a[c] = (i[0]) ? 20'(qq - 1) : 20'd1;
          b[c] = (i[1]) ? 20'(qq - 1) : 20'(qq - 2);
        end else begin
          a[c] = 20'($urandom_range(qq - 1));
          b[c] = 20'($urandom_range(qq - 1));
        end
        ea[c].push_back(a[c]); eb[c].push_back(b[c]);
      end
      issue_cyc.push_back(cyc);
      if (i % 7 == 3) begin @(negedge clk); iv = 0; end
    end
    @(negedge clk) iv = 0;
    repeat (10) @(negedge clk);
    if (issue_cyc.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
