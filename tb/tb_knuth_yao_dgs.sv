// tb_knuth_yao_dgs: tests the discrete Gaussian sampler.
//  - Every sample decided by LUT1 is compared with an independent bit-level
//    Knuth-Yao walk over the probability matrix, using the same random bits.
//  - 40000 samples: mean near 0, variance near sigma^2 = s^2/(2 pi) = 20.39,
//    all magnitudes within the 51 tail bound, residues consistent with the
//    signed value, LUT2 lookups and ROM bit scans both observed.
//  - Throughput: at least 0.85 samples per enabled cycle (one per cycle on a
//    LUT1 hit).
//  - Ternary mode: only -1, 0, 1, each about one third.
`timescale 1ns/1ps
module tb_knuth_yao_dgs;
  import dgs_pkg::*;
  localparam int unsigned QA = 878593, QB = 890881;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, mode = 0, out_valid, scan_event;
  logic [8:0] rnd;
  logic signed [7:0] out_sample;
  logic [19:0] out_mod0, out_mod1;

  knuth_yao_dgs #(.Q0(QA), .Q1(QB)) dut (.*);

  always @(negedge clk) rnd = 9'($urandom);

  int checks = 0, failures = 0;
  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: walk the first 8 columns with bits b[7] (first) .. b[0]
  function automatic int ref_walk8(logic [7:0] b);
    int d = 0;
    for (int c = 0; c < 8; c++) begin
      d = 2 * d + int'(b[7 - c]);
      for (int r = ROWS - 1; r >= 0; r--) begin
        d = d - int'(PCOL[c][r]);
        if (d == -1) return r;
      end
    end
    return -1;
  endfunction

  int expect_q [$];
  int n_lut1 = 0, n_lut2 = 0, n_scan = 0;
  always @(posedge clk) if (rst_n && en && !mode) begin
    if (dut.state == dut.S_LUT1) begin
      int r;
      r = ref_walk8(rnd[7:0]);
      if (r >= 0) expect_q.push_back((rnd[8] && r != 0) ? -r : r);
    end
    if (dut.state == dut.S_LUT2) n_lut2++;
  end

  initial begin
    longint sum = 0, sum2 = 0;
    int cnt = 0, cycles = 0, tcnt [3];
    real mean, var_;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) en = 1;
    while (cnt < 40000) begin
      @(posedge clk);
      cycles++;
      if (out_valid) begin
        int v;
        v = out_sample;
        cnt++;
        sum += v; sum2 += v * v;
        if (scan_event) n_scan++;
        checks++;
        if (v > 51 || v < -51) begin failures++; $display("FAIL: tail %0d", v); end
        checks++;
        if (out_mod0 != 20'((v < 0) ? QA + v : v) || out_mod1 != 20'((v < 0) ? QB + v : v)) begin
          failures++; $display("FAIL: residues of %0d", v);
        end
      end
    end
    #1 en = 0;
    mean = real'(sum) / cnt;
    var_ = real'(sum2) / cnt - mean * mean;
    $display("gauss: %0d samples in %0d cycles, mean %f, variance %f, lut2 %0d, scans %0d",
             cnt, cycles, mean, var_, n_lut2, n_scan);
    checks += 5;
    if (mean > 0.15 || mean < -0.15) begin failures++; $display("FAIL: mean"); end
    if (var_ < 19.4 || var_ > 21.4) begin failures++; $display("FAIL: variance"); end
    if (n_lut2 == 0) begin failures++; $display("FAIL: no LUT2 lookups"); end
    if (n_scan == 0) begin failures++; $display("FAIL: no bit scans"); end
    if (real'(cnt) < 0.85 * cycles) begin failures++; $display("FAIL: throughput"); end
    // ternary
    repeat (3) @(negedge clk);
    mode = 1; en = 1;
    tcnt = '{0, 0, 0};
    cnt = 0;
    while (cnt < 9000) begin
      @(posedge clk);
      if (out_valid) begin
        cnt++;
        checks++;
        if (out_sample > 1 || out_sample < -1) begin failures++; $display("FAIL: ternary %0d", out_sample); end
        else tcnt[out_sample + 1]++;
      end
    end
    $display("ternary: %0d %0d %0d", tcnt[0], tcnt[1], tcnt[2]);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (tcnt[i] < 2750 || tcnt[i] > 3250) begin failures++; $display("FAIL: ternary balance"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LUT1 decisions: the sample emitted one cycle after a LUT1 hit
  logic lut1_hit_d;
  always @(posedge clk) begin
    lut1_hit_d <= rst_n && en && !mode && dut.state == dut.S_LUT1 && dut.l1[6];
    if (lut1_hit_d) begin
      int e;
      e = expect_q.pop_front();
      checks++; n_lut1++;
      if (!out_valid || int'(out_sample) != e) begin
        failures++; $display("FAIL: LUT1 sample %0d expected %0d", out_sample, e);
      end
    end
  end
endmodule
