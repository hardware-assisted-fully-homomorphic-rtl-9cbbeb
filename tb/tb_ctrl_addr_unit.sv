// tb_ctrl_addr_unit: runs every command of the control/address unit on its
// own, through the full processor datapath at n = 1024, and compares the
// memory contents with the reference arithmetic:
//   NTT (against direct evaluation at the odd powers of psi), INTT of the
//   NTT result (identity), PMUL and PADD (against schoolbook negacyclic
//   arithmetic after INTT), GAUSS and TERN (coefficient ranges), DECODE
//   (constant coefficient decoded, encoded as floor(q/2) or 0, others 0).
// It also measures the cycles of each command and checks them against this
// exact counts of this design's schedule (NTT 9381, INTT 13999, PMUL and
// PADD n + 11, GAUSS below 2n, DECODE n/2 + 28); the document's counts (7181, 9910, 1040,
// 1032, 1080) are printed alongside for comparison.
`timescale 1ns/1ps
module tb_ctrl_addr_unit;
  import fv_pkg::*;
  import fv_ref_pkg::*;

  localparam int unsigned NT = 1024;
  localparam int unsigned HT = NT / 2;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  logic start = 0;
  cmd_e cmd = CMD_NOP;
  bank_t bank_a = 0, bank_b = 0, bank_dst = 0, host_bank = 0;
  logic busy, done, host_we = 0, host_re = 0, dec_bit;
  logic [$clog2(HT)-1:0] host_addr = 0;
  word_t host_wdata [2], host_rdata [2];
  logic [8:0] trng;

  recryption_box dut (.*);
  always @(posedge clk) trng <= 9'($urandom);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  u64 Q [2] = '{u64'(Q0), u64'(Q1)};
  u64 PSI [2];
  localparam u64 QQt = u64'(Q0) * u64'(Q1);

  task automatic load_poly(bank_t bk, poly_t p0, poly_t p1);
    for (int w = 0; w < int'(HT); w++) begin
      @(negedge clk);
      host_we = 1; host_bank = bk; host_addr = w[$clog2(HT)-1:0];
      host_wdata[0] = {20'(p0[w + HT]), 20'(p0[w])};
      host_wdata[1] = {20'(p1[w + HT]), 20'(p1[w])};
    end
    @(negedge clk) host_we = 0;
  endtask

  task automatic read_poly(bank_t bk, output poly_t p0, output poly_t p1);
    p0 = new[NT]; p1 = new[NT];
    for (int w = 0; w < int'(HT); w++) begin
      @(negedge clk);
      host_re = 1; host_bank = bk; host_addr = w[$clog2(HT)-1:0];
      @(negedge clk);
      host_re = 0;
      p0[w] = host_rdata[0][19:0]; p0[w + HT] = host_rdata[0][39:20];
      p1[w] = host_rdata[1][19:0]; p1[w + HT] = host_rdata[1][39:20];
    end
  endtask

  task automatic run(cmd_e c, bank_t a, bank_t b, bank_t d, output int cycles);
    @(negedge clk);
    cmd = c; bank_a = a; bank_b = b; bank_dst = d; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  function automatic bit same(poly_t x, poly_t y);
    for (int i = 0; i < int'(NT); i++) if (x[i] != y[i]) return 0;
    return 1;
  endfunction

  initial begin
    poly_t x [2], y [2], xn [2], yn [2], r [2], t [2];
    int cyc;
    PSI[0] = powm(PSI0_1024, 1024 / NT, Q[0]);
    PSI[1] = powm(PSI1_1024, 1024 / NT, Q[1]);
    for (int c = 0; c < 2; c++) begin
      x[c] = new[NT]; y[c] = new[NT];
      for (int i = 0; i < int'(NT); i++) begin
        x[c][i] = $urandom_range(int'(Q[c]) - 1);
        y[c][i] = $urandom_range(int'(Q[c]) - 1);
      end
      xn[c] = ntt(x[c], NT, Q[c], PSI[c]);
      yn[c] = ntt(y[c], NT, Q[c], PSI[c]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_poly(3'd1, x[0], x[1]);
    load_poly(3'd2, y[0], y[1]);

    // NTT
    run(CMD_NTT, 3'd1, 3'd0, 3'd1, cyc);
    $display("NTT: %0d cycles (document: 7181)", cyc);
    check(cyc == 9381, "NTT cycles of this schedule");
    read_poly(3'd1, r[0], r[1]);
    check(same(r[0], xn[0]) && same(r[1], xn[1]), "NTT result");
    run(CMD_NTT, 3'd2, 3'd0, 3'd2, cyc);
    // PMUL in NTT domain, INTT back: negacyclic product
    run(CMD_PMUL, 3'd1, 3'd2, 3'd3, cyc);
    $display("PMUL: %0d cycles (document: 1040)", cyc);
    check(cyc == int'(NT) + 11, "PMUL cycles = n + 11");
    run(CMD_INTT, 3'd3, 3'd0, 3'd3, cyc);
    $display("INTT: %0d cycles (document: 9910)", cyc);
    check(cyc == 13999, "INTT cycles of this schedule");
    read_poly(3'd3, r[0], r[1]);
    for (int c = 0; c < 2; c++) t[c] = pmul(x[c], y[c], NT, Q[c]);
    check(same(r[0], t[0]) && same(r[1], t[1]), "NTT-PMUL-INTT = negacyclic product");
    // INTT of the NTT of x restores x
    run(CMD_INTT, 3'd1, 3'd0, 3'd1, cyc);
    read_poly(3'd1, r[0], r[1]);
    check(same(r[0], x[0]) && same(r[1], x[1]), "INTT(NTT(x)) = x");
    // PADD
    run(CMD_PADD, 3'd1, 3'd3, 3'd4, cyc);
    $display("PADD: %0d cycles (document: 1032)", cyc);
    check(cyc == int'(NT) + 11, "PADD cycles = n + 11");
    read_poly(3'd4, r[0], r[1]);
    for (int c = 0; c < 2; c++) t[c] = padd(x[c], pmul(x[c], y[c], NT, Q[c]), NT, Q[c]);
    check(same(r[0], t[0]) && same(r[1], t[1]), "PADD result");
    // GAUSS
    run(CMD_GAUSS, 3'd0, 3'd0, 3'd5, cyc);
    $display("GAUSS: %0d cycles (document: 1080)", cyc);
    check(cyc < 2 * int'(NT), "GAUSS cycle bound");
    read_poly(3'd5, r[0], r[1]);
    begin
      int badg, nz;
      badg = 0; nz = 0;
      for (int i = 0; i < int'(NT); i++) begin
        longint v0, v1;
        v0 = centred(r[0][i], Q[0]); v1 = centred(r[1][i], Q[1]);
        if (v0 != v1 || v0 > 51 || v0 < -51) badg++;
        if (v0 != 0) nz++;
      end
      check(badg == 0 && nz > int'(NT) / 2, "GAUSS coefficients");
    end
    // TERN
    run(CMD_TERN, 3'd0, 3'd0, 3'd5, cyc);
    read_poly(3'd5, r[0], r[1]);
    begin
      int badt, cnt [3];
      badt = 0; cnt = '{0, 0, 0};
      for (int i = 0; i < int'(NT); i++) begin
        longint v0, v1;
        v0 = centred(r[0][i], Q[0]); v1 = centred(r[1][i], Q[1]);
        if (v0 != v1 || v0 > 1 || v0 < -1) badt++;
        else cnt[v0 + 1]++;
      end
      check(badt == 0 && cnt[0] > 200 && cnt[1] > 200 && cnt[2] > 200, "TERN coefficients");
    end
    // DECODE: coefficient 0 near q/2 -> 1, near 0 -> 0
    for (int k = 0; k < 2; k++) begin
      u64 v;
      v = (k == 0) ? QQt / 2 + 12345 : QQt - 777;
      for (int c = 0; c < 2; c++) begin
        t[c] = new[NT];
        for (int i = 0; i < int'(NT); i++) t[c][i] = $urandom_range(int'(Q[c]) - 1);
        t[c][0] = int'(v % Q[c]);
      end
      load_poly(3'd4, t[0], t[1]);
      run(CMD_DECODE, 3'd4, 3'd0, 3'd4, cyc);
      if (k == 0) $display("DECODE (inverse CRT, decode, fill): %0d cycles (document: inverse CRT 28)", cyc);
      check(cyc == int'(HT) + 28, "DECODE cycles = n/2 fill + 28");
      read_poly(3'd4, r[0], r[1]);
      check(dec_bit == (k == 0), "DECODE bit");
      check(r[0][0] == ((k == 0) ? int'((QQt / 2) % Q[0]) : 0) &&
            r[1][0] == ((k == 0) ? int'((QQt / 2) % Q[1]) : 0), "DECODE encoded coefficient");
      begin
        int nzr;
        nzr = 0;
        for (int i = 1; i < int'(NT); i++) if (r[0][i] != 0 || r[1][i] != 0) nzr++;
        check(nzr == 0, "DECODE clears other coefficients");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
