// tb_recryption_box: end-to-end test of the recryption processor at its
// default size (n = 1024).
//
// The testbench plays client and cloud: it generates an FV key pair with
// q = q0*q1 in CRT form, encrypts a random bit, adds a large extra noise
// (up to 2^34, as after homomorphic evaluation), loads the box's secret key
// and the public key in the NTT domain (computed by the reference package)
// together with the ciphertext, runs one CMD_RECRYPT and reads back the
// refreshed ciphertext. It then decrypts that ciphertext with its own
// reference arithmetic and checks that the bit is unchanged, that every
// other coefficient decodes to 0, that the remaining noise is far below the
// injected noise, and that the processor's own decoded bit matches.
// It also counts the mechanisms the design relies on (bit-reversal swaps,
// twiddle-wait stalls, inverse-NTT scaling, LUT2 lookups, ROM bit scans,
// ternary rejections, inverse CRT) and fails if one never occurred, and it
// reports the recryption latency in cycles.
`timescale 1ns/1ps
module tb_recryption_box;
  import fv_pkg::*;
  import fv_ref_pkg::*;

  localparam int unsigned NT = 1024;   // must equal the box's default N
  localparam int unsigned HT = NT / 2;
  localparam int RUNS = 3;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic start = 0;
  cmd_e cmd = CMD_NOP;
  bank_t bank_a = 0, bank_b = 0, bank_dst = 0, host_bank = 0;
  logic busy, done, host_we = 0, host_re = 0, dec_bit;
  logic [$clog2(HT)-1:0] host_addr = 0;
  word_t host_wdata [2], host_rdata [2];
  logic [8:0] trng;

  recryption_box dut (
    .clk, .rst_n, .start, .cmd, .bank_a, .bank_b, .bank_dst, .busy, .done,
    .host_we, .host_re, .host_bank, .host_addr, .host_wdata, .host_rdata,
    .trng, .dec_bit
  );

  always @(posedge clk) trng <= 9'($urandom);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_swap = 0, n_twstall = 0, n_scale = 0, n_lut2 = 0, n_scan = 0,
      n_trej = 0, n_icrt = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.dq.sw == dut.u_ctrl.SW_2) n_swap++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_ST_WAIT && dut.tw_pending[0]) n_twstall++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_SC_LO) n_scale++;
    if (dut.dgs_en && dut.u_dgs.state == dut.u_dgs.S_LUT2) n_lut2++;
    if (dut.dgs_scan) n_scan++;
    if (dut.dgs_en && dut.dgs_mode && dut.trng[1:0] == 2'b11) n_trej++;
    if (dut.icrt_valid) n_icrt++;
  end

  u64 Q [2] = '{u64'(Q0), u64'(Q1)};
  localparam u64 QQt = u64'(Q0) * u64'(Q1);
  u64 PSI [2];

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

  function automatic longint smallv(int bound);
    return longint'($urandom_range(2 * bound)) - longint'(bound);
  endfunction

  initial begin
    poly_t s [2], a [2], e [2], b [2], sn [2], an [2], bn [2];
    poly_t u [2], e1 [2], e2 [2], c0 [2], c1 [2], r0 [2], r1 [2], v [2];
    longint sv [], ev [], uv [], e1v [], e2v [], nv [];
    int cycles;

    PSI[0] = powm(PSI0_1024, 1024 / NT, Q[0]);
    PSI[1] = powm(PSI1_1024, 1024 / NT, Q[1]);
    sv = new[NT]; ev = new[NT]; uv = new[NT]; e1v = new[NT]; e2v = new[NT];
    nv = new[NT];
    for (int i = 0; i < int'(NT); i++) begin
      sv[i] = smallv(1); ev[i] = smallv(4);
    end
    for (int c = 0; c < 2; c++) begin
      s[c] = new[NT]; a[c] = new[NT]; e[c] = new[NT];
      for (int i = 0; i < int'(NT); i++) begin
        s[c][i] = res_of(sv[i], Q[c]);
        e[c][i] = res_of(ev[i], Q[c]);
        a[c][i] = $urandom_range(int'(Q[c]) - 1);
      end
      // b = -(a s + e)
      b[c] = padd(pmul(a[c], s[c], NT, Q[c]), e[c], NT, Q[c]);
      for (int i = 0; i < int'(NT); i++) b[c][i] = int'((Q[c] - u64'(b[c][i])) % Q[c]);
      sn[c] = ntt(s[c], NT, Q[c], PSI[c]);
      an[c] = ntt(a[c], NT, Q[c], PSI[c]);
      bn[c] = ntt(b[c], NT, Q[c], PSI[c]);
    end

    repeat (4) @(negedge clk);
    rst_n = 1;
    load_poly(3'd0, sn[0], sn[1]);
    load_poly(3'd1, bn[0], bn[1]);
    load_poly(3'd2, an[0], an[1]);

    for (int run = 0; run < RUNS; run++) begin
      bit m;
      m = (run == 0) ? 1'b1 : 1'b0;
      if (run > 1) m = 1'($urandom);
      // client-side encryption with a large extra noise on c0
      for (int i = 0; i < int'(NT); i++) begin
        uv[i] = smallv(1); e1v[i] = smallv(4); e2v[i] = smallv(4);
        nv[i] = longint'($urandom_range(32'h7fff_ffff)) * 8 - 64'sd17179869184;
      end
      for (int c = 0; c < 2; c++) begin
        u[c] = new[NT]; e1[c] = new[NT]; e2[c] = new[NT];
        for (int i = 0; i < int'(NT); i++) begin
          u[c][i] = res_of(uv[i], Q[c]);
          e1[c][i] = res_of(e1v[i] + nv[i], Q[c]);
          e2[c][i] = res_of(e2v[i], Q[c]);
        end
        c0[c] = padd(pmul(b[c], u[c], NT, Q[c]), e1[c], NT, Q[c]);
        if (m) c0[c][0] = int'((u64'(c0[c][0]) + (QQt / 2) % Q[c]) % Q[c]);
        c1[c] = padd(pmul(a[c], u[c], NT, Q[c]), e2[c], NT, Q[c]);
      end
      load_poly(3'd3, c1[0], c1[1]);
      load_poly(3'd4, c0[0], c0[1]);

      @(negedge clk);
      cmd = CMD_RECRYPT; start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      $display("recryption %0d: m=%0d, %0d cycles (document: 53576)", run, m, cycles);
      check(cycles < 90000, "recryption latency within the schedule bound");
      check(dec_bit == m, "box decoded the masked input bit");

      read_poly(3'd3, r0[0], r0[1]);
      read_poly(3'd5, r1[0], r1[1]);
      begin
        int bad;
        longint maxn;
        bad = 0; maxn = 0;
        for (int c = 0; c < 2; c++)
          v[c] = padd(r0[c], pmul(r1[c], s[c], NT, Q[c]), NT, Q[c]);
        for (int i = 0; i < int'(NT); i++) begin
          u64 x;
          bit mb;
          longint nz;
          x  = crt(u64'(v[0][i]), u64'(v[1][i]), Q[0], Q[1]);
          mb = decode(x, QQt);
          nz = centred((i == 0 && m) ? (x + QQt - QQt / 2) % QQt : x, QQt);
          if (nz < 0) nz = -nz;
          if (nz > maxn) maxn = nz;
          if (mb != ((i == 0) ? m : 1'b0)) begin
            bad++;
            if (bad < 5) $display("  coefficient %0d decodes wrong: %0d", i, centred(x, QQt));
          end
        end
        check(bad == 0, $sformatf("refreshed ciphertext decrypts (%0d wrong coefficients)", bad));
        check(maxn < 64'sd1 << 20, $sformatf("fresh noise small (max %0d)", maxn));
        $display("  max noise after recryption: %0d (injected up to 2^34)", maxn);
      end
    end

    $display("mechanisms: swaps=%0d twiddle_stalls=%0d scale_words=%0d lut2=%0d scans=%0d tern_rejects=%0d icrt=%0d",
             n_swap, n_twstall, n_scale, n_lut2, n_scan, n_trej, n_icrt);
    check(n_swap > 0, "bit-reversal swaps happened");
    check(n_twstall > 0, "twiddle-wait stalls happened");
    check(n_scale > 0, "inverse-NTT scaling happened");
    check(n_lut2 > 0, "LUT2 lookups happened");
    check(n_scan > 0, "probability-ROM bit scans happened");
    check(n_trej > 0, "ternary rejections happened");
    check(n_icrt == RUNS, "one inverse CRT per recryption");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
