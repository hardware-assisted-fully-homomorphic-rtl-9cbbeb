// tb_palu: drives every PALU micro-operation for the q0 channel and checks the
// memory words it writes, the twiddle registers it updates and the
// inverse-CRT partial product against values computed with 64-bit integers:
// butterfly pairs re-paired into two words (sums to addr1, differences to
// addr2 one cycle later), last-stage butterflies, coefficient-wise multiply
// and add (two results joined per word), on-the-fly twiddle update and
// commit, butterflies on the second twiddle register, post-scaling with
// both twiddle registers, and the two CRT steps.
// Also checks the 5-cycle issue-to-write latency.
`timescale 1ns/1ps
module tb_palu;
  import fv_pkg::*;
  import fv_ref_pkg::*;
  localparam int unsigned NN = 1024;
  localparam u64 Q = Q0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sel2 = 0, tw_load = 0, tw2_load = 0, tw_commit = 0;
  pop_e in_op = P_MUL;
  logic [19:0] in_a = 0, in_b = 0;
  logic [5:0] in_idx = 0;
  wbtag_t in_tag = '0;
  logic tw_pending, mem_we, prod_valid;
  bank_t mem_bank;
  logic [8:0] mem_addr;
  word_t mem_wdata;
  logic [39:0] prod;

  palu #(.Q(Q0), .PSI1024(PSI0_1024), .Q_OTHER(Q1), .N(NN)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // expected writes
  typedef struct { int addr; u64 hi; u64 lo; int at; } wr_t;
  wr_t exp_w [$];
  always @(posedge clk) if (rst_n && mem_we) begin
    wr_t e;
    checks++;
    if (exp_w.size() == 0) begin failures++; $display("FAIL: unexpected write"); end
    else begin
      e = exp_w.pop_front();
      if (mem_addr != 9'(e.addr) || mem_wdata != {20'(e.hi), 20'(e.lo)} || mem_bank != 3'd2) begin
        failures++;
        $display("FAIL: write a=%0d d=%h expected a=%0d hi=%0d lo=%0d", mem_addr, mem_wdata, e.addr, e.hi, e.lo);
      end
      if (e.at >= 0 && cyc != e.at) begin
        failures++; $display("FAIL: write at cycle %0d expected %0d", cyc, e.at);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(pop_e op, u64 a, u64 b, logic s2, int idx, wb_e wb, int a1, int a2);
    @(negedge clk);
    in_valid = 1; in_op = op; in_a = 20'(a); in_b = 20'(b); in_sel2 = s2;
    in_idx = 6'(idx); in_tag = '{wb: wb, addr1: 9'(a1), addr2: 9'(a2), bank: 3'd2};
  endtask
  task automatic idle(int n);
    repeat (n) begin @(negedge clk); in_valid = 0; tw_load = 0; tw2_load = 0; tw_commit = 0; end
  endtask

  initial begin
    u64 w, wm, x [4], y [4], f1, f2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load twiddle = psi^(n/16) (stage m = 16 start value)
    @(negedge clk); tw_load = 1; in_idx = 6'(ROM_FWD_START + 3);
    idle(1);
    w  = powm(PSI0_1024, NN / 16, Q);
    wm = powm(PSI0_1024, 2 * NN / 16, Q);
    // 50 butterfly pairs
    for (int i = 0; i < 50; i++) begin
      for (int k = 0; k < 4; k++) x[k] = $urandom_range(int'(Q) - 1);
      issue(P_BFLY, x[0], x[1], 0, 0, WB_BF1, 0, 0);
      issue(P_BFLY, x[2], x[3], 0, 0, WB_BF2, 2 * i, 2 * i + 1);
      // issued before edge cyc+1, written at edge cyc+5, seen here at cyc+6
      exp_w.push_back('{2 * i, (x[2] + mulm(w, x[3], Q)) % Q, (x[0] + mulm(w, x[1], Q)) % Q,
                        (i == 0) ? cyc + 6 : -1});
      exp_w.push_back('{2 * i + 1, (x[2] + Q - mulm(w, x[3], Q)) % Q,
                        (x[0] + Q - mulm(w, x[1], Q)) % Q, -1});
    end
    idle(8);
    // twiddle update, check via a last-stage butterfly after commit
    issue(P_TWUP, 0, 0, 0, ROM_FWD_STEP + 3, WB_NONE, 0, 0);
    idle(1);
    checks++;
    if (!tw_pending) begin failures++; $display("FAIL: tw_pending not raised"); end
    idle(6);
    checks++;
    if (tw_pending) begin failures++; $display("FAIL: tw_pending stuck"); end
    @(negedge clk); tw_commit = 1;
    idle(1);
    w = mulm(w, wm, Q);
    for (int i = 0; i < 20; i++) begin
      for (int k = 0; k < 2; k++) x[k] = $urandom_range(int'(Q) - 1);
      issue(P_BFLY, x[0], x[1], 0, 0, WB_BFL, 100 + i, 0);
      exp_w.push_back('{100 + i, (x[0] + Q - mulm(w, x[1], Q)) % Q, (x[0] + mulm(w, x[1], Q)) % Q, -1});
    end
    idle(8);
    // butterflies on the second twiddle register (odd-j chain), loaded with w_16^2
    @(negedge clk); tw2_load = 1; in_idx = 6'(ROM_FWD_SQ + 3);
    idle(1);
    f2 = mulm(wm, wm, Q);
    for (int i = 0; i < 20; i++) begin
      for (int k = 0; k < 2; k++) x[k] = $urandom_range(int'(Q) - 1);
      issue(P_BFLY, x[0], x[1], 1, 0, WB_BFL, 140 + i, 0);
      exp_w.push_back('{140 + i, (x[0] + Q - mulm(f2, x[1], Q)) % Q, (x[0] + mulm(f2, x[1], Q)) % Q, -1});
    end
    idle(8);
    // coefficient-wise multiply and add
    for (int i = 0; i < 40; i++) begin
      pop_e op;
      op = (i % 2) ? P_ADD : P_MUL;
      for (int k = 0; k < 4; k++) x[k] = $urandom_range(int'(Q) - 1);
      issue(op, x[0], x[1], 0, 0, WB_LO, 0, 0);
      issue(op, x[2], x[3], 0, 0, WB_HI, 200 + i, 0);
      if (op == P_MUL) exp_w.push_back('{200 + i, mulm(x[2], x[3], Q), mulm(x[0], x[1], Q), -1});
      else             exp_w.push_back('{200 + i, (x[2] + x[3]) % Q, (x[0] + x[1]) % Q, -1});
    end
    idle(8);
    // scaling with twiddle (n^-1) and twiddle2 (n^-1 psi^-n/2)
    @(negedge clk); tw_load = 1; in_idx = 6'(ROM_NINV);
    @(negedge clk); tw_load = 0; tw2_load = 1; in_idx = 6'(ROM_NINV_HALF);
    idle(1);
    f1 = powm(NN, Q - 2, Q);
    f2 = mulm(f1, powm(PSI0_1024, 2 * NN - NN / 2, Q), Q);
    for (int i = 0; i < 10; i++) begin
      for (int k = 0; k < 2; k++) x[k] = $urandom_range(int'(Q) - 1);
      issue(P_SCALE, x[0], 0, 0, 0, WB_LO, 0, 0);
      issue(P_SCALE, x[1], 0, 1, 0, WB_HI, 300 + i, 0);
      exp_w.push_back('{300 + i, mulm(x[1], f2, Q), mulm(x[0], f1, Q), -1});
    end
    idle(8);
    // inverse CRT partial product
    for (int i = 0; i < 5; i++) begin
      u64 a0, r;
      a0 = $urandom_range(int'(Q) - 1);
      issue(P_CRT1, a0, 0, 0, ROM_QINV, WB_NONE, 0, 0);
      idle(6);
      issue(P_CRT2, 0, 0, 0, ROM_QOTHER, WB_NONE, 0, 0);
      idle(1);
      while (!prod_valid) @(negedge clk);
      r = mulm(a0, powm(Q1 % Q, Q - 2, Q), Q) * u64'(Q1);
      checks++;
      if (prod != 40'(r)) begin failures++; $display("FAIL: crt prod %0d expected %0d", prod, r); end
    end
    idle(4);
    checks++;
    if (exp_w.size() != 0) begin failures++; $display("FAIL: %0d writes missing", exp_w.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
