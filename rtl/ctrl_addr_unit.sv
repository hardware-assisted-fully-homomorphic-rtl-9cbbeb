// ctrl_addr_unit: control and address unit of the recryption processor.
//
// It executes one command at a time on the six polynomial blocks M0..M5 of
// both memory files and drives the two PALUs in lockstep (both residue
// channels see identical addresses and micro-ops):
//   CMD_NTT / CMD_INTT  negative-wrapped NTT of block a, in place
//   CMD_PMUL / CMD_PADD coefficient-wise product / sum of blocks a, b -> dst
//   CMD_GAUSS / CMD_TERN fill dst from the Gaussian / ternary sampler
//   CMD_DECODE          inverse CRT and decode-encode of coefficient 0 of a;
//                       dst becomes the encoded bit (all other coefficients 0)
//   CMD_RECRYPT         the whole recryption program (see RECRYPT_PROG)
//
// Memory layout. A polynomial of n coefficients occupies n/2 words; word j
// holds {a[j+n/2], a[j]} ("natural pair layout"). The NTT is the
// memory-efficient iterative NTT: the bit-reversal permutation reduces in
// this layout to swapping whole words (word j <-> word bitrev(j)); each stage
// m = 2 .. n/2 then reads two words (k/2+j and k/2+j+m/2, k the group base),
// performs two butterflies with the same twiddle and writes the words back
// re-paired at distance m, which is the pairing the next stage needs; the
// last stage (m = n) does one butterfly per word and leaves the result again
// in natural pair layout, A[i] = a(psi^(2i+1)). The first twiddle of a
// forward stage is sqrt(w_m) (this merges the negative-wrapped pre-scaling
// into the stages); the inverse starts from 1 and is followed by a
// post-scaling pass by n^-1 psi^-i. Twiddles are produced on the fly by the
// PALU multiplier. The first stage has a single j and one chain. Every later
// stage runs two interleaved chains: twiddle register 1 serves the even j and
// twiddle register 2 the odd j, each stepped by w_m^2, so the two updates of
// a j pair share one multiplier latency. The controller keeps issuing
// butterflies with the current twiddles and waits for the next pair only when
// a pair of j-iterations has fewer butterflies than the multiplier latency.
//
// Timing: reads are issued in one cycle, the PALU micro-op in the next (a
// one-entry descriptor register carries it), and results are written back by
// the PALUs 5 cycles later. Between phases that read what the previous phase
// wrote the controller waits DRAIN cycles. start is accepted in IDLE; done
// pulses for one cycle when a command (or the whole program) has finished.
// The command set, recryption program order (from the document's description
// of blocks M0..M5) and the cycle schedule are this design's reading of the
// document; exact cycle counts differ from the published ones.
module ctrl_addr_unit
  import fv_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        start,
  input  cmd_e        cmd,
  input  bank_t       bank_a,
  input  bank_t       bank_b,
  input  bank_t       bank_dst,
  output logic        busy,
  output logic        done,
  // memory read ports (shared by both memory files)
  output logic        rd_a_en,
  output bank_t       rd_a_bank,
  output logic [$clog2(N/2)-1:0] rd_a_addr,
  output logic        rd_b_en,
  output bank_t       rd_b_bank,
  output logic [$clog2(N/2)-1:0] rd_b_addr,
  input  word_t       rd_a_data [2],
  input  word_t       rd_b_data [2],
  // controller's own memory writes
  output logic        wr_en,
  output bank_t       wr_bank,
  output logic [$clog2(N/2)-1:0] wr_addr,
  output word_t       wr_data [2],
  // PALU issue (both channels)
  output logic        p_valid,
  output pop_e        p_op,
  output logic [19:0] p_a [2],
  output logic [19:0] p_b [2],
  output logic        p_sel2,
  output logic [5:0]  p_idx,
  output wbtag_t      p_tag,
  output logic        p_tw_load,
  output logic        p_tw2_load,
  output logic        p_tw_commit,
  input  logic        tw_pending,
  // sampler
  output logic        dgs_en,
  output logic        dgs_mode,
  input  logic        dgs_valid,
  input  logic [19:0] dgs_mod [2],
  // decode-encode result
  input  logic        dec_valid,
  input  logic [19:0] dec_enc [2]
);
  localparam int unsigned H     = N / 2;
  localparam int unsigned AW    = $clog2(H);
  localparam int unsigned LOGN  = AW + 1;
  localparam int unsigned DRAIN = 8;

  typedef logic [AW-1:0] addr_t;

  // ---------------------------------------------------------------- program
  typedef struct packed {
    cmd_e  c;
    bank_t a;
    bank_t b;
    bank_t d;
  } pcmd_t;
  localparam int unsigned PLEN = 16;
  localparam pcmd_t RECRYPT_PROG [PLEN] = '{
    // decryption: M3 = c1, M4 = c0, M0 = NTT(s)
    '{CMD_NTT,    3'd3, 3'd0, 3'd3},
    '{CMD_PMUL,   3'd0, 3'd3, 3'd3},
    '{CMD_INTT,   3'd3, 3'd0, 3'd3},
    '{CMD_PADD,   3'd3, 3'd4, 3'd3},
    '{CMD_DECODE, 3'd3, 3'd0, 3'd3},
    // encryption: M1 = NTT(b), M2 = NTT(a) of the client's public key
    '{CMD_GAUSS,  3'd0, 3'd0, 3'd4},
    '{CMD_PADD,   3'd3, 3'd4, 3'd3},
    '{CMD_TERN,   3'd0, 3'd0, 3'd5},
    '{CMD_NTT,    3'd5, 3'd0, 3'd5},
    '{CMD_PMUL,   3'd1, 3'd5, 3'd4},
    '{CMD_PMUL,   3'd2, 3'd5, 3'd5},
    '{CMD_INTT,   3'd4, 3'd0, 3'd4},
    '{CMD_INTT,   3'd5, 3'd0, 3'd5},
    '{CMD_PADD,   3'd3, 3'd4, 3'd3},
    '{CMD_GAUSS,  3'd0, 3'd0, 3'd4},
    '{CMD_PADD,   3'd5, 3'd4, 3'd5}
  };

  function automatic addr_t bitrev(addr_t x);
    addr_t r;
    for (int i = 0; i < int'(AW); i++) r[i] = x[AW-1-i];
    return r;
  endfunction

  // ---------------------------------------------------------------- state
  typedef enum logic [5:0] {
    S_IDLE, S_FETCH, S_DISPATCH,
    S_BR_SCAN, S_BR_2,
    S_ST_LOAD, S_ST_INIT, S_ST_INIT2, S_ST_TWUP, S_ST_TWUP2, S_ST_BF1, S_ST_BF2, S_ST_BFL, S_ST_WAIT, S_ST_COMMIT,
    S_SC_LOAD, S_SC_LOAD2, S_SC_TWUP, S_SC_TWUP2, S_SC_LO, S_SC_HI,
    S_SC_WAIT, S_SC_COMMIT,
    S_CW_LO, S_CW_HI,
    S_SMP,
    S_DC_RD, S_DC_WAIT, S_DC_CRT2, S_DC_DEC, S_DC_FILL,
    S_DRAIN, S_CMD_END
  } state_e;

  state_e state, drain_next;
  logic   prog;            // running the recryption program
  logic [3:0] pc;
  cmd_e   c_cmd;
  bank_t  c_a, c_b, c_d;
  logic   inv;
  logic [3:0] stg;         // stage index s, m = 2^(s+1)
  addr_t  jj, kk, ww;
  logic [AW:0] mcnt;       // m as a word count (m <= n/2 here)
  logic [3:0]  wcnt;
  logic        smp_half;
  coef_t       smp_lo [2];
  coef_t       dec_r [2];

  wire [AW:0] m_words = (AW+1)'(1) << (stg + 1);   // m
  wire [AW:0] m_half  = (AW+1)'(1) << stg;         // m/2
  // Stages after the first run two twiddle chains: j (twiddle register 1)
  // and j+1 (twiddle register 2), each stepped by w_m^2.
  logic  sj;               // working on the second j of a pair
  logic  tinit;            // the pending commit initialises the two chains
  wire   pair = (stg != 4'd0);
  wire addr_t jx = jj + addr_t'(sj);

  // ---------------------------------------------------------------- descriptor
  typedef enum logic [2:0] {SRC_NONE, SRC_RD_LO, SRC_HOLD_HI, SRC_BF} src_e;
  typedef enum logic [1:0] {SW_NONE, SW_1, SW_2} swap_e;
  typedef struct packed {
    logic   v;
    pop_e   op;
    src_e   src;
    logic   sel2;
    logic [5:0] idx;
    wbtag_t tag;
    logic   twl, tw2l, twc;
    swap_e  sw;
    addr_t  sw_a1, sw_a2;
    bank_t  sw_bank;
  } desc_t;

  desc_t nd, dq;          // next descriptor (comb), registered descriptor
  word_t hold_a [2], hold_b [2];

  // ---------------------------------------------------------------- issue logic
  always_comb begin
    nd = '0;
    rd_a_en = 1'b0; rd_a_bank = c_a; rd_a_addr = '0;
    rd_b_en = 1'b0; rd_b_bank = c_b; rd_b_addr = '0;
    unique case (state)
      S_BR_SCAN: if (ww < bitrev(ww)) begin
        rd_a_en = 1'b1; rd_a_addr = ww;
        nd.sw = SW_1;
      end
      S_BR_2: begin
        rd_a_en = 1'b1; rd_a_addr = bitrev(ww);
        nd.sw = SW_2; nd.sw_a1 = ww; nd.sw_a2 = bitrev(ww); nd.sw_bank = c_a;
      end
      S_ST_LOAD: begin
        nd.twl = 1'b1; nd.tw2l = pair;
        nd.idx = 6'(inv ? ROM_ONE : ROM_FWD_START + int'(stg));
      end
      S_ST_INIT: begin   // chain 1 keeps the start value
        nd.v = 1'b1; nd.op = P_TWUP; nd.idx = 6'(ROM_ONE);
      end
      S_ST_INIT2: begin  // chain 2 starts one step ahead
        nd.v = 1'b1; nd.op = P_TWUP2;
        nd.idx = 6'((inv ? ROM_INV_STEP : ROM_FWD_STEP) + int'(stg));
      end
      S_ST_TWUP: begin
        nd.v = 1'b1; nd.op = P_TWUP;
        nd.idx = pair ? 6'((inv ? ROM_INV_SQ : ROM_FWD_SQ) + int'(stg))
                      : 6'((inv ? ROM_INV_STEP : ROM_FWD_STEP) + int'(stg));
      end
      S_ST_TWUP2: begin
        nd.v = 1'b1; nd.op = P_TWUP2;
        nd.idx = 6'((inv ? ROM_INV_SQ : ROM_FWD_SQ) + int'(stg));
      end
      S_ST_BF1: begin
        rd_a_en = 1'b1; rd_a_addr = kk + jx;
        nd.v = 1'b1; nd.op = P_BFLY; nd.src = SRC_BF; nd.tag.wb = WB_BF1;
        nd.sel2 = sj;
      end
      S_ST_BF2: begin
        rd_a_en = 1'b1; rd_a_addr = kk + jx + addr_t'(m_half);
        nd.v = 1'b1; nd.op = P_BFLY; nd.src = SRC_BF; nd.sel2 = sj;
        nd.tag = '{wb: WB_BF2, addr1: 9'(kk + jx),
                   addr2: 9'(kk + jx + addr_t'(m_half)), bank: c_a};
      end
      S_ST_BFL: begin
        rd_a_en = 1'b1; rd_a_addr = jx;
        nd.v = 1'b1; nd.op = P_BFLY; nd.src = SRC_BF; nd.sel2 = sj;
        nd.tag = '{wb: WB_BFL, addr1: 9'(jx), addr2: '0, bank: c_a};
      end
      S_ST_COMMIT, S_SC_COMMIT: nd.twc = 1'b1;
      S_SC_LOAD:  begin nd.twl  = 1'b1; nd.idx = 6'(ROM_NINV); end
      S_SC_LOAD2: begin nd.tw2l = 1'b1; nd.idx = 6'(ROM_NINV_HALF); end
      S_SC_TWUP:  begin nd.v = 1'b1; nd.op = P_TWUP;  nd.idx = 6'(ROM_PSI_INV); end
      S_SC_TWUP2: begin nd.v = 1'b1; nd.op = P_TWUP2; nd.idx = 6'(ROM_PSI_INV); end
      S_SC_LO: begin
        rd_a_en = 1'b1; rd_a_addr = ww;
        nd.v = 1'b1; nd.op = P_SCALE; nd.src = SRC_RD_LO; nd.tag.wb = WB_LO;
      end
      S_SC_HI: begin
        nd.v = 1'b1; nd.op = P_SCALE; nd.src = SRC_HOLD_HI; nd.sel2 = 1'b1;
        nd.tag = '{wb: WB_HI, addr1: 9'(ww), addr2: '0, bank: c_a};
      end
      S_CW_LO: begin
        rd_a_en = 1'b1; rd_a_addr = ww;
        rd_b_en = 1'b1; rd_b_addr = ww;
        nd.v = 1'b1; nd.op = (c_cmd == CMD_PMUL) ? P_MUL : P_ADD;
        nd.src = SRC_RD_LO; nd.tag.wb = WB_LO;
      end
      S_CW_HI: begin
        nd.v = 1'b1; nd.op = (c_cmd == CMD_PMUL) ? P_MUL : P_ADD;
        nd.src = SRC_HOLD_HI;
        nd.tag = '{wb: WB_HI, addr1: 9'(ww), addr2: '0, bank: c_d};
      end
      S_DC_RD: begin
        rd_a_en = 1'b1; rd_a_addr = '0;
        nd.v = 1'b1; nd.op = P_CRT1; nd.src = SRC_RD_LO; nd.idx = 6'(ROM_QINV);
      end
      S_DC_CRT2: begin
        nd.v = 1'b1; nd.op = P_CRT2; nd.idx = 6'(ROM_QOTHER);
      end
      default: ;
    endcase
  end

  // descriptor execution (one cycle after the read)
  always_comb begin
    p_valid = dq.v; p_op = dq.op; p_sel2 = dq.sel2; p_idx = dq.idx;
    p_tag = dq.tag; p_tw_load = dq.twl; p_tw2_load = dq.tw2l;
    p_tw_commit = dq.twc;
    for (int c = 0; c < 2; c++) begin
      unique case (dq.src)
        SRC_BF:      begin p_a[c] = rd_a_data[c][19:0];  p_b[c] = rd_a_data[c][39:20]; end
        SRC_RD_LO:   begin p_a[c] = rd_a_data[c][19:0];  p_b[c] = rd_b_data[c][19:0];  end
        SRC_HOLD_HI: begin p_a[c] = hold_a[c][39:20];    p_b[c] = hold_b[c][39:20];    end
        default:     begin p_a[c] = '0;                  p_b[c] = '0;                  end
      endcase
    end
  end

  assign dgs_en   = (state == S_SMP);
  assign dgs_mode = (c_cmd == CMD_TERN);
  assign busy     = (state != S_IDLE);

  // swap write pending
  logic  sw_pend;
  addr_t sw_pend_addr;
  bank_t sw_pend_bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq <= '0;
      for (int c = 0; c < 2; c++) begin
        hold_a[c] <= '0; hold_b[c] <= '0; smp_lo[c] <= '0; dec_r[c] <= '0;
        wr_data[c] <= '0;
      end
      wr_en <= 1'b0; wr_bank <= '0; wr_addr <= '0;
      sw_pend <= 1'b0; sw_pend_addr <= '0; sw_pend_bank <= '0;
    end else begin
      dq <= nd;
      wr_en   <= 1'b0;
      sw_pend <= 1'b0;
      if (dq.src == SRC_RD_LO || dq.sw == SW_1)
        for (int c = 0; c < 2; c++) begin
          hold_a[c] <= rd_a_data[c]; hold_b[c] <= rd_b_data[c];
        end
      // bit-reversal swap: write word a1 <- data(a2), then a2 <- data(a1)
      if (dq.sw == SW_2) begin
        wr_en <= 1'b1; wr_bank <= dq.sw_bank; wr_addr <= dq.sw_a1;
        for (int c = 0; c < 2; c++) wr_data[c] <= rd_a_data[c];
        sw_pend <= 1'b1; sw_pend_addr <= dq.sw_a2; sw_pend_bank <= dq.sw_bank;
      end
      if (sw_pend) begin
        wr_en <= 1'b1; wr_bank <= sw_pend_bank; wr_addr <= sw_pend_addr;
        for (int c = 0; c < 2; c++) wr_data[c] <= hold_a[c];
      end
      // sampler: two samples per word
      if (state == S_SMP && dgs_valid) begin
        if (!smp_half) for (int c = 0; c < 2; c++) smp_lo[c] <= dgs_mod[c];
        else begin
          wr_en <= 1'b1; wr_bank <= c_d; wr_addr <= ww;
          for (int c = 0; c < 2; c++) wr_data[c] <= {dgs_mod[c], smp_lo[c]};
        end
      end
      if (state == S_DC_DEC && dec_valid)
        for (int c = 0; c < 2; c++) dec_r[c] <= dec_enc[c];
      if (state == S_DC_FILL) begin
        wr_en <= 1'b1; wr_bank <= c_d; wr_addr <= ww;
        for (int c = 0; c < 2; c++) wr_data[c] <= (ww == '0) ? {20'd0, dec_r[c]} : '0;
      end
    end
  end

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; drain_next <= S_IDLE; prog <= 1'b0; pc <= '0;
      c_cmd <= CMD_NOP; c_a <= '0; c_b <= '0; c_d <= '0; inv <= 1'b0;
      stg <= '0; jj <= '0; kk <= '0; ww <= '0; sj <= 1'b0; tinit <= 1'b0; mcnt <= '0; wcnt <= '0;
      smp_half <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (cmd == CMD_RECRYPT) begin
            prog <= 1'b1; pc <= '0; state <= S_FETCH;
          end else begin
            prog <= 1'b0; c_cmd <= cmd; c_a <= bank_a; c_b <= bank_b;
            c_d <= bank_dst; state <= S_DISPATCH;
          end
        end
        S_FETCH: begin
          c_cmd <= RECRYPT_PROG[pc].c; c_a <= RECRYPT_PROG[pc].a;
          c_b <= RECRYPT_PROG[pc].b;   c_d <= RECRYPT_PROG[pc].d;
          state <= S_DISPATCH;
        end
        S_DISPATCH: begin
          ww <= '0; jj <= '0; kk <= '0; stg <= '0; smp_half <= 1'b0;
          inv <= (c_cmd == CMD_INTT);
          unique case (c_cmd)
            CMD_NTT, CMD_INTT:   state <= S_BR_SCAN;
            CMD_PMUL, CMD_PADD:  state <= S_CW_LO;
            CMD_GAUSS, CMD_TERN: state <= S_SMP;
            CMD_DECODE:          state <= S_DC_RD;
            default:             state <= S_CMD_END;
          endcase
        end
        // ---- bit reversal (word swaps)
        S_BR_SCAN: begin
          if (ww < bitrev(ww)) state <= S_BR_2;
          else if (ww == addr_t'(H - 1)) begin
            state <= S_DRAIN; drain_next <= S_ST_LOAD;
          end else ww <= ww + 1'b1;
        end
        S_BR_2: begin
          if (ww == addr_t'(H - 1)) begin
            state <= S_DRAIN; drain_next <= S_ST_LOAD;
          end else begin
            ww <= ww + 1'b1; state <= S_BR_SCAN;
          end
        end
        // ---- NTT stages
        S_ST_LOAD: begin
          jj <= '0; sj <= 1'b0;
          tinit <= pair; state <= pair ? S_ST_INIT : S_ST_TWUP;
        end
        S_ST_INIT:  state <= S_ST_INIT2;
        S_ST_INIT2: begin wcnt <= '0; state <= S_ST_WAIT; end
        S_ST_TWUP: begin
          kk <= '0; sj <= 1'b0;
          state <= pair ? S_ST_TWUP2 : (int'(stg) == LOGN - 1) ? S_ST_BFL : S_ST_BF1;
        end
        S_ST_TWUP2: state <= (int'(stg) == LOGN - 1) ? S_ST_BFL : S_ST_BF1;
        S_ST_BF1: state <= S_ST_BF2;
        S_ST_BF2: begin
          if ((AW+1)'(kk) + m_words < (AW+1)'(H)) begin
            kk <= kk + addr_t'(m_words); state <= S_ST_BF1;
          end else if (pair && !sj) begin
            kk <= '0; sj <= 1'b1; state <= S_ST_BF1;
          end else begin
            wcnt <= '0; state <= S_ST_WAIT;
          end
        end
        S_ST_BFL: begin
          if (!sj) sj <= 1'b1;
          else begin wcnt <= '0; state <= S_ST_WAIT; end
        end
        S_ST_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt >= 4'd2 && !tw_pending) state <= S_ST_COMMIT;
        end
        S_ST_COMMIT: begin
          if (tinit) begin
            tinit <= 1'b0; state <= S_ST_TWUP;
          end else if ((AW+1)'(jj) + (pair ? 2 : 1) < ((int'(stg) == LOGN - 1) ? (AW+1)'(H) : m_half)) begin
            jj <= jj + (pair ? addr_t'(2) : addr_t'(1)); state <= S_ST_TWUP;
          end else if (int'(stg) == LOGN - 1) begin
            state <= S_DRAIN; drain_next <= inv ? S_SC_LOAD : S_CMD_END;
          end else begin
            stg <= stg + 1'b1; state <= S_DRAIN; drain_next <= S_ST_LOAD;
          end
        end
        // ---- inverse NTT post-scaling by n^-1 psi^-i
        S_SC_LOAD:  begin ww <= '0; state <= S_SC_LOAD2; end
        S_SC_LOAD2: state <= S_SC_TWUP;
        S_SC_TWUP:  state <= S_SC_TWUP2;
        S_SC_TWUP2: state <= S_SC_LO;
        S_SC_LO:    state <= S_SC_HI;
        S_SC_HI:    begin wcnt <= '0; state <= S_SC_WAIT; end
        S_SC_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt >= 4'd2 && !tw_pending) state <= S_SC_COMMIT;
        end
        S_SC_COMMIT: begin
          if (ww == addr_t'(H - 1)) begin
            state <= S_DRAIN; drain_next <= S_CMD_END;
          end else begin
            ww <= ww + 1'b1; state <= S_SC_TWUP;
          end
        end
        // ---- coefficient-wise operations
        S_CW_LO: state <= S_CW_HI;
        S_CW_HI: begin
          if (ww == addr_t'(H - 1)) begin
            state <= S_DRAIN; drain_next <= S_CMD_END;
          end else begin
            ww <= ww + 1'b1; state <= S_CW_LO;
          end
        end
        // ---- sampling
        S_SMP: if (dgs_valid) begin
          smp_half <= !smp_half;
          if (smp_half) begin
            if (ww == addr_t'(H - 1)) begin
              state <= S_DRAIN; drain_next <= S_CMD_END;
            end else ww <= ww + 1'b1;
          end
        end
        // ---- inverse CRT and decode-encode of coefficient 0
        S_DC_RD: begin wcnt <= '0; state <= S_DC_WAIT; end
        S_DC_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 4'd6) state <= S_DC_CRT2;
        end
        S_DC_CRT2: state <= S_DC_DEC;
        S_DC_DEC: if (dec_valid) begin ww <= '0; state <= S_DC_FILL; end
        S_DC_FILL: begin
          if (ww == addr_t'(H - 1)) begin
            state <= S_DRAIN; drain_next <= S_CMD_END;
          end else ww <= ww + 1'b1;
        end
        // ---- common
        S_DRAIN: begin
          mcnt <= mcnt + 1'b1;
          if (int'(mcnt) >= DRAIN - 1) begin
            mcnt <= '0; state <= drain_next;
          end
        end
        S_CMD_END: begin
          if (prog && int'(pc) < PLEN - 1) begin
            pc <= pc + 1'b1; state <= S_FETCH;
          end else begin
            prog <= 1'b0; done <= 1'b1; state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
