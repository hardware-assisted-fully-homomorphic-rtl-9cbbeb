// palu: polynomial arithmetic and logic unit for one residue modulus Q.
//
// One pipelined modular multiplier (mod_mul) feeds one modular adder and one
// subtractor (mod_addsub); a small constant ROM (twiddle_rom) and two twiddle
// registers supply the second multiplier operand. The same datapath performs
// every residue operation of the recryption box:
//   P_BFLY   NTT butterfly (lo + w*hi, lo - w*hi), w = twiddle or twiddle2
//   P_MUL    coefficient-wise product a*b        P_ADD  a + b (a*1 + b)
//   P_SCALE  a * twiddle or a * twiddle2 (inverse-NTT post-scaling)
//   P_TWUP / P_TWUP2  next twiddle = twiddle * rom[idx] (on-the-fly twiddles)
//   P_CRT1 / P_CRT2   [a * q_other^-1]_Q, then its raw 40-bit product with
//                     q_other (this channel's half of the inverse CRT)
// Twiddle updates go through the multiplier like any other operation and land
// in a "next" register; tw_commit copies them into the registers used by the
// butterflies, so the controller can keep issuing with the current twiddle
// while the next one is being computed. tw_pending is high while an update is
// in flight.
//
// The output stage holds the "OUT low / OUT high" pair registers: results are
// re-paired into 40-bit memory words as the memory-efficient NTT requires
// (after a butterfly pair, word addr1 gets the two sums and word addr2, one
// cycle later, the two differences), and coefficient-wise results are joined
// two per word. The write address travels with each operation in a tag, so
// each PALU drives its own memory file.
//
// Timing: one operation per cycle; a result is written (mem_we) 5 cycles
// after the issue cycle (4 multiplier stages + 1 output register). The
// document gives the unit set (multiplier, adder, subtractor, ROM, pipeline
// registers); the micro-op set and tag mechanism are this design's.
module palu
  import fv_pkg::*;
#(
  parameter int unsigned Q       = 878593,
  parameter int unsigned PSI1024 = 47147,
  parameter int unsigned Q_OTHER = 890881,
  parameter int unsigned N       = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // operation issue
  input  logic        in_valid,
  input  pop_e        in_op,
  input  logic [19:0] in_a,
  input  logic [19:0] in_b,
  input  logic        in_sel2,     // P_SCALE: use twiddle2
  input  logic [5:0]  in_idx,      // ROM address for loads, TWUP, CRT
  input  wbtag_t      in_tag,
  // twiddle register control
  input  logic        tw_load,     // twiddle  <- rom[in_idx]
  input  logic        tw2_load,    // twiddle2 <- rom[in_idx]
  input  logic        tw_commit,   // twiddle(2) <- next values
  output logic        tw_pending,
  // memory write (to this channel's memory file)
  output logic        mem_we,
  output bank_t       mem_bank,
  output logic [8:0]  mem_addr,
  output word_t       mem_wdata,
  // inverse-CRT partial product
  output logic        prod_valid,
  output logic [39:0] prod
);
  localparam int unsigned MLAT = 4;

  logic [39:0] rom_data;
  twiddle_rom #(.Q(Q), .PSI1024(PSI1024), .Q_OTHER(Q_OTHER), .N(N)) u_rom (
    .idx(in_idx), .data(rom_data)
  );

  coef_t tw, tw2, tw_next, tw2_next, crt_r;
  coef_t mx, my, mz;
  logic [19:0] mres;
  logic [39:0] mprod;
  logic        mvalid;

  always_comb begin
    mx = in_a; my = in_b; mz = '0;
    unique case (in_op)
      P_BFLY:  begin mx = in_b;  my = in_sel2 ? tw2 : tw; mz = in_a; end
      P_MUL:   begin mx = in_a;  my = in_b;            mz = '0;   end
      P_ADD:   begin mx = in_b;  my = 20'd1;           mz = in_a; end
      P_TWUP:  begin mx = tw;    my = rom_data[19:0];  mz = '0;   end
      P_TWUP2: begin mx = tw2;   my = rom_data[19:0];  mz = '0;   end
      P_SCALE: begin mx = in_a;  my = in_sel2 ? tw2 : tw; mz = '0; end
      P_CRT1:  begin mx = in_a;  my = rom_data[19:0];  mz = '0;   end
      P_CRT2:  begin mx = crt_r; my = rom_data[19:0];  mz = '0;   end
      default: ;
    endcase
  end

  mod_mul #(.Q(Q)) u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a(mx), .b(my), .out_valid(mvalid), .res(mres), .prod(mprod)
  );

  // side pipeline carrying op, adder operand and write-back tag
  pop_e   op_p  [MLAT];
  coef_t  z_p   [MLAT];
  wbtag_t tag_p [MLAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MLAT; i++) begin
        op_p[i] <= P_MUL; z_p[i] <= '0; tag_p[i] <= '0;
      end
    end else begin
      op_p[0] <= in_op; z_p[0] <= mz; tag_p[0] <= in_valid ? in_tag : '0;
      for (int i = 1; i < MLAT; i++) begin
        op_p[i] <= op_p[i-1]; z_p[i] <= z_p[i-1]; tag_p[i] <= tag_p[i-1];
      end
    end
  end

  coef_t as_sum, as_diff;
  mod_addsub #(.Q(Q)) u_addsub (
    .z(z_p[MLAT-1]), .t(mres), .sum(as_sum), .diff(as_diff)
  );

  // in-flight twiddle updates
  logic [2:0] tw_cnt;
  wire issue_tw = in_valid && (in_op == P_TWUP || in_op == P_TWUP2);
  wire land_tw  = mvalid && (op_p[MLAT-1] == P_TWUP || op_p[MLAT-1] == P_TWUP2);
  assign tw_pending = (tw_cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tw_cnt <= '0;
    else        tw_cnt <= tw_cnt + 3'(issue_tw) - 3'(land_tw);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tw <= '0; tw2 <= '0; tw_next <= '0; tw2_next <= '0; crt_r <= '0;
    end else begin
      if (tw_load)   tw  <= rom_data[19:0];
      if (tw2_load)  tw2 <= rom_data[19:0];
      if (tw_commit) begin tw <= tw_next; tw2 <= tw2_next; end
      if (mvalid && op_p[MLAT-1] == P_TWUP)  tw_next  <= mres;
      if (mvalid && op_p[MLAT-1] == P_TWUP2) tw2_next <= mres;
      if (mvalid && op_p[MLAT-1] == P_CRT1)  crt_r    <= mres;
    end
  end

  // output stage: pair registers and memory write
  coef_t  h_lo, h_hi;
  logic   pend;
  word_t  pend_data;
  logic [8:0] pend_addr;
  bank_t  pend_bank;
  wbtag_t t_out;
  assign t_out = tag_p[MLAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_lo <= '0; h_hi <= '0; pend <= 1'b0; pend_data <= '0;
      pend_addr <= '0; pend_bank <= '0;
      mem_we <= 1'b0; mem_bank <= '0; mem_addr <= '0; mem_wdata <= '0;
      prod_valid <= 1'b0; prod <= '0;
    end else begin
      mem_we     <= 1'b0;
      pend       <= 1'b0;
      prod_valid <= mvalid && op_p[MLAT-1] == P_CRT2;
      prod       <= mprod;
      if (pend) begin
        mem_we <= 1'b1; mem_addr <= pend_addr; mem_bank <= pend_bank;
        mem_wdata <= pend_data;
      end
      if (mvalid) begin
        unique case (t_out.wb)
          WB_BF1: begin h_lo <= as_sum; h_hi <= as_diff; end
          WB_BF2: begin
            mem_we <= 1'b1; mem_addr <= t_out.addr1; mem_bank <= t_out.bank;
            mem_wdata <= {as_sum, h_lo};
            pend <= 1'b1; pend_addr <= t_out.addr2; pend_bank <= t_out.bank;
            pend_data <= {as_diff, h_hi};
          end
          WB_BFL: begin
            mem_we <= 1'b1; mem_addr <= t_out.addr1; mem_bank <= t_out.bank;
            mem_wdata <= {as_diff, as_sum};
          end
          WB_LO: h_lo <= as_sum;
          WB_HI: begin
            mem_we <= 1'b1; mem_addr <= t_out.addr1; mem_bank <= t_out.bank;
            mem_wdata <= {as_sum, h_lo};
          end
          default: ;
        endcase
      end
    end
  end

  // A new write may never coincide with the delayed second word of a pair.
  property p_no_write_clash;
    @(posedge clk) disable iff (!rst_n)
      pend |-> !(mvalid && t_out.wb inside {WB_BF2, WB_BFL, WB_HI});
  endproperty
  a_no_write_clash: assert property (p_no_write_clash);

endmodule
