// knuth_yao_dgs: discrete Gaussian sampler (Knuth-Yao random walk) with
// lookup-table acceleration, plus a uniform {-1,0,1} mode.
//
// The random walk descends the discrete distribution generating (DDG) tree
// defined by the probability matrix of dgs_pkg: at column c the distance
// d becomes 2d + r (r a random bit) and the column's bits are subtracted row
// by row from the last row up; the row at which d reaches -1 is the sample
// magnitude. Because most walks end within the first few columns, two
// lookup tables store the outcomes of all short walks:
//   LUT1: 8 random bits -> magnitude, or the distance d (<= 7) after 8 columns
//   LUT2: {d, 5 random bits} -> magnitude, or the distance after 13 columns
// Only when both miss (probability about 0.0013 for this distribution) does
// the slow walk scan the probability ROM bit by bit from column 13, one row
// per clock through the ScanReg shift register. Both tables are computed
// from the probability matrix at elaboration.
//
// Random bits come from nine parallel TRNG outputs, rnd[8:0], one fresh set
// per clock: LUT1 uses rnd[7:0] and rnd[8] is the sign; LUT2 uses rnd[4:0]
// of the next clock; a scan step uses rnd[0]. In ternary mode (mode = 1)
// rnd[1:0] = 00/01/10 give 0/+1/-1 and 11 is rejected.
//
// Interface: while en is high the sampler produces samples; each one is
// presented for exactly one cycle with out_valid, as a signed value and as
// its residues modulo Q0 and Q1 (x or Q - |x|). A LUT1 hit yields one sample
// per clock. The document gives the two-LUT structure, the probability ROM,
// the ScanReg and the nine TRNGs; table sizes, bit assignment and the
// restart after the last column (reached with probability ~2^-90) are this
// design's choices.
module knuth_yao_dgs
  import dgs_pkg::*;
#(
  parameter int unsigned Q0 = 878593,
  parameter int unsigned Q1 = 890881
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              mode,       // 0: Gaussian, 1: uniform ternary
  input  logic [8:0]        rnd,
  output logic              out_valid,
  output logic signed [7:0] out_sample,
  output logic [19:0]       out_mod0,
  output logic [19:0]       out_mod1,
  output logic              scan_event  // a sample needed the bit scan
);
  // LUT entry: {hit, payload[5:0]}; payload is the magnitude on a hit and the
  // remaining distance on a miss.
  typedef logic [6:0] lut_e;
  typedef lut_e lut_t [256];

  // Walk columns c0 .. c1-1 from distance d0, taking the random bit for
  // column c from bits[c1-1-c]; returns {hit, magnitude or final distance}.
  function automatic lut_e walk(int d0, int c0, int c1, int bits);
    int   d;
    int   val;
    logic hit;
    d = d0; val = 0; hit = 1'b0;
    for (int c = c0; c < c1; c++) begin
      if (!hit) begin
        d = 2 * d + ((bits >> (c1 - 1 - c)) & 1);
        for (int row = ROWS - 1; row >= 0; row--) begin
          if (!hit) begin
            d = d - int'(PCOL[c][row]);
            if (d == -1) begin hit = 1'b1; val = row; end
          end
        end
      end
    end
    return hit ? {1'b1, 6'(val)} : {1'b0, 6'(d)};
  endfunction

  function automatic lut_t build_lut1();
    lut_t t;
    for (int v = 0; v < 256; v++) t[v] = walk(0, 0, 8, v);
    return t;
  endfunction

  function automatic lut_t build_lut2();
    lut_t t;
    for (int i = 0; i < 256; i++) t[i] = walk(i >> 5, 8, 13, i & 31);
    return t;
  endfunction

  localparam lut_t LUT1 = build_lut1();
  localparam lut_t LUT2 = build_lut2();
  localparam int unsigned SCAN_COL0 = 13;

  typedef enum logic [1:0] {S_LUT1, S_LUT2, S_COL, S_ROW} state_e;
  state_e state;

  logic              sign;
  logic signed [9:0] dd;
  logic [6:0]        col;
  logic [5:0]        row;
  logic [ROWS-1:0]   scan_reg;

  lut_e l1, l2;
  assign l1 = LUT1[rnd[7:0]];
  assign l2 = LUT2[{dd[2:0], rnd[4:0]}];

  // sample emission
  logic       emit;
  logic [5:0] emit_mag;
  logic       emit_neg;
  logic       emit_scan;
  logic signed [9:0] dd_row;
  assign dd_row = dd - 10'(scan_reg[row]);

  always_comb begin
    emit = 1'b0; emit_mag = '0; emit_neg = sign; emit_scan = 1'b0;
    if (en) begin
      unique case (state)
        S_LUT1: begin
          if (mode) begin
            emit = (rnd[1:0] != 2'b11);
            emit_mag = {5'd0, rnd[1] ^ rnd[0]};
            emit_neg = rnd[1];
          end else if (l1[6]) begin
            emit = 1'b1; emit_mag = l1[5:0]; emit_neg = rnd[8];
          end
        end
        S_LUT2: if (l2[6]) begin emit = 1'b1; emit_mag = l2[5:0]; end
        S_ROW:  if (dd_row == -10'sd1) begin
                  emit = 1'b1; emit_mag = row; emit_scan = 1'b1;
                end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LUT1; sign <= 1'b0; dd <= '0; col <= '0; row <= '0;
      scan_reg <= '0;
    end else if (en) begin
      unique case (state)
        S_LUT1: if (!mode && !l1[6]) begin
          state <= S_LUT2; dd <= 10'(l1[5:0]); sign <= rnd[8];
        end
        S_LUT2: if (!l2[6]) begin
          state <= S_COL; dd <= 10'(l2[5:0]); col <= 7'(SCAN_COL0);
        end else state <= S_LUT1;
        S_COL: begin
          if (int'(col) >= PREC) state <= S_LUT1;     // ran off the table
          else begin
            scan_reg <= PCOL[col];
            dd     <= 2 * dd + 10'(rnd[0]);
            row      <= 6'(ROWS - 1);
            state    <= S_ROW;
          end
        end
        S_ROW: begin
          dd <= dd_row;
          if (dd_row == -10'sd1) state <= S_LUT1;
          else if (row == 0) begin
            col <= col + 7'd1; state <= S_COL;
          end else row <= row - 6'd1;
        end
        default: state <= S_LUT1;
      endcase
    end else if (state != S_LUT1 && mode) begin
      state <= S_LUT1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sample <= '0; out_mod0 <= '0; out_mod1 <= '0;
      scan_event <= 1'b0;
    end else begin
      out_valid  <= emit;
      scan_event <= emit && emit_scan;
      if (emit) begin
        if (emit_neg && emit_mag != 0) begin
          out_sample <= -8'(signed'({2'b00, emit_mag}));
          out_mod0   <= 20'(Q0 - 32'(emit_mag));
          out_mod1   <= 20'(Q1 - 32'(emit_mag));
        end else begin
          out_sample <= 8'(emit_mag);
          out_mod0   <= 20'(emit_mag);
          out_mod1   <= 20'(emit_mag);
        end
      end
    end
  end

endmodule
