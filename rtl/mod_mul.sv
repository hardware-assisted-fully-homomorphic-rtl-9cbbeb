// mod_mul: pipelined modular multiplier for one 20-bit prime Q.
//
// The integer product a*b (40 bits, one DSP-style multiplication) is reduced
// with a window technique that works for any prime 2^19 < Q < 2^20, so the
// same circuit serves both residue channels: the 20 upper product bits are cut
// into five 4-bit windows and each window selects a precomputed constant
// (v * 2^(20+4k)) mod Q, the five constants are added to the lower 20 bits,
// the at most 3 carry bits of that sum are folded once more through
// (v * 2^20) mod Q, and at most two conditional subtractions of Q finish.
// The document names only "window based modular reduction"; window size,
// fold count and pipeline cut are this design's choices. The window tables
// are computed from Q at elaboration.
//
// Timing: fully pipelined, one multiplication per cycle, LAT = 4 cycles from
// in_valid to out_valid. prod is the raw 40-bit product of the same operands,
// delayed to line up with res (used for the inverse CRT).
module mod_mul #(
  parameter int unsigned Q = 878593
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [19:0] a,
  input  logic [19:0] b,
  output logic        out_valid,
  output logic [19:0] res,
  output logic [39:0] prod
);
  localparam int unsigned LAT = 4;

  typedef logic [19:0] tab_t [80];

  function automatic tab_t win_tab();
    tab_t t;
    for (int k = 0; k < 5; k++)
      for (int v = 0; v < 16; v++)
        t[16 * k + v] = 20'((longint'(v) << (20 + 4 * k)) % longint'(Q));
    return t;
  endfunction

  function automatic logic [19:0] fold_const(int v);
    return 20'((longint'(v) << 20) % longint'(Q));
  endfunction

  localparam tab_t WT = win_tab();

  logic [39:0] p1;
  logic [22:0] s2;
  logic [20:0] s3;
  logic [39:0] p2, p3;
  logic [LAT-1:0] vld;

  logic [22:0] s2_d;
  logic [20:0] s3_d;
  logic [21:0] r4_d;

  always_comb begin
    s2_d = 23'(p1[19:0]);
    for (int k = 0; k < 5; k++)
      s2_d = s2_d + 23'(WT[16 * k + int'(p1[20 + 4 * k +: 4])]);
  end

  always_comb begin
    s3_d = 21'(s2[19:0]) + 21'(fold_const(int'(s2[22:20])));
  end

  always_comb begin
    r4_d = 22'(s3);
    if (r4_d >= 22'(Q)) r4_d = r4_d - 22'(Q);
    if (r4_d >= 22'(Q)) r4_d = r4_d - 22'(Q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      p1 <= '0; s2 <= '0; s3 <= '0; res <= '0;
      p2 <= '0; p3 <= '0; prod <= '0;
    end else begin
      vld  <= {vld[LAT-2:0], in_valid};
      p1   <= 40'(a) * 40'(b);
      s2   <= s2_d;  p2 <= p1;
      s3   <= s3_d;  p3 <= p2;
      res  <= r4_d[19:0];
      prod <= p3;
    end
  end

  assign out_valid = vld[LAT-1];

endmodule
