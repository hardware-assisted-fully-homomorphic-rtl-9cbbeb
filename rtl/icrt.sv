// icrt: final adder of the inverse Chinese Remainder Theorem.
//
// With a0 = a mod q0 and a1 = a mod q1, a = [a0*q1^-1]_q0 * q1 +
// [a1*q0^-1]_q1 * q0 mod q. The two PALUs deliver the two 40-bit partial
// products p0, p1 (each below q); this block adds them (41-bit sum, below 2q)
// and subtracts q once if needed, giving a in [0, q). One register stage:
// out_valid follows in_valid by one cycle. Used once per recryption, for the
// constant coefficient of the decrypted polynomial only.
module icrt
  import fv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [39:0] p0,
  input  logic [39:0] p1,
  output logic        out_valid,
  output logic [39:0] a
);
  logic [40:0] s, r;

  always_comb begin
    s = 41'(p0) + 41'(p1);
    r = (s >= 41'(QQ)) ? s - 41'(QQ) : s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; a <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) a <= r[39:0];
    end
  end

endmodule
