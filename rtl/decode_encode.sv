// decode_encode: FV decoding of one coefficient and re-encoding of the bit.
//
// For plaintext modulus t = 2 a decrypted coefficient a in [0, q) carries a 1
// when it lies strictly between q/4 and 3q/4, tested exactly as
// q < 4a < 3q. The bit is re-encoded as Delta*m with Delta = floor(q/2) and
// returned directly as its two CRT residues (Delta mod q0, Delta mod q1), the
// form the PALUs work in. One register stage: out_valid follows in_valid by
// one cycle. Since Delta mod q0 and Delta mod q1 are constants, the enc0
// and enc1 bits that are 0 in both constants are always 0.
module decode_encode
  import fv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [39:0] a,
  output logic        out_valid,
  output logic        bit_out,
  output logic [19:0] enc0,
  output logic [19:0] enc1
);
  localparam logic [19:0] D0 = 20'(QHALF % Q0);
  localparam logic [19:0] D1 = 20'(QHALF % Q1);

  logic [41:0] a4;
  logic        m;

  always_comb begin
    a4 = {a, 2'b00};
    m  = (a4 > 42'(QQ)) && (a4 < 42'(3 * QQ));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; bit_out <= 1'b0; enc0 <= '0; enc1 <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        bit_out <= m;
        enc0    <= m ? D0 : '0;
        enc1    <= m ? D1 : '0;
      end
    end
  end

endmodule
