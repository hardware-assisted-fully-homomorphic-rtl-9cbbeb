// mod_addsub: modular adder and subtractor of a PALU, for one prime Q.
//
// Given z and t, both already reduced below Q, it returns (z + t) mod Q and
// (z - t) mod Q in the same cycle: one addition followed by one conditional
// subtraction of Q, and one subtraction followed by one conditional addition
// of Q. Together with the modular multiplier in front of it this forms the
// NTT butterfly (z = u, t = w * v). Purely combinational; the PALU registers
// its outputs.
module mod_addsub #(
  parameter int unsigned Q = 878593
) (
  input  logic [19:0] z,
  input  logic [19:0] t,
  output logic [19:0] sum,
  output logic [19:0] diff
);
  logic [20:0] s, d;

  always_comb begin
    s = 21'(z) + 21'(t);
    if (s >= 21'(Q)) s = s - 21'(Q);
    d = 21'(z) - 21'(t);
    if (z < t) d = d + 21'(Q);
  end

  assign sum  = s[19:0];
  assign diff = d[19:0];

endmodule
