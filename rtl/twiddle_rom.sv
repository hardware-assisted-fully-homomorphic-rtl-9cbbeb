// twiddle_rom: the small constant ROM of one PALU.
//
// The NTT does not store all n twiddle factors; per stage (m = 2, 4, .., n)
// it keeps only the stage root w_m = psi^(2n/m), its square root
// psi^(n/m) (the first twiddle of a forward negative-wrapped stage), the
// inverse root w_m^-1 and the squares w_m^2 and w_m^-2 (steps of the two
// interleaved twiddle chains), and the PALU generates the other twiddles by
// repeated multiplication. Besides these the ROM holds n^-1, psi^-1 and
// n^-1 * psi^(-n/2) for the inverse-NTT post-scaling, the inverse-CRT
// constants (q_other^-1 mod Q and q_other) and the constant 1. The document
// lists w_m, w_2m and n^-1; the remaining entries and the address map
// (fv_pkg ROM_*) are this design's. All entries are computed at elaboration
// from Q, the 1024-point root PSI1024 and N. Read is combinational.
module twiddle_rom
  import fv_pkg::*;
#(
  parameter int unsigned Q       = 878593,
  parameter int unsigned PSI1024 = 47147,
  parameter int unsigned Q_OTHER = 890881,
  parameter int unsigned N       = 1024
) (
  input  logic [5:0]  idx,
  output logic [39:0] data
);
  localparam int unsigned LOGN = clog2u(N);

  localparam longint unsigned QL = longint'(Q);

  typedef logic [39:0] rom_t [ROM_DEPTH];

  function automatic rom_t build();
    rom_t r;
    longint unsigned psi = longint'(psi_for(Q, PSI1024, N));
    longint unsigned n2  = 2 * longint'(N);
    for (int i = 0; i < ROM_DEPTH; i++) r[i] = '0;
    for (int s = 0; s < LOGN; s++) begin
      longint unsigned m = longint'(2) << s;
      r[ROM_FWD_START + s] = 40'(modexp(psi, longint'(N) / m, QL));
      r[ROM_FWD_STEP + s]  = 40'(modexp(psi, n2 / m, QL));
      r[ROM_INV_STEP + s]  = 40'(modexp(psi, n2 - n2 / m, QL));
      r[ROM_FWD_SQ + s]    = 40'(modexp(psi, (2 * n2 / m) % n2, QL));
      r[ROM_INV_SQ + s]    = 40'(modexp(psi, (n2 - (2 * n2 / m) % n2) % n2, QL));
    end
    r[ROM_NINV]      = 40'(modexp(longint'(N), QL - 2, QL));
    r[ROM_PSI_INV]   = 40'(modexp(psi, n2 - 1, QL));
    r[ROM_NINV_HALF] = 40'((modexp(longint'(N), QL - 2, QL) *
                            modexp(psi, n2 - longint'(N) / 2, QL)) % QL);
    r[ROM_QINV]      = 40'(modexp(longint'(Q_OTHER) % QL, QL - 2, QL));
    r[ROM_QOTHER]    = 40'(Q_OTHER);
    r[ROM_ONE]       = 40'd1;
    return r;
  endfunction

  localparam rom_t ROM = build();

  always_comb begin
    if (int'(idx) < ROM_DEPTH) data = ROM[idx];
    else                       data = '0;
  end

endmodule
