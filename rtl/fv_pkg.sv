// fv_pkg: parameters, types and constant functions shared by the recryption
// processor.
//
// The FV parameter set follows the design: ring dimension n = 1024, a 40-bit
// ciphertext modulus q = q0 * q1 split by the Chinese Remainder Theorem into
// two 20-bit primes q0 = 878593 and q1 = 890881 (both 1 mod 2n, so the
// negative-wrapped NTT exists), and two coefficients of a residue polynomial
// packed into one 40-bit memory word. The primitive 2048-th roots of unity
// PSI0_1024 / PSI1_1024 were found by searching g^((q-1)/2048) mod q for the
// smallest g whose 1024-th power is -1; for a smaller ring dimension N the
// root is PSI^(1024/N). Opcodes, micro-op and write-back encodings are this
// implementation's own.
package fv_pkg;

  localparam int unsigned W      = 20;           // residue width
  localparam int unsigned Q0     = 878593;
  localparam int unsigned Q1     = 890881;
  localparam longint unsigned QQ = 64'd878593 * 64'd890881;   // 40-bit q
  localparam int unsigned PSI0_1024 = 47147;
  localparam int unsigned PSI1_1024 = 322387;
  localparam int unsigned N_DEFAULT = 1024;
  localparam int unsigned NBANKS    = 6;        // M0..M5

  typedef logic [W-1:0]   coef_t;
  typedef logic [2*W-1:0] word_t;               // {hi, lo} coefficient pair
  typedef logic [2:0]     bank_t;

  // Commands accepted by the control/address unit.
  typedef enum logic [3:0] {
    CMD_NOP     = 4'd0,
    CMD_NTT     = 4'd1,   // forward negacyclic NTT of bank a, in place
    CMD_INTT    = 4'd2,   // inverse negacyclic NTT of bank a, in place
    CMD_PMUL    = 4'd3,   // dst = a * b coefficient-wise
    CMD_PADD    = 4'd4,   // dst = a + b coefficient-wise
    CMD_GAUSS   = 4'd5,   // dst = discrete Gaussian error polynomial
    CMD_TERN    = 4'd6,   // dst = uniform {-1,0,1} polynomial
    CMD_DECODE  = 4'd7,   // inverse CRT + decode-encode coefficient 0 of a -> dst
    CMD_RECRYPT = 4'd8    // whole recryption program
  } cmd_e;

  // PALU micro-operations.
  typedef enum logic [2:0] {
    P_BFLY  = 3'd0,   // (lo + w*hi, lo - w*hi), w = twiddle register
    P_MUL   = 3'd1,   // a * b mod q
    P_ADD   = 3'd2,   // a + b mod q (multiplier used with 1)
    P_TWUP  = 3'd3,   // twiddle_next  = twiddle  * rom[idx]
    P_TWUP2 = 3'd4,   // twiddle2_next = twiddle2 * rom[idx]
    P_SCALE = 3'd5,   // a * twiddle (lo half) / a * twiddle2 (hi half)
    P_CRT1  = 3'd6,   // r = a * rom[idx] mod q, kept inside the PALU
    P_CRT2  = 3'd7    // raw 40-bit product r * rom[idx]
  } pop_e;

  // What the PALU output stage does with a result.
  typedef enum logic [2:0] {
    WB_NONE = 3'd0,
    WB_BF1  = 3'd1,   // first butterfly of a pair: hold results
    WB_BF2  = 3'd2,   // second butterfly: write addr1 now, addr2 next cycle
    WB_BFL  = 3'd3,   // last-stage butterfly: write {diff, sum}
    WB_LO   = 3'd4,   // hold result as low coefficient
    WB_HI   = 3'd5    // write {result, held low}
  } wb_e;

  typedef struct packed {
    wb_e               wb;
    logic [8:0]        addr1;
    logic [8:0]        addr2;
    bank_t             bank;
  } wbtag_t;

  // Twiddle ROM map (see twiddle_rom).
  localparam int unsigned ROM_FWD_START = 0;    // + stage: psi^(n/m)
  localparam int unsigned ROM_FWD_STEP  = 10;   // + stage: psi^(2n/m) = w_m
  localparam int unsigned ROM_INV_STEP  = 20;   // + stage: w_m^-1
  localparam int unsigned ROM_NINV      = 30;   // n^-1
  localparam int unsigned ROM_PSI_INV   = 31;   // psi^-1
  localparam int unsigned ROM_NINV_HALF = 32;   // n^-1 * psi^(-n/2)
  localparam int unsigned ROM_QINV      = 33;   // (other q)^-1 mod q
  localparam int unsigned ROM_QOTHER    = 34;   // other q
  localparam int unsigned ROM_ONE       = 35;
  localparam int unsigned ROM_FWD_SQ    = 36;   // + stage: w_m^2
  localparam int unsigned ROM_INV_SQ    = 46;   // + stage: w_m^-2
  localparam int unsigned ROM_DEPTH     = 56;

  function automatic longint unsigned modexp(longint unsigned b,
                                             longint unsigned e,
                                             longint unsigned m);
    longint unsigned r = 1;
    longint unsigned x = b % m;
    while (e != 0) begin
      if (e[0]) r = (r * x) % m;
      x = (x * x) % m;
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic int unsigned clog2u(int unsigned v);
    int unsigned r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Primitive 2N-th root of unity modulo q for ring dimension N.
  function automatic int unsigned psi_for(int unsigned q, int unsigned psi1024,
                                          int unsigned n);
    return int'(modexp(longint'(psi1024), longint'(1024) / longint'(n), longint'(q)));
  endfunction

  // Residue of floor(q/2) (the encoding of a 1 bit) modulo one prime.
  localparam longint unsigned QHALF = QQ / 2;

endpackage
