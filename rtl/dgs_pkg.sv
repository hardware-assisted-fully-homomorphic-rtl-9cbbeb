// dgs_pkg: probability matrix of the Knuth-Yao discrete Gaussian sampler.
//
// Distribution: rho(x) = exp(-pi x^2 / s^2) with s = 11.32 (sigma = s /
// sqrt(2 pi) ~ 4.516), the parameter of the design. Row k (k = 0 .. 51) holds
// the probability of |x| = k, P(0) = rho(0)/S and P(k) = 2 rho(k)/S for k > 0,
// S = sum over all integers of rho; the sign is drawn separately. Each
// probability is truncated to PREC = 96 fractional bits; rows above 51 are zero
// at this precision, which fixes the tail bound. The matrix is stored
// column-wise, as the sampler scans it: PCOL[c] bit k is bit (95 - c) of P(k),
// i.e. column 0 is the most significant probability bit. The tail bound and
// the 96-bit precision are this design's choices (the document states only
// that precision and tail give a statistical distance of 2^-90).
package dgs_pkg;

  localparam int unsigned ROWS = 52;
  localparam int unsigned PREC = 96;

  localparam logic [ROWS-1:0] PCOL [PREC] = '{
    52'h0000000000000, 52'h0000000000000, 52'h000000000000e, 52'h0000000000071,
    52'h00000000001b6, 52'h000000000029b, 52'h0000000000e51, 52'h0000000001584,
    52'h00000000024f1, 52'h0000000005d08, 52'h000000000a742, 52'h0000000017ac1,
    52'h000000002c191, 52'h000000005ee59, 52'h000000000f1ca, 52'h00000000b3735,
    52'h00000001be490, 52'h00000000162d3, 52'h00000003a138f, 52'h0000000661924,
    52'h00000002ccc98, 52'h0000000c5880d, 52'h0000001b3ebcd, 52'h000000030fd9e,
    52'h0000002e820e8, 52'h0000000fce530, 52'h00000078155bf, 52'h00000044f1dbd,
    52'h000000b96c241, 52'h000000901ed84, 52'h00000117e4828, 52'h00000186fb428,
    52'h00000219e68a4, 52'h000003190bea2, 52'h000005cce511a, 52'h000006347247b,
    52'h0000092765e9e, 52'h00000245dbb9d, 52'h00001e12bef66, 52'h00000a85ead23,
    52'h0000074ea1281, 52'h00003e0fe6956, 52'h000039548eccd, 52'h00006166672cf,
    52'h000074654d532, 52'h0000b07108f23, 52'h00002d5d1ba26, 52'h0000137a8eaf1,
    52'h000192f1fea2f, 52'h0001727c0076d, 52'h00027b60f8a5a, 52'h00004eff3bcc7,
    52'h0001189c831a8, 52'h00041ee839374, 52'h0001501170b35, 52'h0006c19bda626,
    52'h000a0170bc915, 52'h000f7aacf484f, 52'h0000482b68a60, 52'h001c8346690d2,
    52'h00148dfd89d88, 52'h00364b47108bd, 52'h001607d7a8ffa, 52'h00075e0896583,
    52'h0041a9064fda2, 52'h00035d36164ca, 52'h000a932ea77e7, 52'h00af349646d73,
    52'h0065891967302, 52'h00384bd1c57f2, 52'h01271e9508ad7, 52'h00c42a7803857,
    52'h006da816db28f, 52'h00654b5cf4346, 52'h0282729a117c4, 52'h0250822cb5346,
    52'h0346bd16d256f, 52'h04a26e3531f09, 52'h06c81b8e3717d, 52'h00c2042242a31,
    52'h0a9de49c9825d, 52'h05977edf8940d, 52'h0b5aabbf00564, 52'h127f8e704fb6b,
    52'h04bbd0518c592, 52'h0e7a960057ee3, 52'h0596bedf10af6, 52'h2aa4534b2066c,
    52'h06a81327fb489, 52'h206d525c14786, 52'h6ab9deb1008a6, 52'h309536b1d7bbf,
    52'h23c4821847a42, 52'h319d82b9b2383, 52'h8e07a14cdff8e, 52'h6180ed75acdfe
  };

endpackage
