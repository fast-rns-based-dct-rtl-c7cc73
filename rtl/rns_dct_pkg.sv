// rns_dct_pkg - constants shared by the RNS 8-point DCT processor.
//
// The processor computes the 8-point DCT in a residue number system (RNS) with
// the four 8-bit moduli {256, 255, 253, 251}, a dynamic range of about 2^32.
// Samples are 8-bit two's complement, as in the reference design.
//
// The fast cosine transform uses twelve real constants k0..k11 (see
// rns_dct_channel). In the integer datapath each one is replaced by
// K = round(k * 2^COEF_FRAC), a 10-bit fixed-point number with 8 fraction
// bits (the 10-bit width follows the reference design; the split into
// 8 fraction bits is this design's choice). Where an unscaled term must be
// added to a product, it is first multiplied by E = 2^COEF_FRAC, the
// fixed-point image of 1, so that both carry the same scale.
//
// With these constants the channel output X(u) equals, modulo M,
//   2^(COEF_FRAC*OUT_SCALE_STAGES[u]) * DCT(u)   (up to coefficient rounding),
// where DCT(u) is the orthonormal 8-point DCT. X(0) and X(4) pass through one
// multiplication stage, the six others through two.
package rns_dct_pkg;

  localparam int unsigned NUM_MODULI = 4;
  localparam int unsigned RES_W      = 8;   // width of every residue
  localparam int unsigned IN_W       = 8;   // input sample width
  localparam int unsigned COEF_W     = 10;  // fixed-point coefficient width
  localparam int unsigned COEF_FRAC  = 8;   // fraction bits of a coefficient
  localparam int unsigned N_POINTS   = 8;

  typedef int unsigned moduli_t [NUM_MODULI];
  localparam moduli_t MODULI = '{256, 255, 253, 251};

  // K_i = round(k_i * 2^8), with C(m,n) = cos(pi*n/m):
  //   k0 = 1/C(4,1)            k1 = sqrt(2)/4           k2  = C(4,1)/2
  //   k3 = C(4,1)/(4 C(8,1))   k4 = C(4,1)/(4 C(8,3))   k5  = C(4,1)/C(8,1)
  //   k6 = 1/C(8,1)            k7 = C(8,3)/C(8,1)       k8  = C(8,1)/(4 C(16,1))
  //   k9 = C(8,1)/(4 C(16,7))  k10 = C(8,1)/(4 C(16,3)) k11 = C(8,1)/(4 C(16,5))
  localparam int unsigned K0  = 362;
  localparam int unsigned K1  = 91;
  localparam int unsigned K2  = 91;
  localparam int unsigned K3  = 49;
  localparam int unsigned K4  = 118;
  localparam int unsigned K5  = 196;
  localparam int unsigned K6  = 277;
  localparam int unsigned K7  = 106;
  localparam int unsigned K8  = 60;
  localparam int unsigned K9  = 303;
  localparam int unsigned K10 = 71;
  localparam int unsigned K11 = 106;
  // Scale-alignment constant (the e1, e2, e3 tables): the fixed-point 1.
  localparam int unsigned E   = 2 ** COEF_FRAC;

  // Number of multiplication stages on the path to each output X(u).
  typedef int unsigned stages_t [N_POINTS];
  localparam stages_t OUT_SCALE_STAGES = '{1, 2, 2, 2, 1, 2, 2, 2};

  // Latency of one channel, input residues to output residues.
  localparam int unsigned CHANNEL_LATENCY = 6;

endpackage
