// rns_dct_channel - one modulo-m channel of the RNS 8-point DCT.
//
// Computes the 8-point fast cosine transform with at most two multiplication
// stages on any path, entirely in arithmetic modulo MODULUS. Every operator is
// a modular adder, a modular subtractor or a fixed-coefficient LUT multiplier
// (see mod_add, mod_sub, lut_mul), and every operator output is registered,
// so the channel is a six-stage pipeline that accepts one 8-sample vector per
// clock:
//
//   stage 1  a1..a4 = x(0)+x(7), x(1)+x(6), x(2)+x(5), x(3)+x(4)
//            a5..a8 = x(3)-x(4), x(2)-x(5), x(1)-x(6), x(0)-x(7)
//   stage 2  b1 = a1+a4  b2 = a2+a3  b3 = a2-a3  b4 = a1-a4
//            b5 = a5+a6  s6 = a6+a7  b7 = a7+a8  (a8 delayed)
//   stage 3  c4 = K0*b4  c1 = b1+b2  c2 = b1-b2  c3 = b3+b4
//            p5 = K7*b5  q5 = E*b5   b6 = K5*s6  q7 = E*b7  p7 = K7*b7  b8 = K6*a8
//   stage 4  (c4, c1, c2 delayed)  e3 = E*c3
//            c5 = p5+q7  c6 = b6+b8  c7 = p7-q5  c8 = b8-b6
//   stage 5  d6 = c4-e3  (c1, c2 delayed)  d2 = e3+c4
//            d1 = c5+c6  d7 = c6-c5  d3 = c7+c8  d5 = c8-c7
//   stage 6  X(6)=K4*d6  X(0)=K1*c1  X(4)=K2*c2  X(2)=K3*d2
//            X(1)=K8*d1  X(7)=K9*d7  X(3)=K10*d3  X(5)=K11*d5
//
// The equations, the operator placement and the delay registers follow the
// reference signal flow graph and channel architecture. The integer
// constants K and E (rns_dct_pkg) are this design's fixed-point reading of
// the real coefficients k0..k11. X(0) and X(4) leave scaled by 2^8, the other
// outputs by 2^16 (rns_dct_pkg::OUT_SCALE_STAGES). Modulo 256, E is 0 and
// some coefficients are even, so a few low output bits of that channel are
// constant 0; this is the correct residue, not a fault.
//
// Interface: x[i] is the residue |x(i)|_m, X[u] the residue |X(u)|_m, in
// natural order. in_valid travels alongside the data and appears as out_valid
// CHANNEL_LATENCY (6) clocks later. Only the valid pipeline is reset.
module rns_dct_channel
  import rns_dct_pkg::*;
#(
  parameter int unsigned MODULUS = 251,
  localparam int unsigned W = $clog2(MODULUS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x [N_POINTS],
  output logic         out_valid,
  output logic [W-1:0] X [N_POINTS]
);

  // ---------------- stage 1: input butterflies ----------------
  logic [W-1:0] a1, a2, a3, a4, a5, a6, a7, a8;

  mod_add #(.MODULUS(MODULUS)) u_a1 (.clk, .a(x[0]), .b(x[7]), .q(a1));
  mod_add #(.MODULUS(MODULUS)) u_a2 (.clk, .a(x[1]), .b(x[6]), .q(a2));
  mod_add #(.MODULUS(MODULUS)) u_a3 (.clk, .a(x[2]), .b(x[5]), .q(a3));
  mod_add #(.MODULUS(MODULUS)) u_a4 (.clk, .a(x[3]), .b(x[4]), .q(a4));
  mod_sub #(.MODULUS(MODULUS)) u_a5 (.clk, .a(x[3]), .b(x[4]), .q(a5));
  mod_sub #(.MODULUS(MODULUS)) u_a6 (.clk, .a(x[2]), .b(x[5]), .q(a6));
  mod_sub #(.MODULUS(MODULUS)) u_a7 (.clk, .a(x[1]), .b(x[6]), .q(a7));
  mod_sub #(.MODULUS(MODULUS)) u_a8 (.clk, .a(x[0]), .b(x[7]), .q(a8));

  // ---------------- stage 2 ----------------
  logic [W-1:0] b1, b2, b3, b4, b5, s6, b7, a8_d;

  mod_sub #(.MODULUS(MODULUS)) u_b4 (.clk, .a(a1), .b(a4), .q(b4));
  mod_add #(.MODULUS(MODULUS)) u_b1 (.clk, .a(a1), .b(a4), .q(b1));
  mod_add #(.MODULUS(MODULUS)) u_b2 (.clk, .a(a2), .b(a3), .q(b2));
  mod_sub #(.MODULUS(MODULUS)) u_b3 (.clk, .a(a2), .b(a3), .q(b3));
  mod_add #(.MODULUS(MODULUS)) u_b5 (.clk, .a(a5), .b(a6), .q(b5));
  mod_add #(.MODULUS(MODULUS)) u_s6 (.clk, .a(a6), .b(a7), .q(s6));
  mod_add #(.MODULUS(MODULUS)) u_b7 (.clk, .a(a7), .b(a8), .q(b7));
  always_ff @(posedge clk) a8_d <= a8;

  // ---------------- stage 3: first multiplication stage ----------------
  logic [W-1:0] c1, c2, c3, c4;
  logic [W-1:0] p5, q5, b6, q7, p7, b8;

  lut_mul #(.MODULUS(MODULUS), .COEF(K0)) u_c4 (.clk, .a(b4), .q(c4));
  mod_add #(.MODULUS(MODULUS))            u_c1 (.clk, .a(b1), .b(b2), .q(c1));
  mod_sub #(.MODULUS(MODULUS))            u_c2 (.clk, .a(b1), .b(b2), .q(c2));
  mod_add #(.MODULUS(MODULUS))            u_c3 (.clk, .a(b3), .b(b4), .q(c3));
  lut_mul #(.MODULUS(MODULUS), .COEF(K7)) u_p5 (.clk, .a(b5), .q(p5));
  lut_mul #(.MODULUS(MODULUS), .COEF(E))  u_q5 (.clk, .a(b5), .q(q5));
  lut_mul #(.MODULUS(MODULUS), .COEF(K5)) u_b6 (.clk, .a(s6), .q(b6));
  lut_mul #(.MODULUS(MODULUS), .COEF(E))  u_q7 (.clk, .a(b7), .q(q7));
  lut_mul #(.MODULUS(MODULUS), .COEF(K7)) u_p7 (.clk, .a(b7), .q(p7));
  lut_mul #(.MODULUS(MODULUS), .COEF(K6)) u_b8 (.clk, .a(a8_d), .q(b8));

  // ---------------- stage 4 ----------------
  logic [W-1:0] c4_d, c1_d, c2_d, e3;
  logic [W-1:0] c5, c6, c7, c8;

  always_ff @(posedge clk) begin
    c4_d <= c4;
    c1_d <= c1;
    c2_d <= c2;
  end
  lut_mul #(.MODULUS(MODULUS), .COEF(E)) u_e3 (.clk, .a(c3), .q(e3));
  mod_add #(.MODULUS(MODULUS)) u_c5 (.clk, .a(p5), .b(q7), .q(c5));
  mod_add #(.MODULUS(MODULUS)) u_c6 (.clk, .a(b6), .b(b8), .q(c6));
  mod_sub #(.MODULUS(MODULUS)) u_c7 (.clk, .a(p7), .b(q5), .q(c7));
  mod_sub #(.MODULUS(MODULUS)) u_c8 (.clk, .a(b8), .b(b6), .q(c8));

  // ---------------- stage 5 ----------------
  logic [W-1:0] d6, c1_dd, c2_dd, d2;
  logic [W-1:0] d1, d7, d3, d5;

  mod_sub #(.MODULUS(MODULUS)) u_d6 (.clk, .a(c4_d), .b(e3), .q(d6));
  always_ff @(posedge clk) begin
    c1_dd <= c1_d;
    c2_dd <= c2_d;
  end
  mod_add #(.MODULUS(MODULUS)) u_d2 (.clk, .a(e3), .b(c4_d), .q(d2));
  mod_add #(.MODULUS(MODULUS)) u_d1 (.clk, .a(c5), .b(c6), .q(d1));
  mod_sub #(.MODULUS(MODULUS)) u_d7 (.clk, .a(c6), .b(c5), .q(d7));
  mod_add #(.MODULUS(MODULUS)) u_d3 (.clk, .a(c7), .b(c8), .q(d3));
  mod_sub #(.MODULUS(MODULUS)) u_d5 (.clk, .a(c8), .b(c7), .q(d5));

  // ---------------- stage 6: second multiplication stage ----------------
  lut_mul #(.MODULUS(MODULUS), .COEF(K4))  u_X6 (.clk, .a(d6),    .q(X[6]));
  lut_mul #(.MODULUS(MODULUS), .COEF(K1))  u_X0 (.clk, .a(c1_dd), .q(X[0]));
  lut_mul #(.MODULUS(MODULUS), .COEF(K2))  u_X4 (.clk, .a(c2_dd), .q(X[4]));
  lut_mul #(.MODULUS(MODULUS), .COEF(K3))  u_X2 (.clk, .a(d2),    .q(X[2]));
  lut_mul #(.MODULUS(MODULUS), .COEF(K8))  u_X1 (.clk, .a(d1),    .q(X[1]));
  lut_mul #(.MODULUS(MODULUS), .COEF(K9))  u_X7 (.clk, .a(d7),    .q(X[7]));
  lut_mul #(.MODULUS(MODULUS), .COEF(K10)) u_X3 (.clk, .a(d3),    .q(X[3]));
  lut_mul #(.MODULUS(MODULUS), .COEF(K11)) u_X5 (.clk, .a(d5),    .q(X[5]));

  // ---------------- valid pipeline ----------------
  logic [CHANNEL_LATENCY-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[CHANNEL_LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[CHANNEL_LATENCY-1];

endmodule
