// rns_dct1d - RNS 8-point 1D-DCT processor (top level).
//
// The processor transforms one vector of eight 8-bit two's complement samples
// per clock. Each sample is converted to its residues modulo the four
// moduli {256, 255, 253, 251} (bin2rns), and the four residue vectors are
// transformed independently and in parallel by four copies of the
// fast-cosine-transform channel (rns_dct_channel). The modulo-256 channel
// uses plain binary adders and multipliers; the other three use modular
// adders and 2^8 x 8 multiplication tables. The outputs stay in RNS form:
// together, the four residues of X(u) identify the integer
//   X(u) = 2^(8*OUT_SCALE_STAGES[u]) * DCT(u) (fixed-point rounded)
// uniquely in the signed range [-M/2, M/2), M = 256*255*253*251 ~ 2^32, and a
// residue-to-binary converter (not part of this block) recovers it.
//
// The moduli, the sample width and the channel organisation follow the
// reference design. The valid handshake, the input register and the
// residue-vector port layout are this design's choices.
//
// Timing: a vector presented with in_valid appears at the outputs with
// out_valid 1 + CHANNEL_LATENCY = 7 clocks later; a new vector may enter every
// clock (no back-pressure). Only the valid pipeline is reset (rst_n, async).
module rns_dct1d
  import rns_dct_pkg::*;
#(
  parameter moduli_t MODS = MODULI
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x [N_POINTS],
  output logic                   out_valid,
  output logic        [RES_W-1:0] X [NUM_MODULI][N_POINTS]
);

  logic in_valid_q;
  logic [NUM_MODULI-1:0] ch_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_valid_q <= 1'b0;
    else        in_valid_q <= in_valid;
  end

  for (genvar j = 0; j < NUM_MODULI; j++) begin : g_ch
    logic [RES_W-1:0] xr [N_POINTS];

    initial assert ($clog2(MODS[j]) == RES_W)
      else $error("rns_dct1d: modulus %0d is not a %0d-bit modulus", MODS[j], RES_W);

    for (genvar i = 0; i < N_POINTS; i++) begin : g_conv
      bin2rns #(.MODULUS(MODS[j]), .IN_W(IN_W)) u_conv (
        .clk, .x(x[i]), .r(xr[i])
      );
    end

    rns_dct_channel #(.MODULUS(MODS[j])) u_channel (
      .clk,
      .rst_n,
      .in_valid  (in_valid_q),
      .x         (xr),
      .out_valid (ch_valid[j]),
      .X         (X[j])
    );
  end

  // All channels run in lock step; any one of them gives the output valid.
  assign out_valid = ch_valid[0];

  a_lock_step: assert property (@(posedge clk) disable iff (!rst_n)
                                ch_valid == {NUM_MODULI{ch_valid[0]}})
    else $error("rns_dct1d: channel valid flags disagree");

endmodule
