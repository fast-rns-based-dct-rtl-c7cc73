// mod_add - registered modular adder, q = |a + b|_m.
//
// One of the three RNS components of the DCT channel. The operands are
// residues in [0, MODULUS). For a power-of-two modulus the carry out of a
// plain W-bit adder is simply dropped; otherwise the W+1-bit sum is corrected
// by subtracting MODULUS when it reaches it (a second adder and a mux). The
// result is registered: one clock of latency, a new operation every clock,
// as every operator of the channel is one pipeline stage. The power-of-two
// simplification follows the reference design; the correction scheme and the
// output register are this design's choices. No reset: the pipeline carries
// its valid flag separately.
module mod_add #(
  parameter int unsigned MODULUS = 251,
  localparam int unsigned W = $clog2(MODULUS)
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q
);

  localparam bit POW2 = (MODULUS == (1 << W));

  logic [W:0]   sum;
  logic [W:0]   sum_red;
  logic [W-1:0] res;

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b};
    sum_red = sum - (W+1)'(MODULUS);
    if (POW2)
      res = sum[W-1:0];
    else if (sum >= (W+1)'(MODULUS))
      res = sum_red[W-1:0];
    else
      res = sum[W-1:0];
  end

  always_ff @(posedge clk) q <= res;

endmodule
