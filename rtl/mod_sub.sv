// mod_sub - registered modular subtractor, q = |a - b|_m.
//
// One of the three RNS components of the DCT channel. Operands are residues
// in [0, MODULUS). The W+1-bit difference a - b borrows when b > a; the
// borrow selects a - b + MODULUS instead. For a power-of-two modulus the
// borrow is ignored and plain W-bit subtraction is used. The result is
// registered: one clock of latency, one operation per clock. The
// power-of-two simplification follows the reference design; the correction
// scheme and the register are this design's choices.
module mod_sub #(
  parameter int unsigned MODULUS = 251,
  localparam int unsigned W = $clog2(MODULUS)
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q
);

  localparam bit POW2 = (MODULUS == (1 << W));

  logic [W:0]   diff;
  logic [W:0]   diff_cor;
  logic [W-1:0] res;

  always_comb begin
    diff     = {1'b0, a} - {1'b0, b};
    diff_cor = diff + (W+1)'(MODULUS);
    if (POW2 || !diff[W])
      res = diff[W-1:0];
    else
      res = diff_cor[W-1:0];
  end

  always_ff @(posedge clk) q <= res;

endmodule
