// lut_mul - fixed-coefficient modular multiplier, q = |COEF * a|_m.
//
// For a modulus that is not a power of two the product is read from a
// 2^W-entry table of W-bit words (2^8 x 8 for the 8-bit moduli, the size of
// one embedded FPGA memory block). Entry r holds |COEF * r|_MODULUS; it is
// filled at elaboration from that formula, and addresses at or above MODULUS
// are never used by a valid residue. For a power-of-two modulus no table is
// needed: the low W bits of a binary constant multiplication are the
// residue. Both choices follow the reference design. The table is read
// synchronously, so the product appears one clock after the operand, one per
// clock (this register is the embedded block's own output register).
module lut_mul #(
  parameter int unsigned MODULUS = 251,
  parameter int unsigned COEF    = 362,
  localparam int unsigned W = $clog2(MODULUS)
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  output logic [W-1:0] q
);

  localparam bit POW2 = (MODULUS == (1 << W));

  if (POW2) begin : g_bin
    logic [W-1:0] prod;
    always_comb prod = a * W'(COEF);
    always_ff @(posedge clk) q <= prod;
  end else begin : g_lut
    logic [W-1:0] rom [2**W];
    for (genvar r = 0; r < 2**W; r++) begin : g_entry
      assign rom[r] = W'((64'(COEF) * 64'(r)) % 64'(MODULUS));
    end
    always_ff @(posedge clk) q <= rom[a];
  end

endmodule
