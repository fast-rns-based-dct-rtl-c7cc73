// bin2rns - forward converter: IN_W-bit two's complement sample to |x|_m.
//
// The residue of a negative sample is x + m. Since every modulus of the
// processor is at least 2^(IN_W-1), a sample lies in (-m, m) and one
// conditional addition of m is all the conversion needs. For a power-of-two
// modulus 2^W with W >= IN_W the residue is the sample's two's complement
// bits, sign-extended, with no logic at all. The registered output gives one
// clock of latency and one sample per clock. The reference design only names
// this converter and notes that a power-of-two modulus simplifies it; the
// circuit is this design's own.
module bin2rns #(
  parameter int unsigned MODULUS = 251,
  parameter int unsigned IN_W    = 8,
  localparam int unsigned W = $clog2(MODULUS)
) (
  input  logic                   clk,
  input  logic signed [IN_W-1:0] x,
  output logic        [W-1:0]    r
);

  localparam bit POW2 = (MODULUS == (1 << W));

  initial assert (MODULUS >= (1 << (IN_W - 1)) && W >= IN_W)
    else $error("bin2rns: modulus %0d too small for %0d-bit samples", MODULUS, IN_W);

  logic [W:0]   x_ext;
  logic [W:0]   x_wrap;
  logic [W-1:0] res;

  always_comb begin
    x_ext  = (W+1)'(x);                    // sign-extended
    x_wrap = x_ext + (W+1)'(MODULUS);
    if (POW2 || !x[IN_W-1])
      res = x_ext[W-1:0];
    else
      res = x_wrap[W-1:0];
  end

  always_ff @(posedge clk) r <= res;

endmodule
