// tb_lut_mul - exhaustive self-check of the fixed-coefficient LUT multiplier.
// Four instances cover the table form (moduli 251, 253, 255, including the
// scale constant 256 that is congruent to 1 modulo 255) and the binary form
// (modulus 256). Every residue is applied, one per clock, and each product
// is compared one clock later with (K * r) mod m.
module tb_lut_mul;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NI = 4;
  localparam int MOD [NI] = '{251, 253, 255, 256};
  localparam int KC  [NI] = '{362, 303, 256, 277};

  logic [7:0] a;
  logic [7:0] q [NI];

  lut_mul #(.MODULUS(251), .COEF(362)) dut0 (.clk, .a, .q(q[0]));
  lut_mul #(.MODULUS(253), .COEF(303)) dut1 (.clk, .a, .q(q[1]));
  lut_mul #(.MODULUS(255), .COEF(256)) dut2 (.clk, .a, .q(q[2]));
  lut_mul #(.MODULUS(256), .COEF(277)) dut3 (.clk, .a, .q(q[3]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int r = 0; r < 256; r++) begin
      a = 8'(r);
      @(posedge clk); #1;
      for (int n = 0; n < NI; n++) begin
        if (r < MOD[n]) begin
          checks++;
          e = (KC[n] * r) % MOD[n];
          if (int'(q[n]) != e) begin
            failures++;
            if (failures < 10)
              $display("mod %0d: %0d*%0d gave %0d, expected %0d", MOD[n], KC[n], r, q[n], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
