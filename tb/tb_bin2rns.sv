// tb_bin2rns - exhaustive self-check of the forward converter: every 8-bit
// two's complement sample is converted for the moduli 251, 255 and 256 and
// compared one clock later with the nonnegative residue x mod m.
module tb_bin2rns;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NI = 3;
  localparam int MOD [NI] = '{251, 255, 256};

  logic signed [7:0] x;
  logic [7:0] r [NI];

  bin2rns #(.MODULUS(251), .IN_W(8)) dut0 (.clk, .x, .r(r[0]));
  bin2rns #(.MODULUS(255), .IN_W(8)) dut1 (.clk, .x, .r(r[1]));
  bin2rns #(.MODULUS(256), .IN_W(8)) dut2 (.clk, .x, .r(r[2]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      @(posedge clk); #1;
      for (int n = 0; n < NI; n++) begin
        checks++;
        e = ((v % MOD[n]) + MOD[n]) % MOD[n];
        if (int'(r[n]) != e) begin
          failures++;
          if (failures < 10) $display("mod %0d: %0d gave %0d, expected %0d", MOD[n], v, r[n], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
