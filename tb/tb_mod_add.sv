// tb_mod_add - exhaustive self-check of the registered modular adder for a
// general modulus (251) and the power-of-two modulus (256): every operand
// pair is applied, one per clock, and each result is compared one clock
// later with (a + b) mod m.
module tb_mod_add;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] a, b, q251, q256;
  mod_add #(.MODULUS(251)) dut_a (.clk, .a, .b, .q(q251));
  mod_add #(.MODULUS(256)) dut_b (.clk, .a, .b, .q(q256));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 256; k++) begin
        a = 8'(i); b = 8'(k);
        @(posedge clk); #1;
        if (i < 251 && k < 251) begin
          checks++;
          ea = (i + k) % 251;
          if (int'(q251) != ea) begin
            failures++;
            if (failures < 10) $display("mod 251: %0d+%0d gave %0d, expected %0d", i, k, q251, ea);
          end
        end
        checks++;
        eb = (i + k) % 256;
        if (int'(q256) != eb) begin
          failures++;
          if (failures < 10) $display("mod 256: %0d+%0d gave %0d, expected %0d", i, k, q256, eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
