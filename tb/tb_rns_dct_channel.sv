// tb_rns_dct_channel - self-check of one modulo-m DCT channel.
//
// Two channels run side by side: a table-based one (modulus 251) and the
// binary one (modulus 256). Random residue vectors are streamed in, mostly
// back to back with occasional idle clocks. For each accepted vector the
// expected outputs are the exact integer fast cosine transform of the
// residues (dct_ref_pkg::fct_int, no modular arithmetic) reduced modulo m.
// The testbench also checks that each result appears exactly
// CHANNEL_LATENCY = 6 clocks after its input and that a vector is accepted on
// every clock (one transform per clock).
module tb_rns_dct_channel;
  import dct_ref_pkg::*;

  localparam int LAT = 6;
  localparam int NVEC = 2000;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic in_valid;
  logic [7:0] xa [8], xb [8];
  logic va, vb;
  logic [7:0] ya [8], yb [8];

  rns_dct_channel #(.MODULUS(251)) dut_a (
    .clk, .rst_n, .in_valid, .x(xa), .out_valid(va), .X(ya));
  rns_dct_channel #(.MODULUS(256)) dut_b (
    .clk, .rst_n, .in_valid, .x(xb), .out_valid(vb), .X(yb));

  typedef struct { longint ea [8]; longint eb [8]; int t_in; } exp_t;
  exp_t q [$];
  int cycle = 0;
  int sent = 0, got = 0, back_to_back = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NVEC * 3 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus.
  initial begin
    longint va_i [8], vb_i [8], ya_r [8], yb_r [8];
    exp_t e;
    logic prev;
    rst_n = 0; in_valid = 0; prev = 0;
    foreach (xa[i]) begin xa[i] = '0; xb[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (sent < NVEC) begin
      #1;
      in_valid = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < 8; i++) begin
        // Edge values on some vectors, random residues otherwise.
        case ($urandom_range(0, 7))
          0: begin xa[i] = 8'd250; xb[i] = 8'd255; end
          1: begin xa[i] = 8'd0;   xb[i] = 8'd0;   end
          default: begin xa[i] = 8'($urandom_range(0, 250)); xb[i] = 8'($urandom_range(0, 255)); end
        endcase
        va_i[i] = longint'(xa[i]);
        vb_i[i] = longint'(xb[i]);
      end
      if (in_valid) begin
        fct_int(va_i, ya_r);
        fct_int(vb_i, yb_r);
        for (int u = 0; u < 8; u++) begin
          e.ea[u] = res(ya_r[u], 251);
          e.eb[u] = res(yb_r[u], 256);
        end
        e.t_in = cycle;
        q.push_back(e);
        sent++;
        if (prev) back_to_back++;
      end
      prev = in_valid;
      @(posedge clk);
    end
    #1 in_valid = 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (got != NVEC || q.size() != 0) begin
      failures++;
      $display("received %0d of %0d results", got, NVEC);
    end
    checks++;
    if (back_to_back == 0) begin
      failures++;
      $display("no back-to-back vectors were sent");
    end
    $display("vectors=%0d back_to_back=%0d", sent, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Response check, half a clock after the outputs change.
  always @(negedge clk) begin
    if (rst_n && (va || vb)) begin
      exp_t e;
      checks++;
      if (va != vb || q.size() == 0) begin
        failures++;
        $display("unexpected valid at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        got++;
        checks++;
        if (cycle - e.t_in != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t_in, LAT);
        end
        for (int u = 0; u < 8; u++) begin
          checks += 2;
          if (longint'(ya[u]) != e.ea[u]) begin
            failures++;
            if (failures < 10) $display("mod 251 X(%0d)=%0d expected %0d", u, ya[u], e.ea[u]);
          end
          if (longint'(yb[u]) != e.eb[u]) begin
            failures++;
            if (failures < 10) $display("mod 256 X(%0d)=%0d expected %0d", u, yb[u], e.eb[u]);
          end
        end
      end
    end
  end
endmodule
