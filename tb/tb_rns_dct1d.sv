// tb_rns_dct1d - end-to-end self-check of the RNS 8-point DCT processor at
// its default configuration (moduli {256, 255, 253, 251}, 8-bit samples).
//
// Vectors of signed samples (random, full-scale, alternating, impulses) are
// streamed in, mostly on consecutive clocks. For every result the four
// residues of each coefficient are combined with the Chinese remainder
// theorem into a signed integer in [-M/2, M/2) and compared
//   - exactly with the integer fast cosine transform (dct_ref_pkg::fct_int),
//   - approximately with the floating-point orthonormal DCT after removing
//     the output scale 2^8 (X(0), X(4)) or 2^16 (others).
// It also checks the 7-clock latency and the one-vector-per-clock rate, and
// counts the events that exercise the design: negative samples (forward
// conversion wrap-around), negative coefficients (upper half of the RNS
// range), back-to-back vectors and idle clocks. An event that never occurs
// counts as a failure.
module tb_rns_dct1d;
  import dct_ref_pkg::*;

  localparam int LAT  = 7;
  localparam int NVEC = 3000;
  localparam int NM   = 4;
  localparam longint MODS [NM] = '{256, 255, 253, 251};
  localparam real TOL = 4.0;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, out_valid;
  logic signed [7:0] x [8];
  logic [7:0] X [NM][8];

  rns_dct1d dut (.clk, .rst_n, .in_valid, .x, .out_valid, .X);

  typedef struct { longint xin [8]; int t_in; } exp_t;
  exp_t q [$];
  int cycle = 0;
  int sent = 0, got = 0;
  int n_neg_in = 0, n_neg_out = 0, n_b2b = 0, n_idle = 0;
  real max_err = 0.0;
  longint M;
  longint crt_w [NM];   // CRT weights (M/m_j) * |(M/m_j)^-1|_m_j

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NVEC * 3 + 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CRT set-up.
  initial begin
    M = 1;
    for (int j = 0; j < NM; j++) M *= MODS[j];
    for (int j = 0; j < NM; j++) begin
      longint mj, inv;
      mj = M / MODS[j];
      inv = 0;
      for (longint t = 1; t < MODS[j]; t++)
        if ((mj % MODS[j]) * t % MODS[j] == 1) inv = t;
      crt_w[j] = mj * inv;
    end
  end

  function automatic longint crt(input logic [7:0] r [NM][8], int u);
    longint s;
    s = 0;
    for (int j = 0; j < NM; j++) s = (s + longint'(r[j][u]) * crt_w[j]) % M;
    if (s >= M / 2) s -= M;
    return s;
  endfunction

  // Stimulus.
  initial begin
    exp_t e;
    logic prev;
    int kind;
    rst_n = 0; in_valid = 0; prev = 0;
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (sent < NVEC) begin
      #1;
      in_valid = (sent < 8) || ($urandom_range(0, 7) != 0);
      kind = (sent < 8) ? sent : $urandom_range(0, 11);
      for (int i = 0; i < 8; i++) begin
        case (kind)
          0: x[i] = 8'sd127;
          1: x[i] = -8'sd128;
          2: x[i] = (i % 2) ? -8'sd128 : 8'sd127;
          3: x[i] = (i == 3) ? 8'sd127 : 8'sd0;
          4: x[i] = (i == 0) ? -8'sd128 : 8'sd0;
          5: x[i] = 8'sd0;
          6: x[i] = (i < 4) ? 8'sd127 : -8'sd128;
          default: x[i] = 8'($urandom_range(0, 255));
        endcase
        e.xin[i] = longint'(x[i]);
      end
      if (in_valid) begin
        e.t_in = cycle;
        q.push_back(e);
        sent++;
        if (prev) n_b2b++;
        for (int i = 0; i < 8; i++) if (x[i] < 0) n_neg_in++;
      end else begin
        n_idle++;
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
    $display("vectors=%0d negative_samples=%0d negative_coefficients=%0d back_to_back=%0d idle_clocks=%0d",
             sent, n_neg_in, n_neg_out, n_b2b, n_idle);
    $display("largest deviation from the floating-point DCT: %f", max_err);
    checks += 4;
    if (n_neg_in == 0)  begin failures++; $display("no negative sample was applied"); end
    if (n_neg_out == 0) begin failures++; $display("no negative coefficient was produced"); end
    if (n_b2b == 0)     begin failures++; $display("no back-to-back vectors"); end
    if (n_idle == 0)    begin failures++; $display("no idle clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Response check.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      longint ref_int [8];
      longint v;
      real err;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected out_valid at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        got++;
        checks++;
        if (cycle - e.t_in != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t_in, LAT);
        end
        fct_int(e.xin, ref_int);
        for (int u = 0; u < 8; u++) begin
          v = crt(X, u);
          if (v < 0) n_neg_out++;
          checks++;
          if (v != ref_int[u]) begin
            failures++;
            if (failures < 10) $display("X(%0d)=%0d expected %0d", u, v, ref_int[u]);
          end
          err = real'(v) / real'(longint'(1) << out_shift(u)) - dct_real(e.xin, u);
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > TOL) begin
            failures++;
            if (failures < 10) $display("X(%0d) deviates from the DCT by %f", u, err);
          end
        end
      end
    end
  end
endmodule
