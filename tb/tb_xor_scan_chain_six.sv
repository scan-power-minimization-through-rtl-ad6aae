// tb_xor_scan_chain_six: six-cell configurations of the modified scan chain,
// side by side with an unmodified chain.
//
//  u_plain  no inserted gate (reference for the transition count)
//  u_two   XOR gates in front of cells 2 and 5, each with a tap one cell
//           back. The second gate's taps read cells that already lie behind
//           the first gate, so the two interfere and a product band appears:
//           I2D = I + B_2^1 + B_5^1 + B_5^2  (band list I + BL^1_(2,5) + BL^2_(5))
//  u_inv    a single inverter in front of cell 4
//  u_both   the u_two gates plus an inverter in front of cell 3
//
// Checks: the worked example (stimulus 111011 arrives as test vector
// 100101); every I2D row against the matrix built in the testbench from
// bands (including the product rule B_a^d1 * B_b^d2 = B_b^(d1+d2)); the
// inverter changing the transition pattern at one point only, for loaded
// stimuli and for unloaded responses alike; the affine
// map of the combined chain; and, for a test set whose vectors have low
// transition content after the D2I pre-transformation (runs of equal
// bits), fewer scan-cell toggles in u_two than in u_plain while both
// deliver the same test vectors.
module tb_xor_scan_chain_six;
  localparam int N = 6;
  localparam int D = N - 1;
  localparam int NSET = 64;
  typedef bit mat_t [1:N][1:N];
  typedef logic [N:1][D:1] taps_t;

  function automatic taps_t two_gate_taps();
    taps_t t = '0;
    t[2][1] = 1'b1;
    t[5][1] = 1'b1;
    return t;
  endfunction

  localparam taps_t TWO_GATES = two_gate_taps();

  logic clk = 1'b0, rst_n = 1'b0, se = 1'b0;
  logic [N:1] d = '0;
  logic si_p = 0, si_f = 0, si_i = 0, si_b = 0;
  logic [N:1] q_p, q_f, q_i, q_b;
  logic so_p, so_f, so_i, so_b;
  int checks = 0, failures = 0;
  longint tog_p = 0, tog_f = 0;
  int n_product = 0, n_inverter = 0, n_affine = 0, n_reduced = 0, n_shift = 0;

  xor_scan_chain #(.N(N), .DMAX(D), .TAPS('0),   .INV('0))
    u_plain (.clk, .rst_n, .se, .si(si_p), .d, .q(q_p), .so(so_p));
  xor_scan_chain #(.N(N), .DMAX(D), .TAPS(TWO_GATES), .INV('0))
    u_two   (.clk, .rst_n, .se, .si(si_f), .d, .q(q_f), .so(so_f));
  xor_scan_chain #(.N(N), .DMAX(D), .TAPS('0),   .INV(6'b001000))
    u_inv   (.clk, .rst_n, .se, .si(si_i), .d, .q(q_i), .so(so_i));
  xor_scan_chain #(.N(N), .DMAX(D), .TAPS(TWO_GATES), .INV(6'b000100))
    u_both  (.clk, .rst_n, .se, .si(si_b), .d, .q(q_b), .so(so_b));

  always #5 clk = ~clk;

  // scan-cell toggles, the transition measure behind the power numbers
  always @(posedge clk) begin
    logic [N:1] pp, pf;
    pp = q_p; pf = q_f;
    #1;
    if (rst_n) begin
      tog_p += $countones(q_p ^ pp);
      tog_f += $countones(q_f ^ pf);
    end
  end

  // --- GF(2) matrices, row/column 1..N, vectors indexed by cell ---------
  function automatic mat_t band(int dd, int init);
    mat_t m;
    for (int r = 1; r <= N; r++)
      for (int c = 1; c <= N; c++)
        m[r][c] = (c - r == dd) && (c >= init);
    return m;
  endfunction

  function automatic mat_t madd(mat_t a, mat_t b);
    mat_t m;
    for (int r = 1; r <= N; r++)
      for (int c = 1; c <= N; c++) m[r][c] = a[r][c] ^ b[r][c];
    return m;
  endfunction

  function automatic mat_t mmul(mat_t a, mat_t b);
    mat_t m;
    for (int r = 1; r <= N; r++)
      for (int c = 1; c <= N; c++) begin
        m[r][c] = 1'b0;
        for (int k = 1; k <= N; k++) m[r][c] ^= a[r][k] & b[k][c];
      end
    return m;
  endfunction

  function automatic logic [N:1] vmul(logic [N:1] v, mat_t m);
    logic [N:1] r = '0;
    for (int c = 1; c <= N; c++)
      for (int j = 1; j <= N; j++) r[c] ^= v[j] & m[j][c];
    return r;
  endfunction

  // transitions between neighbouring bits k, k+1 of a vector
  function automatic logic [N-1:1] trans(logic [N:1] v);
    logic [N-1:1] t;
    for (int k = 1; k < N; k++) t[k] = v[k] ^ v[k+1];
    return t;
  endfunction

  task automatic check(input logic [N:1] got, input logic [N:1] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (cell N on the left)", what, got, exp);
    end
  endtask

  // shift one vector into every chain: bit N first, bit 1 last
  task automatic load(input logic [N:1] vp, vf, vi, vb);
    for (int c = N; c >= 1; c--) begin
      @(negedge clk);
      se = 1'b1;
      si_p = vp[c]; si_f = vf[c]; si_i = vi[c]; si_b = vb[c];
      n_shift++;
    end
    @(negedge clk);
    se = 1'b0;
    d  = q_p;           // next capture leaves the cells unchanged
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t ident, i2d;
    logic [N:1] e, c_both, z, a, b, tv, is_v;

    ident = band(0, 1);
    i2d = madd(madd(madd(ident, band(1, 2)), band(1, 5)), band(2, 5));
    // product rule of the band algebra
    begin
      mat_t p, q;
      p = mmul(band(1, 2), band(1, 5));
      q = band(2, 5);
      checks++;
      if (p != q) begin failures++; $display("FAIL band product rule"); end
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // worked example: 111011 -> 100101 (bit 1 written first)
    load('0, 6'b110111, '0, '0);
    check(q_f, 6'b101001, "worked example 111011 -> 100101");

    // I2D rows
    for (int j = 1; j <= N; j++) begin
      e = '0; e[j] = 1'b1;
      load(e, e, e, e);
      check(q_p, e, $sformatf("plain chain row %0d", j));
      check(q_f, vmul(e, i2d), $sformatf("I2D row %0d", j));
      if (vmul(e, i2d) != vmul(e, madd(madd(ident, band(1, 2)), band(1, 5)))) n_product++;
    end

    // inverter: cells 4..6 complemented, transitions changed between 3 and 4 only
    for (int i = 0; i < 32; i++) begin
      is_v = N'($urandom);
      load(is_v, is_v, is_v, is_v);
      check(q_i, is_v ^ 6'b111000, "inverter in front of cell 4");
      checks++;
      if ((trans(q_i) ^ trans(is_v)) != 5'b00100) begin
        failures++;
        $display("FAIL inverter changed transitions elsewhere");
      end
      n_inverter++;
    end

    // inverter on the response side: responses captured in cells 1..3
    // pass it on the way out and leave complemented, cells 4..6 do not
    for (int i = 0; i < 16; i++) begin
      logic [N:1] r, obs;
      r = N'($urandom);
      @(negedge clk);
      se = 1'b0;
      d  = r;
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        obs[N-c] = so_i;       // c-th observed bit comes from cell N-c
        se = 1'b1;
        si_i = 1'($urandom);
      end
      @(negedge clk);
      se = 1'b0;
      check(obs, r ^ 6'b000111, "inverter on unloaded response");
      checks++;
      if ((trans(obs) ^ trans(r)) != 5'b00100) begin
        failures++;
        $display("FAIL inverter changed response transitions elsewhere");
      end
      n_inverter++;
    end

    // combined chain: TV = IS*I2D + c; the inverter in front of cell 3 flips
    // bits 3.. but the gate at cell 5 XORs two flipped bits, so c = cells 3,4
    c_both = 6'b001100;
    for (int i = 0; i < 32; i++) begin
      a = N'($urandom);
      load(a, a, a, a);
      check(q_b, vmul(a, i2d) ^ c_both, "XOR gates plus inverter");
      n_affine++;
    end

    // transition comparison on a test set whose pre-transformed stimuli are
    // runs of equal bits with at most one change
    tog_p = 0; tog_f = 0;
    for (int i = 0; i < NSET; i++) begin
      // fixed set: long runs of all-ones, a run with one change, all-zeros
      case (i % 8)
        0, 1, 2, 3: is_v = 6'b111111;
        4, 5:       is_v = 6'b111000;
        default:    is_v = 6'b000000;
      endcase
      tv = vmul(is_v, i2d);
      load(tv, is_v, '0, '0);
      check(q_p, tv, "plain chain delivers vector");
      check(q_f, tv, "modified chain delivers same vector");
    end
    $display("scan-cell toggles over the test set: unmodified %0d, modified %0d",
             tog_p, tog_f);
    checks++;
    if (!(tog_f < tog_p)) begin
      failures++;
      $display("FAIL modified chain did not reduce toggles");
    end else n_reduced++;

    checks++;
    if (n_product == 0 || n_inverter == 0 || n_affine == 0 || n_reduced == 0 || n_shift == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: shift=%0d product_band_rows=%0d inverter=%0d xor_plus_inverter=%0d toggle_reduction=%0d",
             n_shift, n_product, n_inverter, n_affine, n_reduced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
