// chain_load_check: testbench helper that builds one xor_scan_chain of N
// cells with a pseudo-random gate placement (about one gate per GATE_EVERY
// cells, taps up to DMAX cells back, occasional inverters), then loads
// NVEC random test vectors through it.
//
// The stimulus for each vector is computed by running the chain backwards:
// knowing the final cell contents, the contents one shift earlier follow
// cell by cell from the scan-in side, because every gate only reads cells
// upstream of the one it feeds. Repeating that N times gives the stimulus
// (the D2I transformation) without ever using the forward shift rule. The
// vector that arrives in the cells must equal the intended one. Each load
// must take exactly N shift cycles.
//
// Response side: NFLIP times a random response is captured and unloaded
// while a random next stimulus is shifted in, then the same response with
// one bit (cell k) flipped is unloaded with the same stimulus. Cell k's bit
// is observed after N-k shifts and never mixes with itself, so that
// observed bit must differ; the bits of cells 1..k-1 are observed later
// and only mix with data upstream of them, so they must agree. Hence a
// captured fault effect is never lost, whatever the placement.
//
// Outputs: done when finished, with the number of checks and failures.
module chain_load_check #(
  parameter int unsigned N          = 19,
  parameter int unsigned DMAX       = 8,
  parameter int unsigned GATE_EVERY = 5,
  parameter int unsigned NVEC       = 4,
  parameter int unsigned SEED       = 1,
  parameter int unsigned NFLIP      = 3
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   gates
);
  typedef logic [N:1][DMAX:1] taps_t;

  // xorshift generator usable at elaboration
  function automatic int unsigned nxt(int unsigned x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction

  function automatic taps_t make_taps();
    taps_t t = '0;
    int unsigned r = SEED * 32'h9E3779B9 + 1;
    for (int s = 2; s <= N; s++) begin
      r = nxt(r);
      if (r % GATE_EVERY == 0) begin
        r = nxt(r);
        t[s][1 + (r % DMAX)] = 1'b1;
        r = nxt(r);
        if (r % 3 == 0) t[s][1 + ((r >> 4) % DMAX)] = 1'b1;
      end
    end
    // drop taps reaching before the scan-in pin
    for (int s = 1; s <= N; s++)
      for (int dd = 1; dd <= DMAX; dd++)
        if (dd > s - 1) t[s][dd] = 1'b0;
    return t;
  endfunction

  function automatic logic [N:1] make_inv();
    logic [N:1] v = '0;
    int unsigned r = SEED * 32'h85EBCA6B + 7;
    for (int s = 1; s <= N; s++) begin
      r = nxt(r);
      v[s] = (r % (4 * GATE_EVERY) == 0);
    end
    return v;
  endfunction

  localparam taps_t      TAPS = make_taps();
  localparam logic [N:1] INV  = make_inv();

  logic rst_n = 1'b0, se = 1'b0, si = 1'b0;
  logic [N:1] d = '0, q;
  logic so;

  xor_scan_chain #(.N(N), .DMAX(DMAX), .TAPS(TAPS), .INV(INV))
    u_chain (.clk, .rst_n, .se, .si, .d, .q, .so);

  // contents one shift earlier; returns the scan-in bit of that shift
  function automatic logic [N:0] step_back(logic [N:1] cur);
    logic [N:0] p = '0;               // p[0] = scan-in, p[N] left unknown (0)
    for (int s = 1; s <= N; s++) begin
      logic v = cur[s] ^ INV[s];
      for (int dd = 1; dd <= DMAX; dd++)
        if (TAPS[s][dd]) v ^= p[s-1-dd];
      p[s-1] = v;
    end
    return p;
  endfunction

  initial begin
    logic [N:1] tv, st;
    logic [N:1] stim;                 // stim[k]: bit inserted at shift k
    logic [N:0] p;
    int c0, c1;
    done = 1'b0; checks = 0; failures = 0;
    gates = 0;
    for (int s = 1; s <= N; s++) if (TAPS[s] != '0 || INV[s]) gates++;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NVEC; v++) begin
      for (int k = 1; k <= N; k++) tv[k] = 1'($urandom);
      st = tv;
      for (int k = N; k >= 1; k--) begin
        p = step_back(st);
        stim[k] = p[0];
        st = p[N:1];
      end
      c0 = 0;
      for (int k = 1; k <= N; k++) begin
        @(negedge clk);
        se = 1'b1;
        si = stim[k];
        c0++;
      end
      @(negedge clk);
      se = 1'b0;
      d  = q;
      c1 = c0;
      checks++;
      if (q !== tv) begin
        failures++;
        $display("FAIL N=%0d vector %0d not delivered", N, v);
      end
      checks++;
      if (c1 != N) failures++;
    end
    for (int f = 0; f < NFLIP; f++) begin
      logic [N:1] r, nstim;
      logic [N:1] obs [2];
      int k;
      k = $urandom_range(1, N);
      for (int i = 1; i <= N; i++) begin
        r[i] = 1'($urandom);
        nstim[i] = 1'($urandom);
      end
      for (int pass = 0; pass < 2; pass++) begin
        @(negedge clk);
        se = 1'b0;
        d  = r;
        if (pass == 1) d[k] = ~r[k];
        for (int c = 0; c < N; c++) begin
          @(negedge clk);
          obs[pass][c+1] = so;
          se = 1'b1;
          si = nstim[c+1];
        end
      end
      @(negedge clk);
      se = 1'b0;
      // bit c+1 holds the c-th observed bit: bit N-k+1 (cell k's own bit)
      // must differ, bits N-k+2..N (cells upstream of k) must agree
      checks++;
      begin
        logic [N:1] diff;
        logic bad;
        diff = obs[0] ^ obs[1];
        bad  = !diff[N-k+1];
        for (int c = N - k + 2; c <= N; c++) bad |= diff[c];
        if (bad) begin
          failures++;
          $display("FAIL N=%0d flipped response bit %0d not observed where expected", N, k);
        end
      end
    end
    done = 1'b1;
  end
endmodule
