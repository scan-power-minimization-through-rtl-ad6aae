// tb_xor_scan_chain: end-to-end test of the modified scan chain at its
// default configuration (five cells, gates in front of cells 3 and 5).
//
// Checked against values fixed outside the RTL:
//  * I2D: loading each unit stimulus must deliver the matching row of
//      1 0 1 0 0 / 0 1 1 1 0 / 0 0 1 1 0 / 0 0 0 1 1 / 0 0 0 0 1
//  * D2I: a test vector pre-transformed by
//      1 0 1 1 1 / 0 1 1 0 0 / 0 0 1 1 1 / 0 0 0 1 1 / 0 0 0 0 1
//    must arrive unchanged, and I2D * D2I = I over GF(2).
//  * Responses: after a capture, shifting out while the next stimulus is
//    shifted in must give t5, t4^t2, t3^t1, t2^t1, t1^s5 (the leftmost
//    response bit mixes with the last bit of the next stimulus; the third
//    one with the first response bit), and every bit passing the whole
//    chain obeys the scan chain characteristic x_k ^ x_(k-1).
// Each operation is a full test cycle: N shift cycles to load, one capture
// cycle, N shift cycles to unload (overlapped with the next load); the
// cycle counts are checked. Mechanisms counted and required: shift, capture,
// stimulus transformed (inserted != delivered), response transformed
// (observed != captured), next-stimulus bit mixed into a response bit,
// asynchronous reset.
module tb_xor_scan_chain;
  localparam int N = 5;
  localparam int NVEC = 200;

  localparam logic [N:1][N:1] I2D_ROWS = '{
    5'b10100, 5'b01110, 5'b00110, 5'b00011, 5'b00001};
  localparam logic [N:1][N:1] D2I_ROWS = '{
    5'b10111, 5'b01100, 5'b00111, 5'b00011, 5'b00001};

  logic clk = 1'b0, rst_n = 1'b0, se = 1'b0, si = 1'b0;
  logic [N:1] d = '0;
  logic [N:1] q;
  logic so;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_shift = 0, n_capture = 0, n_stim_xf = 0, n_resp_xf = 0, n_mix = 0, n_reset = 0;

  xor_scan_chain dut (.clk, .rst_n, .se, .si, .d, .q, .so);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input logic [N:1] got, input logic [N:1] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Matrix element (row r, column c), 1-based, string written left to right.
  function automatic logic el(logic [N:1][N:1] m, int r, int c);
    return m[N+1-r][N+1-c];
  endfunction

  // row vector times matrix over GF(2); vectors are written bit 1 leftmost
  function automatic logic [N:1] vmul(logic [N:1] v, logic [N:1][N:1] m);
    logic [N:1] r = '0;
    for (int k = 1; k <= N; k++) begin
      logic acc = 1'b0;
      for (int j = 1; j <= N; j++) acc ^= v[N+1-j] & el(m, j, k);
      r[N+1-k] = acc;
    end
    return r;
  endfunction

  // bit k of a vector written leftmost-first
  function automatic logic bitk(logic [N:1] v, int k);
    return v[N+1-k];
  endfunction

  // Shift a vector in (bit N first, bit 1 last); returns what came out of so.
  task automatic shift_vec(input logic [N:1] vin, output logic [N:1] vout);
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      se = 1'b1;
      si = bitk(vin, N - c);
      vout[N - c] = so;          // c-th observed bit, stored first at the right
      n_shift++;
    end
    @(negedge clk);
    se = 1'b0;
  endtask

  task automatic capture(input logic [N:1] resp_cells);
    @(negedge clk);
    se = 1'b0;
    d  = resp_cells;
    n_capture++;
    @(negedge clk);
  endtask

  // q[] ports are numbered by cell; convert to leftmost-first vector
  function automatic logic [N:1] cells_vec();
    logic [N:1] v;
    for (int k = 1; k <= N; k++) v[N+1-k] = q[k];
    return v;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:1] tv, is_v, obs, t, nxt, nxt_is, exp_obs;
    int c0;

    // the two published matrices are inverses of each other
    for (int r = 1; r <= N; r++) begin
      logic [N:1] e = '0;
      e[N+1-r] = 1'b1;
      check(vmul(vmul(e, I2D_ROWS), D2I_ROWS), e, "I2D*D2I = I");
    end

    repeat (2) @(negedge clk);
    check(q, '0, "reset");
    n_reset++;
    rst_n = 1'b1;

    // I2D rows: unit stimuli
    for (int j = 1; j <= N; j++) begin
      is_v = '0;
      is_v[N+1-j] = 1'b1;
      c0 = cyc;
      shift_vec(is_v, obs);
      checks++;
      if (cyc - c0 != N + 1) begin
        failures++;
        $display("FAIL load took %0d cycles, expected %0d", cyc - c0 - 1, N);
      end
      check(cells_vec(), I2D_ROWS[N+1-j], $sformatf("I2D row %0d", j));
    end

    // full test cycles with random vectors and responses
    tv = N'($urandom);
    shift_vec(vmul(tv, D2I_ROWS), obs);
    for (int v = 0; v < NVEC; v++) begin
      check(cells_vec(), tv, "delivered test vector");
      if (vmul(tv, D2I_ROWS) != tv) n_stim_xf++;
      t = N'($urandom);                   // response of the core, cell order
      capture({<<{t}});                  // d[k] = t_k
      check(cells_vec(), t, "captured response");
      nxt    = N'($urandom);
      nxt_is = vmul(nxt, D2I_ROWS);
      shift_vec(nxt_is, obs);
      // observed order: t5, t4^t2, t3^t1, t2^t1, t1^s5  (obs bit c+1 = c-th out)
      exp_obs[N+1-1] = bitk(t,5);
      exp_obs[N+1-2] = bitk(t,4) ^ bitk(t,2);
      exp_obs[N+1-3] = bitk(t,3) ^ bitk(t,1);
      exp_obs[N+1-4] = bitk(t,2) ^ bitk(t,1);
      exp_obs[N+1-5] = bitk(t,1) ^ bitk(nxt_is,5);
      // an unmodified chain would have shown t5, t4, t3, t2, t1
      check(obs, exp_obs, "observed response");
      if (exp_obs != {<<{t}}) n_resp_xf++;
      if (bitk(nxt_is,5)) n_mix++;
      tv = nxt;
    end

    // scan chain characteristic: a bit stream passing the whole chain
    // comes out as x_k ^ x_(k-1)
    begin
      logic [4*N:1] stream;
      stream = (4*N)'({$urandom, $urandom});
      @(negedge clk);
      se = 1'b1;
      for (int k = 1; k <= 4*N; k++) begin
        si = stream[k];
        @(negedge clk);
        // from here on every cell holds bits of this stream only
        if (k >= 2*N) begin
          checks++;
          if (so !== (stream[k-N+1] ^ stream[k-N+2])) begin
            failures++;
            $display("FAIL chain characteristic at stream bit %0d", k);
          end
        end
      end
      se = 1'b0;
    end

    // asynchronous reset mid-operation clears all cells
    @(negedge clk);
    se = 1'b1; si = 1'b1;
    repeat (N) @(negedge clk);
    #2 rst_n = 1'b0;
    #1 check(q, '0, "asynchronous reset");
    n_reset++;

    checks++;
    if (n_shift == 0 || n_capture == 0 || n_stim_xf == 0 || n_resp_xf == 0 ||
        n_mix == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: shift=%0d capture=%0d stimulus_transformed=%0d response_transformed=%0d next_stimulus_mixed=%0d reset=%0d",
             n_shift, n_capture, n_stim_xf, n_resp_xf, n_mix, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
