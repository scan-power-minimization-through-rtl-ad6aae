// xor_scan_chain: low-power scan chain with XOR gates and inverters inserted
// on the scan path between scan cells.
//
// Cells are numbered 1..N from scan-in to scan-out; the scan-in pin is
// treated as cell 0. In front of every cell s sits a scan_xor_gate whose
// chain input is cell s-1 and whose tap d (TAPS[s][d] = 1) is cell s-1-d, so
// a tap "d cells back" skips d cells. INV[s] puts an inverter in front of
// cell s. With all TAPS and INV zero this is an ordinary scan chain.
//
// Shifting N bits through the chain turns the inserted stimulus IS (bit j is
// the one that ends in cell j, so bit N is inserted first) into the delivered
// test vector TV = IS * I2D (+ a constant vector from the inverters), where
// I2D is an upper-triangular GF(2) matrix. A gate at cell s with tap d adds
// band B_s^d (ones on diagonal d from column s to the right edge); a gate
// whose taps read cells that already lie behind an earlier gate also adds
// the product bands (B_a^d1 * B_b^d2 = B_b^(d1+d2)). During unload the same
// gates turn captured response bits into observed bits that also mix in
// the next stimulus being shifted in (the C2O transformation). The tester
// therefore pre-transforms each test vector with D2I = I2D^-1, and the tap
// pattern is chosen off-line so that both the inserted stimuli and the
// observed responses show as few transitions as possible.
//
// The default pattern is the published five-cell worked example: one
// gate in front of cell 3 with taps 1 and 2 (cell 1 and scan-in) and one in
// front of cell 5 with tap 2 (cell 2), giving
//   I2D = I + B_3^1 + B_3^2 + B_5^2,
// whose last column (the scan chain characteristic) is x_k ^ x_(k-1).
// Cell type, reset and port naming are this design's own choices.
//
// Interface: se=1 shifts one bit per rising clk edge (si in, so out = cell N);
// se=0 captures the functional inputs d[1..N] into the cells in one cycle.
// q[1..N] are the cell outputs seen by the core logic. The inserted gates are
// only on the scan path; the functional d -> flip-flop path has no extra
// gate. Latency: a full load or unload takes N shift cycles.
module xor_scan_chain #(
  parameter int unsigned           N    = 5,        // scan cells
  parameter int unsigned           DMAX = N - 1,    // longest tap reach offered
  // TAPS[s][d]: gate in front of cell s taps the cell d cells back. The
  // default sets TAPS[3][1], TAPS[3][2] and TAPS[5][2] (flat bit index
  // (s-1)*DMAX + d-1); chains too short for the example get no gate.
  parameter logic [N:1][DMAX:1]    TAPS = (N >= 5 && DMAX >= 2)
                                          ? ((N*DMAX)'(1) << (2*DMAX))
                                          | ((N*DMAX)'(1) << (2*DMAX + 1))
                                          | ((N*DMAX)'(1) << (4*DMAX + 1))
                                          : '0,
  parameter logic [N:1]            INV  = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          se,
  input  logic          si,
  input  logic [N:1]    d,
  output logic [N:1]    q,
  output logic          so
);

  // src[0] is scan-in, src[j] the output of cell j (cell N only drives so).
  logic [N-1:0] src;
  assign src = {q[N-1:1], si};
  assign so  = q[N];

  for (genvar s = 1; s <= N; s++) begin : g_cell
    logic [DMAX:1] tap_in;
    logic          scan_in;

    for (genvar dd = 1; dd <= DMAX; dd++) begin : g_tap
      if (dd <= s - 1) begin : g_reach
        assign tap_in[dd] = src[s-1-dd];
      end else begin : g_none
        assign tap_in[dd] = 1'b0;
      end
    end

    scan_xor_gate #(
      .W        (DMAX),
      .TAP_MASK (TAPS[s]),
      .INVERT   (INV[s])
    ) u_gate (
      .chain_in (src[s-1]),
      .tap_in   (tap_in),
      .scan_out (scan_in)
    );

    scan_cell u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .se    (se),
      .d     (d[s]),
      .si    (scan_in),
      .q     (q[s])
    );
  end

  // A tap must lie upstream of the cell feeding the gate (reach d <= s-1);
  // anything else would close a loop or cancel the chain input.
  initial begin : chk_taps
    for (int s = 1; s <= N; s++)
      for (int dd = 1; dd <= DMAX; dd++)
        assert (!(TAPS[s][dd] && dd > s - 1))
          else $error("TAPS[%0d][%0d] reaches before the scan-in pin", s, dd);
  end

endmodule
