// tb_xor_scan_chain_iscas: loads test vectors through modified scan chains
// with the flip-flop counts of the ISCAS89 circuits used to evaluate the
// scheme (s713 ... s38584), each with its own pseudo-random gate placement
// of about one gate per five cells. The real test sets and gate placements
// of those circuits are not available, so random vectors and placements
// stand in for them; what is checked is that any placement delivers every
// vector when the stimulus is pre-transformed (see chain_load_check).
module tb_xor_scan_chain_iscas;
  localparam int NC = 10;
  localparam int SIZES [NC] = '{19, 29, 74, 179, 228, 669, 597, 1728, 1636, 1452};

  logic clk = 1'b0;
  logic [NC-1:0] done;
  int ck [NC];
  int fl [NC];
  int gt [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NC; i++) begin : g_c
    chain_load_check #(.N(SIZES[i]), .DMAX(8), .GATE_EVERY(5), .NVEC(3), .SEED(i + 1))
      u_chk (.clk, .done(done[i]), .checks(ck[i]), .failures(fl[i]), .gates(gt[i]));
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    for (int i = 0; i < NC; i++) begin
      $display("chain of %0d cells, %0d gated cells: %0d checks, %0d failures",
               SIZES[i], gt[i], ck[i], fl[i]);
      checks += ck[i];
      failures += fl[i];
      checks++;
      if (gt[i] == 0) begin
        failures++;
        $display("FAIL chain of %0d cells got no gate", SIZES[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
