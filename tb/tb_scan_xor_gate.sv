// tb_scan_xor_gate: exhaustive test of the inserted scan-path gate for three
// configurations: plain wire, two-tap XOR, and one-tap XOR followed by an
// inverter. The expected output is computed tap by tap in the testbench.
module tb_scan_xor_gate;
  localparam int unsigned W = 4;
  logic         chain_in;
  logic [W:1]   tap_in;
  logic         y_wire, y_xor2, y_xnor;
  int checks = 0, failures = 0;

  scan_xor_gate #(.W(W), .TAP_MASK(4'b0000), .INVERT(1'b0))
    u_wire (.chain_in, .tap_in, .scan_out(y_wire));
  scan_xor_gate #(.W(W), .TAP_MASK(4'b0101), .INVERT(1'b0))
    u_xor2 (.chain_in, .tap_in, .scan_out(y_xor2));
  scan_xor_gate #(.W(W), .TAP_MASK(4'b1000), .INVERT(1'b1))
    u_xnor (.chain_in, .tap_in, .scan_out(y_xnor));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s chain_in=%0b tap_in=%b: got %0b expected %0b",
               what, chain_in, tap_in, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      chain_in = v[0];
      tap_in   = v[4:1];
      #1;
      check(y_wire, chain_in, "wire");
      // taps 1 and 3 selected
      check(y_xor2, (tap_in[1] != tap_in[3]) ? !chain_in : chain_in, "xor taps 1,3");
      // tap 4 selected, then inverted
      check(y_xnor, (chain_in == tap_in[4]) ? 1'b1 : 1'b0, "xnor tap 4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
