// scan_xor_gate: the logic inserted on the scan path in front of one scan cell.
//
// The output is the chain input (the previous cell's output, or scan-in for
// the first cell) XORed with every tap selected by TAP_MASK, and then
// complemented when INVERT is set. Tap input `tap_in[d]` carries the value
// seen d cells further upstream than the chain input: `tap_in[d]` is the
// output of the cell that lies d cells before the previous cell, with the
// scan-in pin counted as cell 0. A gate with m selected taps adds the bands
// B_s^{d_1} ... B_s^{d_m} to the stimulus transformation of the chain
// (s being the index of the cell it feeds). An all-zero mask with INVERT=0
// degenerates to a plain wire.
//
// Purely combinational: it sits between two flip-flops of the scan path and
// never on the functional path.
module scan_xor_gate #(
  parameter int unsigned        W        = 4,       // number of tap positions offered
  parameter logic [W:1]         TAP_MASK = '0,      // bit d set: tap d cells back is used
  parameter bit                 INVERT   = 1'b0     // inverter after the XOR
) (
  input  logic         chain_in,
  input  logic [W:1]   tap_in,
  output logic         scan_out
);

  always_comb begin
    scan_out = chain_in ^ (^(tap_in & TAP_MASK)) ^ INVERT;
  end

endmodule
