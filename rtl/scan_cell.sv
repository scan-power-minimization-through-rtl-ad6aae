// scan_cell: mux-D scan flip-flop, the storage element of the scan chain.
//
// When scan enable `se` is high the cell loads its scan-path input `si`
// (shift); when it is low it loads the functional input `d` (capture, and
// normal mission-mode operation). The output `q` feeds both the core logic
// and the scan path towards the next cell.
//
// Timing: one rising-edge register. `rst_n` is an asynchronous, active-low
// clear to 0. The scan-cell structure and the reset are choices of this
// design; the gate-insertion scheme only requires that the functional
// input reaches the flip-flop without passing any inserted scan-path gate.
module scan_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic se,   // 1: shift from si, 0: capture d
  input  logic d,    // functional data (captured response)
  input  logic si,   // scan-path data (possibly transformed by an inserted gate)
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (se) q <= si;
    else         q <= d;
  end

endmodule
