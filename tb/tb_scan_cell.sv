// tb_scan_cell: self-checking test of the mux-D scan flip-flop.
// Checks asynchronous clear, shift (se=1 loads si), capture (se=0 loads d)
// over random stimulus against a one-line reference, and that the output
// holds between clock edges.
module tb_scan_cell;
  logic clk = 1'b0, rst_n = 1'b0, se = 1'b0, d = 1'b0, si = 1'b0;
  logic q;
  int checks = 0, failures = 0;
  int n_shift = 0, n_capture = 0;

  scan_cell dut (.clk, .rst_n, .se, .d, .si, .q);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    // clear while clock runs
    repeat (2) @(negedge clk);
    check(q, 1'b0, "reset value");
    rst_n = 1'b1;
    exp = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      se = 1'($urandom);
      d  = 1'($urandom);
      si = 1'($urandom);
      exp = se ? si : d;
      if (se) n_shift++; else n_capture++;
      @(posedge clk);
      #1;
      check(q, exp, se ? "shift" : "capture");
      // change inputs mid-cycle: output must hold
      #2 d = ~d; si = ~si;
      #1 check(q, exp, "hold");
    end
    // asynchronous clear in the middle of a cycle
    @(negedge clk);
    se = 1'b1; si = 1'b1;
    @(posedge clk); #1 check(q, 1'b1, "set before clear");
    #2 rst_n = 1'b0;
    #1 check(q, 1'b0, "asynchronous clear");
    checks++;
    if (n_shift == 0 || n_capture == 0) begin
      failures++;
      $display("FAIL shift or capture never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
