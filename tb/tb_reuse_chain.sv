// tb_reuse_chain: checks a 4-stage and a 0-stage reuse chain against a
// model of the loop: tap[k] must hold the value din had k shifts earlier,
// with random data and shift gaps, and all stages must be 0 after reset.
module tb_reuse_chain;
  localparam int unsigned DW = 32, LEN = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic rst_n, shift;
  logic [DW-1:0] din;
  logic [LEN:0][DW-1:0] tap;
  logic [0:0][DW-1:0] tap0;
  logic [DW-1:0] hist [$];

  reuse_chain #(.DATA_W(DW), .LEN(LEN)) u_dut  (.clk, .rst_n, .shift, .din, .tap);
  reuse_chain #(.DATA_W(DW), .LEN(0))   u_wire (.clk, .rst_n, .shift, .din, .tap(tap0));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    rst_n = 0; shift = 1; din = '1;
    repeat (2) @(negedge clk);
    rst_n = 1; shift = 0;
    for (int k = 1; k <= LEN; k++) check(tap[k] == '0, $sformatf("stage %0d not reset", k));
    for (int k = 0; k < LEN; k++) hist.push_front('0);
    for (int n = 0; n < 2000; n++) begin
      din   = $urandom;
      shift = ($urandom_range(3) != 0);
      #1;
      check(tap[0] == din && tap0[0] == din, "tap 0 is not din");
      for (int k = 1; k <= LEN; k++)
        check(tap[k] == hist[k-1], $sformatf("n=%0d tap %0d = %h, expected %h", n, k, tap[k], hist[k-1]));
      @(negedge clk);
      if (shift) begin hist.push_front(din); void'(hist.pop_back()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
