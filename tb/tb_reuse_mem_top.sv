// tb_reuse_mem_top: end-to-end test of the data-reuse memory system on a
// reduced 11 x 14 array with the default 8-reference pattern (3 banks).
// stencil_harness loads the array, runs two sweeps back to back and checks
// every window, the first-window latency, the sweep length, the bank reads
// and that reuse, warm-up, parallel bank reads and every bank-rotation
// phase occur. A watchdog ends the run if it hangs.
module tb_reuse_mem_top;
  localparam int unsigned W0 = 11, W1 = 14, DATA_W = 32;
  localparam reuse_pkg::pattern_t PATTERN = reuse_pkg::P_EXAMPLE;
  localparam int unsigned N  = reuse_pkg::min_banks(PATTERN);
  localparam int unsigned PR = reuse_pkg::pat_height(PATTERN);
  localparam int unsigned PC = reuse_pkg::pat_width(PATTERN);
  localparam int unsigned X0_W = reuse_pkg::idx_w(W0), X1_W = reuse_pkg::idx_w(W1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, wr_en, start, busy, done, win_valid, finished;
  logic [X0_W-1:0] wr_x0, win_i0;
  logic [X1_W-1:0] wr_x1, win_i1;
  logic [DATA_W-1:0] wr_data;
  logic [PR-1:0][PC-1:0][DATA_W-1:0] win_data;
  logic [N-1:0] bank_reads;
  int unsigned checks, failures;

  reuse_mem_top #(.W0(W0), .W1(W1), .DATA_W(DATA_W), .PATTERN(PATTERN)) u_dut (.*);

  stencil_harness #(.W0(W0), .W1(W1), .DATA_W(DATA_W), .PATTERN(PATTERN), .RUNS(2)) u_h (.*);

  int unsigned own_checks = 0, own_failures = 0;

  initial begin
    own_checks++;
    if (N != 3) begin own_failures++; $display("FAIL: %0d banks, expected 3", N); end
    repeat (2) @(posedge clk);
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks + own_checks, failures + own_failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + own_checks, failures + own_failures + 1);
    $finish;
  end
endmodule
