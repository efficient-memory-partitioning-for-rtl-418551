// tb_reuse_mem_full: one complete sweep of the design at its default size,
// a 1920 x 1080 array of 32-bit words in 3 banks with the 8-reference
// pattern: 2,073,600 host writes, then 1918 x 1078 windows, every one
// checked by stencil_harness, along with the sweep length of 1918*1080+1
// cycles. A watchdog ends the run if it hangs.
module tb_reuse_mem_full;
  localparam int unsigned PR = reuse_pkg::pat_height(reuse_pkg::P_EXAMPLE);
  localparam int unsigned PC = reuse_pkg::pat_width(reuse_pkg::P_EXAMPLE);
  localparam int unsigned N  = reuse_pkg::min_banks(reuse_pkg::P_EXAMPLE);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, wr_en, start, busy, done, win_valid, finished;
  logic [10:0] wr_x0, win_i0;
  logic [10:0] wr_x1, win_i1;
  logic [31:0] wr_data;
  logic [PR-1:0][PC-1:0][31:0] win_data;
  logic [N-1:0] bank_reads;
  int unsigned checks, failures;

  reuse_mem_top u_dut (.*);

  stencil_harness u_h (.*);

  initial begin
    repeat (2) @(posedge clk);
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_300_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
