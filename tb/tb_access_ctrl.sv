// tb_access_ctrl: checks the loop controller on a 6 x 7 array with the
// DENOISE pattern (rows whose heads sit in different columns: 1, 2, 1).
// A reference model steps through the same sweep: outer index i0 over
// 0..3, column j over 0..6; for every step it expects, per row r, a head
// read at (i0+r, j-2+cmax_r) whenever that column is not negative, a
// completed iteration (i0, j-2) from j = 2 on, and step_last on the final
// step. The sweep must take exactly 4*7 cycles and busy must fall after it.
module tb_access_ctrl;
  localparam int unsigned W0 = 6, W1 = 7;
  localparam reuse_pkg::pattern_t P = reuse_pkg::P_DENOISE;
  localparam int unsigned PR = 3, PC = 3;
  localparam int unsigned CMAX [PR] = '{1, 2, 1};
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic rst_n, start, busy, step_valid, step_win, step_last;
  logic [2:0] step_i0;
  logic [2:0] step_i1;
  logic [PR-1:0] req_valid;
  logic [PR-1:0][2:0] req_x0;
  logic [PR-1:0][2:0] req_x1;

  access_ctrl #(.W0(W0), .W1(W1), .PATTERN(P)) u_dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !step_valid, "busy out of reset");
    for (int run = 0; run < 2; run++) begin
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i0 = 0; i0 < W0 - PR + 1; i0++)
        for (int j = 0; j < W1; j++) begin
          check(busy && step_valid, $sformatf("not busy at (%0d,%0d)", i0, j));
          check(step_win == (j >= PC - 1), $sformatf("step_win at (%0d,%0d)", i0, j));
          if (j >= PC - 1) check(step_i0 == 3'(i0) && step_i1 == 3'(j - 2), $sformatf("iteration at (%0d,%0d)", i0, j));
          check(step_last == (i0 == W0 - PR && j == W1 - 1), $sformatf("step_last at (%0d,%0d)", i0, j));
          for (int r = 0; r < PR; r++) begin
            bit v;
            v = (j - 2 + int'(CMAX[r]) >= 0);
            check(req_valid[r] == v, $sformatf("req_valid[%0d] at (%0d,%0d)", r, i0, j));
            if (v) check(req_x0[r] == 3'(i0 + r) && req_x1[r] == 3'(j - 2 + CMAX[r]),
                         $sformatf("row %0d head (%0d,%0d) at (%0d,%0d)", r, req_x0[r], req_x1[r], i0, j));
          end
          @(negedge clk);
        end
      check(!busy && !step_valid && req_valid == '0, "still busy after the sweep");
      repeat (3) @(negedge clk);
      check(!busy, "restarted without start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
