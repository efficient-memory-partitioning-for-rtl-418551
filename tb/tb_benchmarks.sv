// tb_benchmarks: runs the eight benchmark access patterns (BICUBIC,
// DENOISE, MOTION_LH, DECONV, PREWITT, SOBEL, LOG, CANNY) through the
// data-reuse memory system on a full-HD 1920 x 1080 array of 32-bit words,
// one design instance per pattern running side by side. Each run checks
// every window of the complete sweep (see stencil_harness) and that the
// bank count is the one the method gives for the pattern: 3, 3, 1, 3, 3, 3,
// 5, 5. A watchdog ends the run if it hangs.
module tb_benchmarks;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 8;
  logic [NB-1:0] fin;
  int unsigned ch [NB];
  int unsigned fl [NB];

  bench_run #(.PATTERN(reuse_pkg::P_BICUBIC),   .EXP_BANKS(3), .NAME("BICUBIC"))   u0 (clk, fin[0], ch[0], fl[0]);
  bench_run #(.PATTERN(reuse_pkg::P_DENOISE),   .EXP_BANKS(3), .NAME("DENOISE"))   u1 (clk, fin[1], ch[1], fl[1]);
  bench_run #(.PATTERN(reuse_pkg::P_MOTION_LH), .EXP_BANKS(1), .NAME("MOTION_LH")) u2 (clk, fin[2], ch[2], fl[2]);
  bench_run #(.PATTERN(reuse_pkg::P_DECONV),    .EXP_BANKS(3), .NAME("DECONV"))    u3 (clk, fin[3], ch[3], fl[3]);
  bench_run #(.PATTERN(reuse_pkg::P_PREWITT),   .EXP_BANKS(3), .NAME("PREWITT"))   u4 (clk, fin[4], ch[4], fl[4]);
  bench_run #(.PATTERN(reuse_pkg::P_SOBEL),     .EXP_BANKS(3), .NAME("SOBEL"))     u5 (clk, fin[5], ch[5], fl[5]);
  bench_run #(.PATTERN(reuse_pkg::P_LOG),       .EXP_BANKS(5), .NAME("LOG"))       u6 (clk, fin[6], ch[6], fl[6]);
  bench_run #(.PATTERN(reuse_pkg::P_CANNY),     .EXP_BANKS(5), .NAME("CANNY"))     u7 (clk, fin[7], ch[7], fl[7]);

  initial begin
    int unsigned checks, failures;
    repeat (2) @(posedge clk);
    wait (&fin);
    checks = 0; failures = 0;
    for (int i = 0; i < NB; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned checks, failures;
    repeat (4_400_000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NB; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
