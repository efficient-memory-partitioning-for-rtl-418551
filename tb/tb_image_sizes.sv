// tb_image_sizes: runs the data-reuse memory system over whole images of
// the five standard sizes SD 720x480, HD 1280x720, full HD 1920x1080,
// WQXGA 2560x1600 and 4K 3840x2160 (first index the longer side, as in the
// 1920x1080 default), each with the 8-reference pattern (3 banks, where
// 1280 and 2560 rows do not divide evenly among the banks) and with the
// 13-reference LOG pattern (5 banks). Every window of every sweep is
// checked (see stencil_harness), and the banks must hold exactly the
// image's words, with no padding. A watchdog ends the run if it hangs.
module tb_image_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 10;
  logic [NB-1:0] fin;
  int unsigned ch [NB];
  int unsigned fl [NB];

  bench_run #(.W0(720), .W1(480), .PATTERN(reuse_pkg::P_EXAMPLE), .EXP_BANKS(3), .NAME("P8_SD")) u0 (clk, fin[0], ch[0], fl[0]);
  bench_run #(.W0(1280), .W1(720), .PATTERN(reuse_pkg::P_EXAMPLE), .EXP_BANKS(3), .NAME("P8_HD")) u1 (clk, fin[1], ch[1], fl[1]);
  bench_run #(.W0(1920), .W1(1080), .PATTERN(reuse_pkg::P_EXAMPLE), .EXP_BANKS(3), .NAME("P8_FHD")) u2 (clk, fin[2], ch[2], fl[2]);
  bench_run #(.W0(2560), .W1(1600), .PATTERN(reuse_pkg::P_EXAMPLE), .EXP_BANKS(3), .NAME("P8_WQXGA")) u3 (clk, fin[3], ch[3], fl[3]);
  bench_run #(.W0(3840), .W1(2160), .PATTERN(reuse_pkg::P_EXAMPLE), .EXP_BANKS(3), .NAME("P8_4K")) u4 (clk, fin[4], ch[4], fl[4]);
  bench_run #(.W0(720), .W1(480), .PATTERN(reuse_pkg::P_LOG), .EXP_BANKS(5), .NAME("LOG_SD")) u5 (clk, fin[5], ch[5], fl[5]);
  bench_run #(.W0(1280), .W1(720), .PATTERN(reuse_pkg::P_LOG), .EXP_BANKS(5), .NAME("LOG_HD")) u6 (clk, fin[6], ch[6], fl[6]);
  bench_run #(.W0(1920), .W1(1080), .PATTERN(reuse_pkg::P_LOG), .EXP_BANKS(5), .NAME("LOG_FHD")) u7 (clk, fin[7], ch[7], fl[7]);
  bench_run #(.W0(2560), .W1(1600), .PATTERN(reuse_pkg::P_LOG), .EXP_BANKS(5), .NAME("LOG_WQXGA")) u8 (clk, fin[8], ch[8], fl[8]);
  bench_run #(.W0(3840), .W1(2160), .PATTERN(reuse_pkg::P_LOG), .EXP_BANKS(5), .NAME("LOG_4K")) u9 (clk, fin[9], ch[9], fl[9]);

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
    repeat (17_000_000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NB; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
