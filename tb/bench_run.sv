// bench_run: one reuse_mem_top with a given access pattern, driven and
// checked by stencil_harness, plus a check that the bank count the design
// chose equals EXP_BANKS and that the banks together hold exactly W0*W1
// words (no storage overhead). Used by tb_benchmarks and tb_image_sizes;
// reports its check and failure counts and when it has finished.
module bench_run #(
  parameter int unsigned         W0        = 1920,
  parameter int unsigned         W1        = 1080,
  parameter reuse_pkg::pattern_t PATTERN   = reuse_pkg::P_EXAMPLE,
  parameter int unsigned         EXP_BANKS = 3,
  parameter string               NAME      = "EXAMPLE"
) (
  input  logic        clk,
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures
);
  localparam int unsigned DATA_W = 32;
  localparam int unsigned N  = reuse_pkg::min_banks(PATTERN);
  localparam int unsigned PR = reuse_pkg::pat_height(PATTERN);
  localparam int unsigned PC = reuse_pkg::pat_width(PATTERN);
  localparam int unsigned X0_W = reuse_pkg::idx_w(W0), X1_W = reuse_pkg::idx_w(W1);

  logic rst_n, wr_en, start, busy, done, win_valid, h_finished;
  logic [X0_W-1:0] wr_x0, win_i0;
  logic [X1_W-1:0] wr_x1, win_i1;
  logic [DATA_W-1:0] wr_data;
  logic [PR-1:0][PC-1:0][DATA_W-1:0] win_data;
  logic [N-1:0] bank_reads;
  int unsigned h_checks, h_failures;

  reuse_mem_top #(.W0(W0), .W1(W1), .DATA_W(DATA_W), .PATTERN(PATTERN)) u_dut (.*);

  stencil_harness #(.W0(W0), .W1(W1), .DATA_W(DATA_W), .PATTERN(PATTERN)) u_h (
    .clk, .rst_n, .wr_en, .wr_x0, .wr_x1, .wr_data, .start, .busy, .done, .win_valid,
    .win_i0, .win_i1, .win_data, .bank_reads,
    .finished(h_finished), .checks(h_checks), .failures(h_failures)
  );

  longint unsigned words;
  initial begin
    words = 0;
    for (int unsigned b = 0; b < N; b++) words += reuse_pkg::bank_depth_of(W0, W1, N, 1, 0, b);
  end

  int unsigned regs;
  always_comb begin
    regs = 0;
    for (int unsigned r = 0; r < PR; r++) regs += reuse_pkg::row_len(PATTERN, r);
  end

  assign finished = h_finished;
  assign checks   = h_checks + 2;
  assign failures = h_failures + ((N != EXP_BANKS) ? 1 : 0) + ((words != longint'(W0) * W1) ? 1 : 0);

  initial begin
    repeat (2) @(posedge clk);
    wait (h_finished);
    $display("%-10s %0dx%0d refs=%0d banks=%0d (expected %0d) bank words=%0d (array %0d) chain registers=%0d (%0d FF bits)",
             NAME, W0, W1, reuse_pkg::num_refs(PATTERN), N, EXP_BANKS, words, longint'(W0) * W1, regs, regs * DATA_W);
  end
endmodule
