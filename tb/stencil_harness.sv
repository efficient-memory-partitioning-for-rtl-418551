// stencil_harness: drives and checks one reuse_mem_top through complete
// sweeps of its loop nest.
//
// It loads every element of the W0 x W1 array A with a value computed from
// its coordinates (elem(x0,x1), below), pulses start, and then checks every
// window the design delivers against the reference loop nest:
//   - windows arrive in loop order (i0 outer, i1 inner), one per iteration;
//   - win_data[r][c] == elem(i0+r, i1+c) for each referenced (r,c), 0 else;
//   - the first window is presented in the (PC+1)-th cycle after the cycle
//     in which start is high, and done with the last window in the
//     ((W0-PR+1)*W1+1)-th; the monitor samples at the clock edge that ends
//     a cycle, so it sees these one edge later (PC+2, (W0-PR+1)*W1+2);
//   - no more than one head read per used pattern row in any cycle, and the
//     total bank reads equal the head reads of the loop nest, fewer than one
//     read per reference.
// It also counts how often the design's mechanisms occur (references served
// from reuse-chain registers, warm-up steps, each bank-rotation phase i0 % N,
// cycles reading several banks at once) and counts a failure for any that
// never occurred. RUNS sweeps are run back to back. The reference values are
// worked out here from the loop nest alone, not from the design.
module stencil_harness #(
  parameter int unsigned         W0      = 1920,
  parameter int unsigned         W1      = 1080,
  parameter int unsigned         DATA_W  = 32,
  parameter reuse_pkg::pattern_t PATTERN = reuse_pkg::P_EXAMPLE,
  parameter int unsigned         N       = reuse_pkg::min_banks(PATTERN),
  parameter int unsigned         RUNS    = 1,
  parameter int unsigned         SEED    = 1,
  localparam int unsigned        PR      = reuse_pkg::pat_height(PATTERN),
  localparam int unsigned        PC      = reuse_pkg::pat_width(PATTERN),
  localparam int unsigned        X0_W    = reuse_pkg::idx_w(W0),
  localparam int unsigned        X1_W    = reuse_pkg::idx_w(W1)
) (
  input  logic                               clk,
  output logic                               rst_n,
  output logic                               wr_en,
  output logic [X0_W-1:0]                    wr_x0,
  output logic [X1_W-1:0]                    wr_x1,
  output logic [DATA_W-1:0]                  wr_data,
  output logic                               start,
  input  logic                               busy,
  input  logic                               done,
  input  logic                               win_valid,
  input  logic [X0_W-1:0]                    win_i0,
  input  logic [X1_W-1:0]                    win_i1,
  input  logic [PR-1:0][PC-1:0][DATA_W-1:0]  win_data,
  input  logic [N-1:0]                       bank_reads,
  output logic                               finished,
  output int unsigned                        checks,
  output int unsigned                        failures
);

  localparam int unsigned I0 = W0 - PR + 1;
  localparam int unsigned I1 = W1 - PC + 1;

  function automatic logic [DATA_W-1:0] elem(input int unsigned x0, input int unsigned x1);
    logic [63:0] h;
    h = 64'(x0) * 64'h9E3779B97F4A7C15 ^ (64'(x1) + 64'(SEED)) * 64'hC2B2AE3D27D4EB4F;
    h = h ^ (h >> 29);
    return DATA_W'(h);
  endfunction

  function automatic int unsigned head_reads_per_row();
    int unsigned n;
    n = 0;
    for (int unsigned r = 0; r < PR; r++)
      if (reuse_pkg::row_used(PATTERN, r))
        n += W1 - (PC - 1 - reuse_pkg::row_cmax(PATTERN, r));
    return n;
  endfunction

  longint unsigned cyc;
  always_ff @(posedge clk) cyc <= cyc + 1;
  initial cyc = 0;

  // monitor state
  bit              in_sweep;
  int unsigned     e0, e1, nwin;
  longint unsigned t_start;
  longint unsigned n_reads, n_reused, n_warm, n_multi;
  bit [reuse_pkg::MAXR-1:0] phase_seen;
  int unsigned     run_no;

  task automatic fail(input string msg);
    failures++;
    if (failures <= 10) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // ---- stimulus ----------------------------------------------------------
  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_x0 = '0; wr_x1 = '0; wr_data = '0; start = 1'b0;
    finished = 1'b0; checks = 0; failures = 0; in_sweep = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int unsigned x0 = 0; x0 < W0; x0++)
      for (int unsigned x1 = 0; x1 < W1; x1++) begin
        wr_en   <= 1'b1;
        wr_x0   <= X0_W'(x0);
        wr_x1   <= X1_W'(x1);
        wr_data <= elem(x0, x1);
        @(posedge clk);
      end
    wr_en <= 1'b0;
    @(posedge clk);
    for (run_no = 0; run_no < RUNS; run_no++) begin
      e0 = 0; e1 = 0; nwin = 0; n_reads = 0; n_reused = 0; n_warm = 0; n_multi = 0;
      phase_seen = '0;
      start   <= 1'b1;
      t_start  = cyc;
      in_sweep = 1'b1;
      @(posedge clk);
      start <= 1'b0;
      while (in_sweep) @(posedge clk);
      // per-sweep totals
      checks++;
      if (nwin != I0 * I1) fail($sformatf("%0d windows, expected %0d", nwin, I0 * I1));
      checks++;
      if (n_reads != longint'(I0) * head_reads_per_row())
        fail($sformatf("%0d bank reads, expected %0d", n_reads, longint'(I0) * head_reads_per_row()));
      checks++;
      if (n_reads >= longint'(I0) * I1 * reuse_pkg::num_refs(PATTERN) && reuse_pkg::num_refs(PATTERN) > reuse_pkg::num_rows_used(PATTERN))
        fail("reuse did not reduce the number of memory reads");
      // mechanisms
      checks++;
      if (reuse_pkg::num_refs(PATTERN) > reuse_pkg::num_rows_used(PATTERN) && n_reused == 0)
        fail("no reference was ever served by a reuse chain");
      checks++;
      if (PC > 1 && n_warm == 0) fail("no chain warm-up step seen");
      checks++;
      if (N > 1 && reuse_pkg::num_rows_used(PATTERN) > 1 && n_multi == 0)
        fail("no cycle read several banks in parallel");
      for (int unsigned p = 0; p < N && p < I0; p++) begin
        checks++;
        if (!phase_seen[p]) fail($sformatf("bank rotation phase %0d never seen", p));
      end
      $display("sweep %0d: %0d windows, %0d bank reads for %0d references, %0d reused, %0d warm-up steps, %0d multi-bank cycles",
               run_no, nwin, n_reads, longint'(nwin) * reuse_pkg::num_refs(PATTERN), n_reused, n_warm, n_multi);
      repeat (2) @(posedge clk);
    end
    finished = 1'b1;
  end

  // ---- monitor -----------------------------------------------------------
  always @(posedge clk) if (rst_n && in_sweep) begin
    int unsigned pc;
    pc = $countones(bank_reads);
    n_reads += pc;
    if (pc > 1) n_multi++;
    if (pc > reuse_pkg::num_rows_used(PATTERN)) fail($sformatf("%0d bank reads in one cycle", pc));
    if (busy && cyc > t_start + 1 && !win_valid && !done) n_warm++;
    if (win_valid) begin
      bit bad;
      if (nwin == 0) begin
        checks++;
        if (cyc != t_start + PC + 2)
          fail($sformatf("first window after %0d cycles, expected %0d", cyc - t_start, PC + 2));
      end
      checks++;
      if (32'(win_i0) != e0 || 32'(win_i1) != e1)
        fail($sformatf("window (%0d,%0d), expected (%0d,%0d)", win_i0, win_i1, e0, e1));
      // one check per window: every reference of the window must match
      checks++;
      bad = 1'b0;
      for (int unsigned r = 0; r < PR; r++)
        for (int unsigned c = 0; c < PC; c++) begin
          logic [DATA_W-1:0] exp;
          exp = PATTERN[r][c] ? elem(e0 + r, e1 + c) : '0;
          if (win_data[r][c] !== exp) begin
            if (!bad && failures < 10)
              $display("  iteration (%0d,%0d) ref (%0d,%0d): got %h expected %h",
                       e0, e1, r, c, win_data[r][c], exp);
            bad = 1'b1;
          end
          if (PATTERN[r][c] && c != reuse_pkg::row_cmax(PATTERN, r)) n_reused++;
        end
      if (bad) fail($sformatf("wrong data in window (%0d,%0d)", e0, e1));
      phase_seen[e0 % N] = 1'b1;
      nwin++;
      if (e1 == I1 - 1) begin e1 = 0; e0++; end
      else e1++;
    end
    if (done) begin
      checks++;
      if (cyc != t_start + longint'(I0) * W1 + 2)
        fail($sformatf("done after %0d cycles, expected %0d", cyc - t_start, longint'(I0) * W1 + 2));
      checks++;
      if (!win_valid) fail("done without the last window");
      in_sweep = 1'b0;
    end
  end

endmodule
