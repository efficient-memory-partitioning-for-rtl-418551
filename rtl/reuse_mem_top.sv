// reuse_mem_top: memory system that feeds a pipelined 2-D stencil loop one
// complete access window per clock cycle from partitioned on-chip memory,
// using register chains to reuse data between iterations.
//
// The loop body reads A[i0+r][i1+c] for each offset (r,c) of PATTERN
// (default: the eight neighbours of A[i0+1][i1+1] in a 1920x1080 array).
// Because the inner loop moves by delta=(0,1), the element a row's
// right-most reference (its head) reads in one iteration is the one the
// reference k columns to its left needs k iterations later. So only the
// heads go to memory, one per used pattern row, and each row's reuse_chain
// delays the head element to serve the rest of the row. The heads of one
// iteration lie in distinct rows i0+r, so the partition vector alpha=(1,0)
// with B(x) = x0 % N puts them in distinct banks whenever no two used row
// offsets are congruent modulo N; N defaults to the smallest such value
// (3 for the default pattern instead of one bank per reference). With
// alpha=(1,0) the revised padding offset is F(x) = (x0/N)*W1 + x1, and each
// bank is sized to exactly the rows it holds, so no storage is wasted.
//
// Taken from the method: the head-only memory reads, the register reuse
// chains, alpha=(1,0) with the bank counts it yields, and the offset rule.
// This design's own choices: the block split, the one-cycle bank latency,
// the start/busy/done and host-write interfaces, and the per-row warm-up
// that refills the chains at the start of every outer iteration.
//
// Blocks: access_ctrl (loop sweep, head coordinates) -> one bank_mapper per
// row (bank, offset) -> bank_xbar -> part_mem (N mem_bank) -> bank_xbar ->
// one reuse_chain per row -> win_data.
//
// Interface: load A through wr_* (array coordinates), then pulse start.
// busy is high while the sweep runs; win_valid marks a cycle whose win_data
// holds the window of iteration (win_i0, win_i1): win_data[r][c] =
// A[win_i0+r][win_i1+c] where PATTERN[r][c] is set, 0 elsewhere. Windows
// come out in loop order, one per cycle, except for PC-1 warm-up cycles at
// the start of every outer iteration; the first window appears 1+PC cycles
// after start (one cycle to leave idle, PC-1 warm-up steps, one cycle of
// bank read latency). done pulses with the last window. The host must not
// write while a sweep runs. bank_reads shows which banks were read in a
// cycle. Synchronous active-low reset.
module reuse_mem_top #(
  parameter int unsigned         W0      = 1920,
  parameter int unsigned         W1      = 1080,
  parameter int unsigned         DATA_W  = 32,
  parameter reuse_pkg::pattern_t PATTERN = reuse_pkg::P_EXAMPLE,
  parameter int unsigned         N       = reuse_pkg::min_banks(PATTERN),
  localparam int unsigned        PR      = reuse_pkg::pat_height(PATTERN),
  localparam int unsigned        PC      = reuse_pkg::pat_width(PATTERN),
  localparam int unsigned        X0_W    = reuse_pkg::idx_w(W0),
  localparam int unsigned        X1_W    = reuse_pkg::idx_w(W1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               wr_en,
  input  logic [X0_W-1:0]                    wr_x0,
  input  logic [X1_W-1:0]                    wr_x1,
  input  logic [DATA_W-1:0]                  wr_data,
  input  logic                               start,
  output logic                               busy,
  output logic                               done,
  output logic                               win_valid,
  output logic [X0_W-1:0]                    win_i0,
  output logic [X1_W-1:0]                    win_i1,
  output logic [PR-1:0][PC-1:0][DATA_W-1:0]  win_data,
  output logic [N-1:0]                       bank_reads
);

  localparam int unsigned ALPHA0 = 1;   // partition vector alpha = (1,0)
  localparam int unsigned ALPHA1 = 0;
  localparam int unsigned DEPTH  = 32'(reuse_pkg::bank_depth(W0, W1, N, ALPHA0, ALPHA1));
  localparam int unsigned OFF_W  = reuse_pkg::idx_w(DEPTH);
  localparam int unsigned B_W    = reuse_pkg::idx_w(N);

  // ---- loop controller -------------------------------------------------
  logic                    step_valid, step_win, step_last;
  logic [X0_W-1:0]         step_i0;
  logic [X1_W-1:0]         step_i1;
  logic [PR-1:0]           req_valid;
  logic [PR-1:0][X0_W-1:0] req_x0;
  logic [PR-1:0][X1_W-1:0] req_x1;

  access_ctrl #(.W0(W0), .W1(W1), .PATTERN(PATTERN)) u_ctrl (
    .clk, .rst_n, .start, .busy,
    .step_valid, .step_win, .step_last, .step_i0, .step_i1,
    .req_valid, .req_x0, .req_x1
  );

  // ---- bank mapping of each row's head -----------------------------------
  logic [PR-1:0][B_W-1:0]   req_bank;
  logic [PR-1:0][OFF_W-1:0] req_off;

  for (genvar r = 0; r < PR; r++) begin : g_map
    bank_mapper #(.W0(W0), .W1(W1), .N(N), .ALPHA0(ALPHA0), .ALPHA1(ALPHA1)) u_map (
      .x0(req_x0[r]), .x1(req_x1[r]), .bank(req_bank[r]), .offset(req_off[r])
    );
  end

  // ---- crossbar and banks ------------------------------------------------
  logic [N-1:0]              bank_re;
  logic [N-1:0][OFF_W-1:0]   bank_off;
  logic [N-1:0][DATA_W-1:0]  bank_rdata;
  logic [PR-1:0][DATA_W-1:0] row_data;

  bank_xbar #(.NR(PR), .N(N), .OFF_W(OFF_W), .DATA_W(DATA_W)) u_xbar (
    .clk, .rst_n, .req_valid, .req_bank, .req_off,
    .bank_re, .bank_off, .bank_rdata, .row_data
  );

  part_mem #(.DATA_W(DATA_W), .W0(W0), .W1(W1), .N(N), .ALPHA0(ALPHA0), .ALPHA1(ALPHA1)) u_mem (
    .clk, .wr_en, .wr_x0, .wr_x1, .wr_data,
    .rd_en(bank_re), .rd_off(bank_off), .rd_data(bank_rdata)
  );

  assign bank_reads = bank_re;

  // ---- step information delayed by the bank read latency ------------------
  logic shift_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shift_q   <= 1'b0;
      win_valid <= 1'b0;
      done      <= 1'b0;
      win_i0    <= '0;
      win_i1    <= '0;
    end else begin
      shift_q   <= step_valid;
      win_valid <= step_win;
      done      <= step_last;
      win_i0    <= step_i0;
      win_i1    <= step_i1;
    end
  end

  // ---- reuse chains and window assembly ---------------------------------
  for (genvar r = 0; r < PR; r++) begin : g_row
    localparam int unsigned LEN  = reuse_pkg::row_len(PATTERN, r);
    localparam int unsigned CMAX = reuse_pkg::row_cmax(PATTERN, r);
    logic [LEN:0][DATA_W-1:0] tap;

    reuse_chain #(.DATA_W(DATA_W), .LEN(LEN)) u_chain (
      .clk, .rst_n, .shift(shift_q), .din(row_data[r]), .tap
    );

    for (genvar c = 0; c < PC; c++) begin : g_col
      if (PATTERN[r][c]) begin : g_ref
        assign win_data[r][c] = tap[CMAX - c];
      end else begin : g_none
        assign win_data[r][c] = '0;
      end
    end
  end

  // ---- elaboration checks -----------------------------------------------
  initial begin
    for (int unsigned a = 0; a < PR; a++)
      for (int unsigned b = a + 1; b < PR; b++)
        assert (!(reuse_pkg::row_used(PATTERN, a) && reuse_pkg::row_used(PATTERN, b) && ((b - a) % N == 0)))
          else $error("reuse_mem_top: N=%0d maps pattern rows %0d and %0d to one bank", N, a, b);
  end

  a_no_write_in_sweep : assert property (@(posedge clk) disable iff (!rst_n) !(busy && wr_en))
    else $error("reuse_mem_top: host write during a sweep");

endmodule
