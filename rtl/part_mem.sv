// part_mem: the array A partitioned over N memory banks.
//
// Each element A[x0][x1] lives in bank B(x) = (alpha . x) % N at offset F(x)
// (see bank_mapper). The host loads the array through one write port that
// takes array coordinates and maps them; the consumer reads through one
// read port per bank, already addressed by offset, so that N elements in N
// different banks are read in the same cycle. Read data appear one cycle
// after the request (mem_bank). With alpha = (1,0) the offset is
// F(x) = (x0/N)*W1 + x1 and bank b is sized to exactly the rows it holds,
// ceil((W0-b)/N)*W1 words, so no storage is wasted whatever W0 and N are
// (at the default 1920 rows and N = 3 every bank has 640 rows, 691200
// words). Offsets and widths are shared by all banks and sized for the
// largest one. The mapping follows the method; the host write port is this
// design's own way of loading the array.
module part_mem #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned W0     = 1920,
  parameter int unsigned W1     = 1080,
  parameter int unsigned N      = 3,
  parameter int unsigned ALPHA0 = 1,
  parameter int unsigned ALPHA1 = 0,
  localparam int unsigned X0_W  = reuse_pkg::idx_w(W0),
  localparam int unsigned X1_W  = reuse_pkg::idx_w(W1),
  localparam int unsigned DEPTH = 32'(reuse_pkg::bank_depth(W0, W1, N, ALPHA0, ALPHA1)),
  localparam int unsigned OFF_W = reuse_pkg::idx_w(DEPTH),
  localparam int unsigned B_W   = reuse_pkg::idx_w(N)
) (
  input  logic                        clk,
  // host write port, array coordinates
  input  logic                        wr_en,
  input  logic [X0_W-1:0]             wr_x0,
  input  logic [X1_W-1:0]             wr_x1,
  input  logic [DATA_W-1:0]           wr_data,
  // one read port per bank, intra-bank offsets
  input  logic [N-1:0]                rd_en,
  input  logic [N-1:0][OFF_W-1:0]     rd_off,
  output logic [N-1:0][DATA_W-1:0]    rd_data
);

  logic [B_W-1:0]   wr_bank;
  logic [OFF_W-1:0] wr_off;

  bank_mapper #(.W0(W0), .W1(W1), .N(N), .ALPHA0(ALPHA0), .ALPHA1(ALPHA1)) u_wmap (
    .x0(wr_x0), .x1(wr_x1), .bank(wr_bank), .offset(wr_off)
  );

  for (genvar b = 0; b < N; b++) begin : g_bank
    localparam int unsigned BDEPTH = 32'(reuse_pkg::bank_depth_of(W0, W1, N, ALPHA0, ALPHA1, b));
    logic [reuse_pkg::idx_w(BDEPTH)-1:0] waddr, raddr;

    assign waddr = $bits(waddr)'(wr_off);
    assign raddr = $bits(raddr)'(rd_off[b]);

    mem_bank #(.DATA_W(DATA_W), .DEPTH(BDEPTH)) u_bank (
      .clk  (clk),
      .we   (wr_en && (32'(wr_bank) == b)),
      .waddr(waddr),
      .wdata(wr_data),
      .re   (rd_en[b]),
      .raddr(raddr),
      .rdata(rd_data[b])
    );
  end

endmodule
