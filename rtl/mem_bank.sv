// mem_bank: one memory bank of the partitioned array, as an FPGA block RAM.
//
// One write port and one read port, both synchronous to clk. A read returns
// the word at raddr on rdata in the cycle after re is high; rdata holds its
// value while re is low. A read and a write of the same address in the same
// cycle return the old word (read-first). The array has no reset, like a
// block RAM; a word must be written before it is read. The method only
// calls for separate banks that can be read in parallel; the port set,
// latency and collision rule are this design's choice.
module mem_bank #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 691200,  // ceil(1920/3)*1080 words
  localparam int unsigned A_W   = reuse_pkg::idx_w(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [A_W-1:0]    waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [A_W-1:0]    raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
