// bank_xbar: routes the head reads of the pattern rows to the memory banks
// and the read data back.
//
// In every iteration each used pattern row r asks for one element (its
// head), in bank req_bank[r] at offset req_off[r]. The bank mapping
// guarantees that the requests of one iteration hit distinct banks, so the
// crossbar needs no arbitration: bank b is driven by the one row that names
// it, and is idle if none does. The banks answer one cycle later, so the
// bank each row asked is registered and selects that row's row_data in the
// next cycle. An assertion checks the distinct-bank guarantee.
//
// The routing itself is not spelled out by the method, only the rule that
// the references of one iteration lie in distinct banks; this crossbar is
// the simplest structure that uses that rule.
//
// Timing: requests to bank ports combinational; row_data valid one cycle
// after the request, aligned with the bank's rdata.
module bank_xbar #(
  parameter int unsigned NR     = 3,       // pattern rows
  parameter int unsigned N      = 3,       // banks
  parameter int unsigned OFF_W  = 20,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned B_W   = reuse_pkg::idx_w(N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NR-1:0]              req_valid,
  input  logic [NR-1:0][B_W-1:0]     req_bank,
  input  logic [NR-1:0][OFF_W-1:0]   req_off,
  output logic [N-1:0]               bank_re,
  output logic [N-1:0][OFF_W-1:0]    bank_off,
  input  logic [N-1:0][DATA_W-1:0]   bank_rdata,
  output logic [NR-1:0][DATA_W-1:0]  row_data
);

  logic [NR-1:0][B_W-1:0] sel_q;

  always_comb begin
    bank_re  = '0;
    bank_off = '0;
    for (int unsigned r = 0; r < NR; r++)
      if (req_valid[r] && (32'(req_bank[r]) < N)) begin
        bank_re[req_bank[r]]  = 1'b1;
        bank_off[req_bank[r]] = req_off[r];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sel_q <= '0;
    else        sel_q <= req_bank;
  end

  always_comb
    for (int unsigned r = 0; r < NR; r++)
      row_data[r] = (32'(sel_q[r]) < N) ? bank_rdata[sel_q[r]] : '0;

  // The bank mapping must never send two requests of one cycle to one bank.
  for (genvar a = 0; a < NR; a++) begin : g_chk_a
    for (genvar b = a + 1; b < NR; b++) begin : g_chk_b
      a_no_conflict : assert property (@(posedge clk) disable iff (!rst_n)
        !(req_valid[a] && req_valid[b] && req_bank[a] == req_bank[b]))
        else $error("bank_xbar: rows %0d and %0d request bank %0d together", a, b, req_bank[a]);
    end
  end

endmodule
