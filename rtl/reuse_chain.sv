// reuse_chain: register chain that lets one memory read serve several
// references of a loop iteration.
//
// The element read for a row's head reference enters at din. With move
// delta=(0,1), the reference LAMBDA columns to the left of the head needs
// the same element LAMBDA iterations later, so the chain is a shift register
// of LEN stages advanced once per iteration (shift high). tap[0] is din
// itself and tap[k] is the value din had k shifts ago, for k = 1..LEN, so a
// reference at reuse distance k is wired to tap[k]. Stages between two
// references are kept even when no reference reads them, as the distance in
// iterations fixes how many registers the data must pass through.
//
// LEN may be 0 (a row with a single reference): the chain is then a wire.
// Registers are cleared by the synchronous active-low reset (a choice of
// this design; the chain structure itself follows the method).
module reuse_chain #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned LEN    = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       shift,
  input  logic [DATA_W-1:0]          din,
  output logic [LEN:0][DATA_W-1:0]   tap
);

  if (LEN == 0) begin : g_wire
    assign tap = din;
  end else begin : g_regs
    logic [LEN-1:0][DATA_W-1:0] q;   // q[k] is din delayed by k+1 shifts

    always_ff @(posedge clk) begin
      if (!rst_n) q <= '0;
      else if (shift) begin
        q[0] <= din;
        for (int unsigned k = 1; k < LEN; k++) q[k] <= q[k-1];
      end
    end

    assign tap = {q, din};
  end

endmodule
