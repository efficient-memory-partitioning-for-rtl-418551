// bank_mapper: bank index and intra-bank offset of one element of a
// partitioned 2-D array.
//
// Bank mapping follows the linear scheme B(x) = (alpha . x) % N. The offset
// F(x) follows the revised padding method: the dimensions whose alpha
// component is non-zero are ordered first (k of them) and the last of those,
// dimension k-1, is the one divided by N. For a 2-D array this gives
//   alpha = (a0, 0) : k = 1, F = floor(x0/N)*W1 + x1      (no padding when N | W0)
//   alpha = (0, a1) : k = 1, F = floor(x1/N)*W0 + x0
//   alpha = (a0,a1) : k = 2, F = x0*ceil(W1/N) + floor(x1/N) (classic padding)
// Two elements then share a (bank, offset) pair only if they are equal, given
// that the non-zero alpha component of the divided dimension is coprime to N
// (the caller's choice of alpha must respect this; it holds for alpha=(1,0),
// the vector the data-reuse method always produces).
//
// Interface: x0/x1 in, bank/offset out, purely combinational (no clock).
// The division and modulo are by the constant N, so synthesis reduces them
// to constant arithmetic.
module bank_mapper #(
  parameter int unsigned W0     = 1920,  // extent of dimension 0
  parameter int unsigned W1     = 1080,  // extent of dimension 1
  parameter int unsigned N      = 3,     // partition factor (number of banks)
  parameter int unsigned ALPHA0 = 1,     // partition vector, component 0
  parameter int unsigned ALPHA1 = 0,     // partition vector, component 1
  localparam int unsigned X0_W  = reuse_pkg::idx_w(W0),
  localparam int unsigned X1_W  = reuse_pkg::idx_w(W1),
  localparam int unsigned B_W   = reuse_pkg::idx_w(N),
  localparam int unsigned DEPTH = 32'(reuse_pkg::bank_depth(W0, W1, N, ALPHA0, ALPHA1)),
  localparam int unsigned OFF_W = reuse_pkg::idx_w(DEPTH)
) (
  input  logic [X0_W-1:0]  x0,
  input  logic [X1_W-1:0]  x1,
  output logic [B_W-1:0]   bank,
  output logic [OFF_W-1:0] offset
);

  localparam int unsigned W1_PAD = (W1 + N - 1) / N;  // ceil(W1/N)

  logic [63:0] lin;   // alpha . x

  always_comb begin
    lin = 64'(ALPHA0) * 64'(x0) + 64'(ALPHA1) * 64'(x1);
    if (ALPHA1 == 0)
      offset = OFF_W'((64'(x0) / 64'(N)) * 64'(W1) + 64'(x1));
    else if (ALPHA0 == 0)
      offset = OFF_W'((64'(x1) / 64'(N)) * 64'(W0) + 64'(x0));
    else
      offset = OFF_W'(64'(x0) * 64'(W1_PAD) + 64'(x1) / 64'(N));
    bank = B_W'(lin % 64'(N));
  end

  // The alpha component of the divided dimension must be coprime to N, or
  // two elements would share a bank and an offset.
  initial begin
    assert (N >= 1 && (ALPHA0 != 0 || ALPHA1 != 0))
      else $error("bank_mapper: N must be positive and alpha non-zero");
    assert (reuse_pkg::gcd((ALPHA1 == 0) ? ALPHA0 : ALPHA1, N) == 1)
      else $error("bank_mapper: alpha=(%0d,%0d) is not conflict-free for N=%0d", ALPHA0, ALPHA1, N);
  end

endmodule
