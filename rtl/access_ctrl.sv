// access_ctrl: loop-pipeline controller of the data-reuse memory system.
//
// It runs the loop nest
//   for (i0 = 0; i0 < W0-PR+1; i0++) for (i1 = 0; i1 < W1-PC+1; i1++) body
// whose body reads A[i0+r][i1+c] for every (r,c) of PATTERN, at one step
// per clock cycle with the move delta=(0,1). Only the head of each used
// pattern row (its right-most reference, column cmax_r) is read from
// memory; the other references of the row come from that row's reuse chain.
// A chain must be filled before its first use, so each outer iteration is
// swept over all W1 columns: the first PC-1 steps of a row only fill the
// chains (warm-up) and steps j = PC-1 .. W1-1 complete iterations
// i1 = j-(PC-1). Reads whose column would be negative during warm-up are
// not issued.
//
// Interface: start (pulse while idle) begins a sweep; per step it gives,
// for every row r, req_valid[r] and the array coordinates (req_x0, req_x1)
// of the head to read, plus step_valid, step_win (this step completes
// iteration (step_i0, step_i1)) and step_last (final step). busy is high
// from the cycle after start to the last step. A sweep takes
// (W0-PR+1)*W1 cycles. Synchronous active-low reset.
//
// The loop nest, its bounds and the move follow the method's running
// example; the one-step-per-cycle schedule, the warm-up sweep and the
// start/busy handshake are this design's choices.
module access_ctrl #(
  parameter int unsigned        W0      = 1920,
  parameter int unsigned        W1      = 1080,
  parameter reuse_pkg::pattern_t PATTERN = reuse_pkg::P_EXAMPLE,
  localparam int unsigned       PR      = reuse_pkg::pat_height(PATTERN),
  localparam int unsigned       PC      = reuse_pkg::pat_width(PATTERN),
  localparam int unsigned       X0_W    = reuse_pkg::idx_w(W0),
  localparam int unsigned       X1_W    = reuse_pkg::idx_w(W1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       step_valid,
  output logic                       step_win,
  output logic                       step_last,
  output logic [X0_W-1:0]            step_i0,
  output logic [X1_W-1:0]            step_i1,
  output logic [PR-1:0]              req_valid,
  output logic [PR-1:0][X0_W-1:0]    req_x0,
  output logic [PR-1:0][X1_W-1:0]    req_x1
);

  localparam int unsigned I0 = W0 - PR + 1;  // outer trip count (inner: W1-PC+1)

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state;

  logic [X0_W-1:0] i0;
  logic [X1_W-1:0] j;     // column swept in this step, 0 .. W1-1

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i0    <= '0;
      j     <= '0;
    end else begin
      case (state)
        S_IDLE:
          if (start) begin
            state <= S_RUN;
            i0    <= '0;
            j     <= '0;
          end
        S_RUN:
          if (32'(j) == W1 - 1) begin
            j <= '0;
            if (32'(i0) == I0 - 1) state <= S_IDLE;
            else                   i0    <= i0 + 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy       = (state == S_RUN);
    step_valid = busy;
    step_win   = busy && (32'(j) >= PC - 1);
    step_last  = busy && (32'(j) == W1 - 1) && (32'(i0) == I0 - 1);
    step_i0    = i0;
    step_i1    = X1_W'(32'(j) - (PC - 1));
    for (int unsigned r = 0; r < PR; r++) begin
      // head column of row r for this step: j - (PC-1) + cmax_r
      req_valid[r] = busy && reuse_pkg::row_used(PATTERN, r) &&
                     (32'(j) + reuse_pkg::row_cmax(PATTERN, r) >= PC - 1);
      req_x0[r]    = X0_W'(32'(i0) + r);
      req_x1[r]    = X1_W'(32'(j) + reuse_pkg::row_cmax(PATTERN, r) - (PC - 1));
    end
  end

  initial begin
    assert (PR >= 1 && PC >= 1 && W0 >= PR && W1 >= PC)
      else $error("access_ctrl: pattern %0dx%0d does not fit a %0dx%0d array", PR, PC, W0, W1);
  end

endmodule
