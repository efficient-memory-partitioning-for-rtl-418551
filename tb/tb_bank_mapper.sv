// tb_bank_mapper: checks bank index and intra-bank offset of bank_mapper.
// Four instances cover the three offset rules: the default 1920x1080 array
// with alpha=(1,0), N=3 (random coordinates against the formulas), a 10x8
// array with alpha=(1,0), N=3, a 10x8 array with alpha=(0,1), N=3, and a
// 10x8 array with alpha=(1,2), N=5 (classic padding). The small arrays are
// swept exhaustively and every (bank, offset) pair must be in range and be
// used by one element only, i.e. the mapping is conflict-free.
module tb_bank_mapper;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  // default size
  logic [10:0] bx0, bx1;
  logic [1:0]  bbank;
  logic [19:0] boff;
  bank_mapper u_big (.x0(bx0), .x1(bx1), .bank(bbank), .offset(boff));

  // small arrays, 10 x 8
  logic [3:0] sx0;
  logic [2:0] sx1;
  logic [1:0] b_a, b_b;
  logic [2:0] b_c;
  logic [4:0] o_a, o_b;
  logic [4:0] o_c;
  bank_mapper #(.W0(10), .W1(8), .N(3), .ALPHA0(1), .ALPHA1(0)) u_a (.x0(sx0), .x1(sx1), .bank(b_a), .offset(o_a));
  bank_mapper #(.W0(10), .W1(8), .N(3), .ALPHA0(0), .ALPHA1(1)) u_b (.x0(sx0), .x1(sx1), .bank(b_b), .offset(o_b));
  bank_mapper #(.W0(10), .W1(8), .N(5), .ALPHA0(1), .ALPHA1(2)) u_c (.x0(sx0), .x1(sx1), .bank(b_c), .offset(o_c));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  bit seen_a [3][32], seen_b [3][32], seen_c [5][32];

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int unsigned x0, x1;
      x0 = (k < 4) ? (k[0] ? 1919 : 0) : $urandom_range(1919);
      x1 = (k < 4) ? (k[1] ? 1079 : 0) : $urandom_range(1079);
      bx0 = 11'(x0); bx1 = 11'(x1);
      #1;
      check(bbank == 2'(x0 % 3), $sformatf("big bank x=(%0d,%0d) got %0d", x0, x1, bbank));
      check(boff == 20'((x0 / 3) * 1080 + x1), $sformatf("big offset x=(%0d,%0d) got %0d", x0, x1, boff));
    end
    for (int unsigned x0 = 0; x0 < 10; x0++)
      for (int unsigned x1 = 0; x1 < 8; x1++) begin
        sx0 = 4'(x0); sx1 = 3'(x1);
        #1;
        // alpha = (1,0): k = 1, depth ceil(10/3)*8 = 32
        check(b_a == 2'(x0 % 3) && o_a == 5'((x0 / 3) * 8 + x1), $sformatf("a x=(%0d,%0d)", x0, x1));
        check(!seen_a[b_a][o_a], $sformatf("a conflict at x=(%0d,%0d)", x0, x1));
        seen_a[b_a][o_a] = 1'b1;
        // alpha = (0,1): k = 1 on dimension 1, depth ceil(8/3)*10 = 30
        check(b_b == 2'(x1 % 3) && o_b == 5'((x1 / 3) * 10 + x0) && o_b < 30, $sformatf("b x=(%0d,%0d)", x0, x1));
        check(!seen_b[b_b][o_b], $sformatf("b conflict at x=(%0d,%0d)", x0, x1));
        seen_b[b_b][o_b] = 1'b1;
        // alpha = (1,2): k = 2, pad dimension 1, depth 10*ceil(8/5) = 20
        check(b_c == 3'((x0 + 2 * x1) % 5) && o_c == 5'(x0 * 2 + x1 / 5) && o_c < 20, $sformatf("c x=(%0d,%0d)", x0, x1));
        check(!seen_c[b_c][o_c], $sformatf("c conflict at x=(%0d,%0d)", x0, x1));
        seen_c[b_c][o_c] = 1'b1;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
