// tb_part_mem: checks the partitioned array on a 7 x 5 array in 3 banks
// with alpha=(1,0). Every element is written through the host port in
// random order; then, for every row group g and column x1, the three banks
// are read in the same cycle at offset g*5+x1 and must return
// A[3g+b][x1] from bank b (the inverse of B(x) = x0 % 3,
// F(x) = (x0/3)*5 + x1), one cycle after the request.
module tb_part_mem;
  localparam int unsigned W0 = 7, W1 = 5, N = 3, DW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic          wr_en;
  logic [2:0]    wr_x0;
  logic [2:0]    wr_x1;
  logic [DW-1:0] wr_data;
  logic [N-1:0]  rd_en;
  logic [N-1:0][3:0] rd_off;   // depth ceil(7/3)*5 = 15
  logic [N-1:0][DW-1:0] rd_data;
  logic [DW-1:0] A [W0][W1];
  int unsigned order [W0*W1];

  part_mem #(.DATA_W(DW), .W0(W0), .W1(W1), .N(N)) u_dut (.*);

  initial begin
    wr_en = 0; rd_en = 0; rd_off = '0; wr_x0 = 0; wr_x1 = 0; wr_data = 0;
    for (int i = 0; i < W0 * W1; i++) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      @(negedge clk);
      wr_en = 1; wr_x0 = 3'(order[i] / W1); wr_x1 = 3'(order[i] % W1);
      wr_data = DW'($urandom); A[wr_x0][wr_x1] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int g = 0; g < (W0 + N - 1) / N; g++)
      for (int x1 = 0; x1 < W1; x1++) begin
        for (int b = 0; b < N; b++) begin
          rd_en[b]  = (g * N + b < W0);
          rd_off[b] = 4'(g * W1 + x1);
        end
        @(negedge clk);
        for (int b = 0; b < N; b++)
          if (g * N + b < W0) begin
            checks++;
            if (rd_data[b] !== A[g*N+b][x1]) begin
              failures++;
              if (failures <= 10)
                $display("FAIL: bank %0d offset %0d = %h, expected A[%0d][%0d] = %h",
                         b, g * W1 + x1, rd_data[b], g * N + b, x1, A[g*N+b][x1]);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
