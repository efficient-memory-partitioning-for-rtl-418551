// tb_mem_bank: checks one memory bank against an array model: random
// writes and reads, one cycle of read latency, rdata held while re is low,
// and read-first behaviour when a read and a write hit the same address.
module tb_mem_bank;
  localparam int unsigned DEPTH = 48, DW = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic          we, re;
  logic [5:0]    waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [DEPTH];
  logic [DW-1:0] exp_q;
  bit            exp_v;

  mem_bank #(.DATA_W(DW), .DEPTH(DEPTH)) u_dut (.*);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; exp_v = 0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      // rdata now reflects the previous cycle's request
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          if (failures <= 10) $display("FAIL: k=%0d rdata %h expected %h", k, rdata, exp_q);
        end
      end
      re = ($urandom_range(3) != 0);
      we = $urandom_range(1);
      raddr = 6'($urandom_range(DEPTH - 1));
      waddr = (k % 7 == 0) ? raddr : 6'($urandom_range(DEPTH - 1));
      wdata = $urandom;
      if (re) exp_q = model[raddr];   // read-first: old word
      exp_v = exp_v || re;           // when re is low rdata must hold exp_q
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
