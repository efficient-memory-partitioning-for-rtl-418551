// tb_bank_xbar: checks the row-to-bank crossbar with 3 rows and 3 banks.
// Each cycle the rows ask for distinct banks (a random permutation, some
// rows idle) at random offsets. The bank side is modelled here as memories
// whose word at offset o in bank b is f(b,o), answered one cycle later.
// Checked: each requested bank gets re and the right offset, unrequested
// banks stay idle, and each requesting row receives f(its bank, its
// offset) in the next cycle.
module tb_bank_xbar;
  localparam int unsigned NR = 3, N = 3, OW = 8, DW = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic rst_n;
  logic [NR-1:0]            req_valid;
  logic [NR-1:0][1:0]       req_bank;
  logic [NR-1:0][OW-1:0]    req_off;
  logic [N-1:0]             bank_re;
  logic [N-1:0][OW-1:0]     bank_off;
  logic [N-1:0][DW-1:0]     bank_rdata;
  logic [NR-1:0][DW-1:0]    row_data;

  bank_xbar #(.NR(NR), .N(N), .OFF_W(OW), .DATA_W(DW)) u_dut (.*);

  function automatic logic [DW-1:0] f(input int unsigned b, input int unsigned o);
    return DW'(b * 32'h1000_0001 + o * 32'h0001_0003 + 32'h55);
  endfunction

  // bank model: registered read
  always_ff @(posedge clk)
    for (int b = 0; b < N; b++)
      if (bank_re[b]) bank_rdata[b] <= f(b, bank_off[b]);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [NR-1:0] pv;
    logic [NR-1:0][1:0] pb;
    logic [NR-1:0][OW-1:0] po;
    int unsigned perm [NR];
    rst_n = 0; req_valid = '0; req_bank = '0; req_off = '0; pv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      for (int r = 0; r < NR; r++) begin
        req_valid[r] = ($urandom_range(4) != 0);
        req_bank[r]  = 2'(perm[r]);
        req_off[r]   = OW'($urandom);
      end
      #1;
      for (int b = 0; b < N; b++) begin
        bit want;
        int unsigned o;
        want = 0; o = 0;
        for (int r = 0; r < NR; r++) if (req_valid[r] && req_bank[r] == b) begin want = 1; o = req_off[r]; end
        check(bank_re[b] == want, $sformatf("n=%0d bank %0d re=%0b expected %0b", n, b, bank_re[b], want));
        if (want) check(bank_off[b] == OW'(o), $sformatf("n=%0d bank %0d offset", n, b));
      end
      pv = req_valid; pb = req_bank; po = req_off;
      @(negedge clk);
      for (int r = 0; r < NR; r++)
        if (pv[r]) check(row_data[r] == f(pb[r], po[r]),
                         $sformatf("n=%0d row %0d data %h expected %h", n, r, row_data[r], f(pb[r], po[r])));
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
