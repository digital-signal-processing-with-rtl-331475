// tb_async_fifo: self-checking test of the one-write, two-read event FIFO.
//
// Uses the full size (128 words of 16 bits). A reference model keeps the written words
// and one read position per port. Random traffic: writes, reads on port 1 and reads on
// port 2 (port 2 never overtakes port 1, as in the filter, where tap 2 ends after tap 1),
// with and without loading the read register. Checks: every loaded word equals the
// model's; a read advances only its own port; err stays low during legal traffic; filling
// to exactly 128 unread (port 2) words is legal, the 129th write sets err; a read from an
// empty port sets err, and err is sticky until reset.
module tb_async_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic        wr = 1'b0, rd1 = 1'b0, ld1 = 1'b0, rd2 = 1'b0, ld2 = 1'b0;
  logic [15:0] wdata = '0, rdata1, rdata2;
  logic        err;

  async_fifo dut (.clk, .rst_n, .wr, .wdata, .rd1, .ld1, .rd2, .ld2, .rdata1, .rdata2, .err);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] mdl [$];
  int p1 = 0, p2 = 0;  // model read positions (absolute)
  logic [15:0] exp1, exp2;
  bit chk1, chk2;

  task automatic cycle(bit w, bit r1, bit l1, bit r2, bit l2);
    @(negedge clk);
    wr = w; wdata = 16'($urandom); rd1 = r1; ld1 = l1; rd2 = r2; ld2 = l2;
    chk1 = r1 && l1; chk2 = r2 && l2;
    if (chk1) exp1 = mdl[p1];
    if (chk2) exp2 = mdl[p2];
    @(posedge clk);
    if (w) mdl.push_back(wdata);
    if (r1) p1++;
    if (r2) p2++;
    @(negedge clk);
    wr = 0; rd1 = 0; rd2 = 0;
    if (chk1) check(rdata1 == exp1, $sformatf("port 1 word %0d: %h, expected %h", p1 - 1, rdata1, exp1));
    if (chk2) check(rdata2 == exp2, $sformatf("port 2 word %0d: %h, expected %h", p2 - 1, rdata2, exp2));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // random legal traffic
    for (int k = 0; k < 5000; k++) begin
      bit w, r1, r2;
      int n1, n2;
      n1 = mdl.size() - p1;
      n2 = p1 - p2;
      w  = ($urandom_range(0, 99) < 45) && (mdl.size() - p2 < 128);
      r1 = ($urandom_range(0, 99) < 40) && (n1 > 0);
      r2 = ($urandom_range(0, 99) < 40) && (n2 > 0);
      cycle(w, r1, $urandom_range(0, 3) != 0, r2, $urandom_range(0, 3) != 0);
    end
    check(!err, "no error during legal traffic");
    // drain, then fill to exactly 128
    while (p1 < mdl.size()) cycle(0, 1, 1, 0, 0);
    while (p2 < p1) cycle(0, 0, 0, 1, 1);
    for (int k = 0; k < 128; k++) cycle(1, k > 0 && k < 100, 1, 0, 0);
    check(!err, "128 words held without error");
    for (int k = 0; k < 128; k++) cycle(0, p1 < mdl.size(), 1, 1, 1);
    check(!err, "128 words read back without error");
    for (int k = 0; k < 128; k++) cycle(1, 0, 0, 0, 0);
    check(!err, "full, no error yet");
    @(negedge clk); wr = 1; @(negedge clk); wr = 0;
    check(err, "write to a full FIFO sets err");
    rst_n = 0; @(negedge clk); rst_n = 1; mdl.delete(); p1 = 0; p2 = 0;
    check(!err, "reset clears err");
    @(negedge clk); rd2 = 1; @(negedge clk); rd2 = 0;
    check(err, "read from an empty FIFO sets err");
    repeat (3) @(negedge clk);
    check(err, "err is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
