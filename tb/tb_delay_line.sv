// tb_delay_line: self-checking test of the programmable line of tg cells.
//
// A line of MAX_CELLS = 16 cells is used with random lengths n_cells (1..16) and random
// cell delays. Phase A (receiver always ready, events at least tune apart): each event
// must leave exactly n_cells * tune ticks after it was taken, and pre_last must pulse
// exactly tune ticks before it leaves. Phase B (receiver stalls at random, events pushed
// as fast as the line takes them): no event is lost or reordered, and the line holds at
// most n_cells events.
module tb_delay_line;
  localparam int MAXC = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic [4:0] n_cells = 5'd4;
  logic [7:0] tune = 8'd5;
  logic       in_req = 1'b0, in_ack, out_req, out_ack = 1'b1, pre_last;
  logic [7:0] in_tag = '0, out_tag;
  bit         stall = 1'b0;

  delay_line #(.MAX_CELLS(MAXC), .TW(8), .TAGW(8), .HALF(1'b0)) dut (
    .clk, .rst_n, .n_cells, .tune, .tune_half(8'd0), .in_req, .in_ack, .in_tag,
    .out_req, .out_ack, .out_tag, .pre_last);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  longint     t_q [$];
  logic [7:0] tag_q [$];
  longint     pl_q [$];
  bit         timed = 1'b1;
  int         n_out = 0, max_fill = 0;

  always @(posedge clk) if (rst_n) begin
    if (pre_last) pl_q.push_back(cyc);
    if (out_req && out_ack) begin
      check(t_q.size() > 0 && out_tag == tag_q[0], "order and tag");
      if (timed && t_q.size() > 0) begin
        check(cyc == t_q[0] + longint'(n_cells) * tune,
              $sformatf("delay %0d, expected %0d*%0d", cyc - t_q[0], n_cells, tune));
        check(pl_q.size() > 0 && pl_q[0] == cyc - tune, "pre_last one cell before the end");
      end
      if (pl_q.size() > 0) void'(pl_q.pop_front());
      void'(t_q.pop_front()); void'(tag_q.pop_front());
      n_out++;
    end
    if (in_req && in_ack) begin t_q.push_back(cyc); tag_q.push_back(in_tag); end
    if (t_q.size() > max_fill) max_fill = t_q.size();
  end

  always @(posedge clk) out_ack <= stall ? ($urandom_range(0, 4) == 0) : 1'b1;

  task automatic send(int gap);
    @(negedge clk);
    in_tag = 8'($urandom);
    in_req = 1'b1;
    while (!in_ack) @(negedge clk);
    @(negedge clk);
    in_req = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 20; r++) begin
      n_cells = 5'($urandom_range(1, MAXC));
      tune    = 8'($urandom_range(1, 30));
      @(negedge clk);
      // phase A: timed, events at least tune apart
      timed = 1'b1;
      stall = 1'b0;
      for (int k = 0; k < 20; k++) begin send($urandom_range(tune, 3 * tune)); sent++; end
      while (t_q.size() > 0) @(posedge clk);
      // phase B: stalls
      timed = 1'b0;
      stall = 1'b1;
      max_fill = 0;
      for (int k = 0; k < 40; k++) begin send(0); sent++; end
      check(max_fill <= n_cells + 1, $sformatf("line held %0d events, %0d cells", max_fill, n_cells));
      stall = 1'b0;
      while (t_q.size() > 0) @(posedge clk);
      repeat (5) @(negedge clk);
    end
    check(n_out == sent, $sformatf("sent %0d received %0d", sent, n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
