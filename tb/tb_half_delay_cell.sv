// tb_half_delay_cell: self-checking test of the half-delay cell at the head of tap 2.
//
// The half cell is a delay cell biased with its own control (tune_bhalf), so its delay
// is set apart from the tg cells. Built as tap 2 is built (delay_line with HALF = 1,
// 40 cells of tg = 25 ticks, half cell 12 ticks), an event must take exactly
// 40*25 + 12 = 1012 ticks, i.e. TD + tg/2 when TD = 40 tg... and changing only the half
// cell's bias must change only that part. A lone half cell (delay_cell) must delay by its
// tune exactly. Several events in flight must keep their order.
module tb_half_delay_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic [7:0] tune = 8'd25, tune_half = 8'd12;
  logic       in_req = 1'b0, in_ack, out_req, pre_last;
  logic       h_req = 1'b0, h_ack, h_oreq;
  logic [3:0] in_tag = '0, out_tag;

  delay_line #(.MAX_CELLS(64), .TW(8), .TAGW(4), .HALF(1'b1)) u_tap2 (
    .clk, .rst_n, .n_cells(7'd40), .tune, .tune_half, .in_req, .in_ack, .in_tag,
    .out_req, .out_ack(1'b1), .out_tag, .pre_last);

  delay_cell #(.TW(8), .TAGW(1)) u_half (
    .clk, .rst_n, .tune(tune_half), .in_req(h_req), .in_ack(h_ack), .in_tag(1'b0),
    .out_req(h_oreq), .out_ack(1'b1), .out_tag());

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  longint t_q [$], th_q [$];
  logic [3:0] tag_q [$];
  always @(posedge clk) if (rst_n) begin
    if (out_req) begin
      check(t_q.size() > 0 && out_tag == tag_q[0], "order");
      check(t_q.size() > 0 && cyc == t_q[0] + 40 * tune + tune_half,
            $sformatf("tap delay %0d, expected %0d", cyc - t_q[0], 40 * tune + tune_half));
      void'(t_q.pop_front()); void'(tag_q.pop_front());
    end
    if (in_req && in_ack) begin t_q.push_back(cyc); tag_q.push_back(in_tag); end
    if (h_oreq) begin
      check(th_q.size() > 0 && cyc == th_q[0] + tune_half, "half cell delay");
      void'(th_q.pop_front());
    end
    if (h_req && h_ack) th_q.push_back(cyc);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int ph = 0; ph < 3; ph++) begin
      @(negedge clk);
      tune_half = (ph == 0) ? 8'd12 : (ph == 1) ? 8'd5 : 8'd20;
      for (int k = 0; k < 12; k++) begin
        @(negedge clk);
        in_tag = 4'($urandom);
        in_req = 1'b1;
        h_req  = 1'b1;
        @(negedge clk);
        in_req = 1'b0;
        h_req  = 1'b0;
        repeat ($urandom_range(30, 120)) @(negedge clk);
      end
      while (t_q.size() > 0) @(negedge clk);
    end
    check(checks >= 72, "all events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
