// tb_delay_cell: self-checking test of the tg delay cell.
//
// Drives events with random tags and random spacing into one cell whose tune (delay in
// ticks) is changed between phases, with a receiver that sometimes holds its
// acknowledge low. Checks: every event comes out once and in order with its tag; an event
// taken at t is first offered at exactly t + tune (tune 0 acts as 1); a held event stays
// offered until acknowledged; a new event is taken in the same tick the old one leaves.
module tb_delay_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic [7:0] tune = 8'd25;
  logic       in_req = 1'b0, in_ack, out_req, out_ack = 1'b1;
  logic [3:0] in_tag = '0, out_tag;

  delay_cell #(.TW(8), .TAGW(4)) dut (
    .clk, .rst_n, .tune, .in_req, .in_ack, .in_tag, .out_req, .out_ack, .out_tag);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint     t_q [$];
  logic [3:0] tag_q [$];
  bit         offered = 1'b0;
  int         n_in = 0, n_out = 0, n_same_tick = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_req && !offered) begin
      check(t_q.size() > 0, "offer without event");
      if (t_q.size() > 0)
        check(cyc == t_q[0] + ((tune == 0) ? 1 : tune), $sformatf("offered after %0d ticks, tune %0d", cyc - t_q[0], tune));
      offered = 1'b1;
    end
    if (out_req && out_ack) begin
      check(t_q.size() > 0 && out_tag == tag_q[0], "tag order");
      void'(t_q.pop_front()); void'(tag_q.pop_front());
      offered = 1'b0;
      n_out++;
      if (in_req && in_ack) n_same_tick++;
    end
    if (in_req && in_ack) begin
      t_q.push_back(cyc); tag_q.push_back(in_tag); n_in++;
    end
  end

  // random receiver
  always @(posedge clk) out_ack <= ($urandom_range(0, 3) != 0);

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
    for (int ph = 0; ph < 4; ph++) begin
      tune <= (ph == 0) ? 8'd25 : (ph == 1) ? 8'd12 : (ph == 2) ? 8'd1 : 8'd0;
      repeat (2) @(posedge clk);
      for (int k = 0; k < 300; k++) begin
        // inputs change at the falling edge; the rising edge samples them
        @(negedge clk);
        in_tag = 4'($urandom);
        in_req = 1'b1;
        while (!in_ack) @(negedge clk);
        @(negedge clk);
        in_req = 1'b0;
        repeat ($urandom_range(0, 30)) @(negedge clk);
      end
      while (t_q.size() > 0) @(posedge clk);
    end
    check(n_in == 1200 && n_out == 1200, $sformatf("events in %0d out %0d", n_in, n_out));
    check(n_same_tick > 0, "take in the tick of a give happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
