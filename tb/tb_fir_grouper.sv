// tb_fir_grouper: self-checking test of the two-input grouping block of a FIR section.
//
// Scenarios with a random window length tune and offset k (0 < k < tune):
//   a alone, b alone           -> one group tune ticks after the event, flags a or b
//   a then b (or b then a) within the window -> one group with both flags
//   a then a second a in the window -> the second a waits and opens the next window
//   receiver stall             -> group held, both inputs refused
module tb_fir_grouper;
  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic [7:0] tune = 8'd25;
  logic a_req = 1'b0, a_ack, b_req = 1'b0, b_ack, out_req, out_ack = 1'b1, out_a, out_b;

  fir_grouper dut (.clk, .rst_n, .tune, .a_req, .a_ack, .b_req, .b_ack, .out_req, .out_ack, .out_a, .out_b);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  logic [1:0] g_f [$];
  longint     g_t [$];
  always @(posedge clk) if (rst_n && out_req && out_ack) begin g_f.push_back({out_a, out_b}); g_t.push_back(cyc); end

  longint t0;
  task automatic ev(bit is_b, int at);
    while (cyc < t0 + at) @(negedge clk);
    if (!is_b) begin a_req = 1; #0.1; while (!a_ack) @(negedge clk); @(negedge clk); a_req = 0; end
    else       begin b_req = 1; #0.1; while (!b_ack) @(negedge clk); @(negedge clk); b_req = 0; end
  endtask
  task automatic start();
    repeat (3) @(negedge clk);
    g_f.delete(); g_t.delete();
    t0 = cyc;
  endtask
  task automatic expect_groups(logic [1:0] f [$], int t [$], string what);
    repeat (3 * tune + 10) @(negedge clk);
    check(g_f.size() == f.size(), $sformatf("%s: %0d groups, expected %0d", what, g_f.size(), f.size()));
    for (int i = 0; i < f.size() && i < g_f.size(); i++) begin
      check(g_f[i] == f[i], $sformatf("%s: group %0d flags %b, expected %b", what, i, g_f[i], f[i]));
      check(g_t[i] == t0 + t[i], $sformatf("%s: group %0d at +%0d, expected +%0d", what, i, g_t[i] - t0, t[i]));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, s;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 50; r++) begin
      tune = 8'($urandom_range(4, 40));
      k = $urandom_range(2, tune - 2);
      start(); ev(0, 0);                     expect_groups('{2'b10}, '{tune}, "a alone");
      start(); ev(1, 0);                     expect_groups('{2'b01}, '{tune}, "b alone");
      start(); fork ev(0, 0); ev(1, k); join; expect_groups('{2'b11}, '{tune}, "a then b");
      start(); fork ev(1, 0); ev(0, k); join; expect_groups('{2'b11}, '{tune}, "b then a");
      start(); begin ev(0, 0); ev(0, k); end expect_groups('{2'b10, 2'b10}, '{tune, 2 * tune + 1}, "a then a");
      s = $urandom_range(1, 20);
      start();
      fork
        ev(0, 0);
        begin
          while (cyc < t0 + tune - 1) @(negedge clk);
          out_ack = 1'b0;
          repeat (s) @(negedge clk);
          check(out_req && !a_ack && !b_ack, "stalled group held");
          out_ack = 1'b1;
        end
      join
      expect_groups('{2'b10}, '{tune + s - 1}, "stall");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
