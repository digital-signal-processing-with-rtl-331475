// tb_iir_grouper: self-checking test of the grouping block of the CT IIR filter.
//
// Each scenario drives events on the three inputs (input, Tap1 end R1, Tap2 end R2) at
// chosen ticks relative to a start tick, with a random window length tune, and checks
// the tag and the tick of every offered group (req_grp) and the strobes:
//   input alone              -> IN,   tune ticks after it
//   R1 alone                 -> R1,   tune ticks after it
//   R1 then R2 in the window -> R1R2, tune ticks after R1 (R2 waits for the window)
//   input then R1            -> R1,   window restarted at R1 (win_extend)
//   input then input         -> IN,   window not restarted (in_collide)
//   R2 alone (S0)            -> R2,   one tick after it (r2_lone)
//   R2 while a group is closed but not yet taken -> waits, then passes as a lone R2
//   receiver stalls          -> group held, new events refused until it is taken
module tb_iir_grouper;
  import ctdsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic [7:0] tune = 8'd25;
  logic in_req = 1'b0, in_ack, r1_req = 1'b0, r1_ack, r2_req = 1'b0, r2_ack, out_req, out_ack = 1'b1;
  grp_t out_tag;
  logic in_take, r1_take, r2_grp_take, r2_lone, in_collide, win_extend;

  iir_grouper dut (.clk, .rst_n, .tune, .in_req, .in_ack, .r1_req, .r1_ack, .r2_req, .r2_ack,
                   .out_req, .out_ack, .out_tag, .in_take, .r1_take, .r2_grp_take, .r2_lone,
                   .in_collide, .win_extend);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // log of given groups and strobes
  grp_t   g_tag [$];
  longint g_t [$];
  int n_collide = 0, n_extend = 0, n_r2grp = 0, n_lone = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_req && out_ack) begin g_tag.push_back(out_tag); g_t.push_back(cyc); end
    if (in_collide) n_collide++;
    if (win_extend) n_extend++;
    if (r2_grp_take) n_r2grp++;
    if (r2_lone) n_lone++;
  end

  longint t0;
  // raise a request at tick t0+at (at the falling edge before it) and hold it until taken
  task automatic ev(int which, int at);
    while (cyc < t0 + at) @(negedge clk);
    case (which)
      0: begin in_req = 1; #0.1; while (!in_ack) @(negedge clk); @(negedge clk); in_req = 0; end
      1: begin r1_req = 1; #0.1; while (!r1_ack) @(negedge clk); @(negedge clk); r1_req = 0; end
      default: begin r2_req = 1; #0.1; while (!r2_ack) @(negedge clk); @(negedge clk); r2_req = 0; end
    endcase
  endtask

  task automatic start();
    repeat (3) @(negedge clk);
    g_tag.delete(); g_t.delete();
    t0 = cyc;
  endtask

  task automatic expect_groups(grp_t tags [$], int ticks [$], string what);
    repeat (2 * tune + 10) @(negedge clk);
    check(g_tag.size() == tags.size(), $sformatf("%s: %0d groups, expected %0d", what, g_tag.size(), tags.size()));
    for (int i = 0; i < tags.size() && i < g_tag.size(); i++) begin
      check(g_tag[i] == tags[i], $sformatf("%s: group %0d tag %s, expected %s", what, i, g_tag[i].name(), tags[i].name()));
      check(g_t[i] == t0 + ticks[i], $sformatf("%s: group %0d at +%0d, expected +%0d", what, i, g_t[i] - t0, ticks[i]));
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
    int k, c0, c1, c2, c3, c4;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 40; r++) begin
      tune = 8'($urandom_range(4, 40));
      k = $urandom_range(2, tune - 2);
      start(); ev(0, 0);                        expect_groups('{GRP_IN}, '{tune}, "input alone");
      start(); ev(1, 0);                        expect_groups('{GRP_R1}, '{tune}, "R1 alone");
      c2 = n_r2grp;
      start(); fork ev(1, 0); ev(2, k); join;   expect_groups('{GRP_R1R2}, '{tune}, "R1 then R2");
      check(n_r2grp == c2 + 1, "R2 grouped");
      c1 = n_extend;
      start(); fork ev(0, 0); ev(1, k); join;   expect_groups('{GRP_R1}, '{k + tune}, "input then R1");
      check(n_extend == c1 + 1, "window extended");
      c0 = n_collide;
      start(); fork ev(0, 0); ev(0, k); join;   expect_groups('{GRP_IN}, '{tune}, "input then input");
      check(n_collide == c0 + 1, "collision counted");
      c3 = n_lone;
      start(); ev(2, 0);                        expect_groups('{GRP_R2}, '{1}, "R2 alone");
      check(n_lone == c3 + 1, "lone R2 counted");
      // R2 in the window of an input-only group is not grouped: it passes alone
      c3 = n_lone;
      start(); fork ev(0, 0); ev(2, k); join;   expect_groups('{GRP_R2, GRP_IN}, '{k + 1, tune}, "input then R2");
      check(n_lone == c3 + 1, "lone R2 beside an input group");
      // second R2 while S3: waits for the close, then passes alone
      start(); fork ev(1, 0); begin ev(2, k); ev(2, k + 1); end join;
      expect_groups('{GRP_R1R2, GRP_R2}, '{tune, tune + 2}, "R1R2 then another R2");
      // receiver stall
      c4 = $urandom_range(1, 20);
      start();
      fork
        begin ev(0, 0); end
        begin
          while (cyc < t0 + tune - 1) @(negedge clk);
          out_ack = 1'b0;
          repeat (c4) @(negedge clk);
          check(out_req && !in_ack && !r1_ack && !r2_ack, "stalled group held, inputs refused");
          out_ack = 1'b1;
        end
      join
      expect_groups('{GRP_IN}, '{tune + c4 - 1}, "stalled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
