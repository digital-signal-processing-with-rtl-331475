// tb_iir_timing_block: self-checking test of the timing block of the CT IIR filter
// (grouping block, pipeline cells P1..P5, tap 1 and tap 2 with the half-delay cell).
//
// The event detector is played by the testbench: it takes each event at once (ed_ack
// high) and returns it tune_b1 ticks later on edo_req for the first NPASS events of a
// run, and drops the rest. Checks for each configuration (taps 39/40 and 30/31 cells,
// tg 25 and 20 ticks, half cell 12 and 7 ticks):
//   - loop period: successive Tap1 events are (tap1_cells + 1) * tg apart, i.e. TD;
//   - tap 2 ends tap2_cells * tg + half ticks after tap 1 ends;
//   - the first group leaves tg after the input; outputs follow 5 tg later, then every TD;
//   - group tags: IN, R1, then R1R2, and a last lone R2; FIFO1 reads come one cell before each tap ends;
//   - one FIFO write per passed event, one lone R2 after the detector stops the loop,
//     and silence afterwards.
module tb_iir_timing_block;
  import ctdsp_pkg::*;

  localparam int NPASS = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic [7:0] tune_b1 = 8'd25, tune_b2 = 8'd25, tune_bhalf = 8'd12;
  logic [NCW-1:0] tap1_cells = 7'd39, tap2_cells = 7'd40;
  logic in_req = 1'b0, in_ack, out_req, ed_req, edo_req = 1'b0, edo_ack;
  logic in_take, r1_take, r2_take, grp_fire, wr, f1_rd1, f1_rd2, r2_lone, in_collide, win_extend, tap1_evt, tap2_evt;
  grp_t grp_tag, p1_tag;
  logic [4:0] pipe_fire;

  iir_timing_block dut (
    .clk, .rst_n, .tune_b1, .tune_b2, .tune_bhalf, .tap1_cells, .tap2_cells,
    .in_req, .in_ack, .out_req, .out_ack(1'b1), .ed_req, .ed_ack(1'b1), .edo_req, .edo_ack,
    .in_take, .r1_take, .r2_take, .grp_fire, .grp_tag, .pipe_fire, .p1_tag, .wr, .f1_rd1, .f1_rd2,
    .r2_lone, .in_collide, .win_extend, .tap1_evt, .tap2_evt);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // event detector model
  int n_ed = 0;
  longint ed_due [$];
  always @(posedge clk) if (rst_n) begin
    if (ed_req) begin
      n_ed++;
      if (n_ed <= NPASS) ed_due.push_back(cyc + tune_b1);
    end
    if (edo_req && edo_ack) void'(ed_due.pop_front());
  end
  always @(negedge clk) edo_req = (ed_due.size() > 0) && (cyc >= ed_due[0]);

  // logs
  longint t1 [$], t2 [$], to [$], tg_t [$], trd1 [$], trd2 [$], tr1 [$], tr2 [$], tin;
  grp_t tags [$];
  int n_wr = 0, n_lone = 0;
  always @(posedge clk) if (rst_n) begin
    if (tap1_evt) t1.push_back(cyc);
    if (tap2_evt) t2.push_back(cyc);
    if (out_req) to.push_back(cyc);
    if (grp_fire) begin tg_t.push_back(cyc); tags.push_back(grp_tag); end
    if (f1_rd1) trd1.push_back(cyc);
    if (f1_rd2) trd2.push_back(cyc);
    if (r1_take) tr1.push_back(cyc);
    if (r2_take) tr2.push_back(cyc);
    if (wr) n_wr++;
    if (r2_lone) n_lone++;
    if (in_take) tin = cyc;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int td, d2;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk);
      tune_b1    = (r == 1) ? 8'd20 : 8'd25;
      tune_b2    = tune_b1;
      tune_bhalf = (r == 2) ? 8'd7 : 8'd12;
      tap1_cells = (r == 2) ? 7'd30 : 7'd39;
      tap2_cells = tap1_cells + 1'b1;
      td = (tap1_cells + 1) * tune_b1;
      d2 = tap2_cells * tune_b2 + tune_bhalf;
      t1.delete(); t2.delete(); to.delete(); tg_t.delete(); tags.delete();
      trd1.delete(); trd2.delete(); tr1.delete(); tr2.delete();
      n_wr = 0; n_lone = 0; n_ed = 0;
      in_req = 1'b1;
      #0.1;
      while (!in_ack) @(negedge clk);
      @(negedge clk);
      in_req = 1'b0;
      repeat ((NPASS + 4) * td) @(negedge clk);
      check(t1.size() == NPASS, $sformatf("run %0d: %0d tap-1 events", r, t1.size()));
      for (int i = 1; i < t1.size(); i++) check(t1[i] - t1[i-1] == td, $sformatf("loop period %0d, TD %0d", t1[i] - t1[i-1], td));
      check(t2.size() == NPASS, "one tap-2 event per tap-1 event");
      for (int i = 0; i < t2.size() && i < t1.size(); i++) check(t2[i] - t1[i] == d2, $sformatf("tap 2 delay %0d, expected %0d", t2[i] - t1[i], d2));
      check(tg_t.size() == NPASS + 2, $sformatf("%0d groups (with the lone R2)", tg_t.size()));
      check(tg_t[0] == tin + tune_b1, "first group tg after the input");
      for (int i = 0; i < tags.size(); i++)
        check(tags[i] == (i == 0 ? GRP_IN : i == 1 ? GRP_R1 : i == NPASS + 1 ? GRP_R2 : GRP_R1R2), $sformatf("group %0d tag %s", i, tags[i].name()));
      check(to.size() == NPASS + 1, $sformatf("%0d output events", to.size()));
      for (int i = 0; i < to.size(); i++) check(to[i] == tin + 6 * tune_b1 + i * td, $sformatf("output %0d at +%0d", i, to[i] - tin));
      check(trd1.size() == tr1.size() && tr1.size() == NPASS, "FIFO1 port-1 reads match R1 takes");
      for (int i = 0; i < trd1.size() && i < t1.size(); i++) check(t1[i] - trd1[i] == tune_b1, "FIFO1 read one cell before tap 1 ends");
      check(trd2.size() == NPASS, "FIFO1 port-2 reads");
      for (int i = 0; i < trd2.size() && i < t2.size(); i++) check(t2[i] - trd2[i] == tune_b2, "FIFO1 read one cell before tap 2 ends");
      check(tr2.size() == NPASS - 1, "R2 grouped NPASS-1 times");
      check(n_wr == NPASS, "one FIFO write per passed event");
      check(n_lone == 1, "one lone R2 event");
      check(n_ed == NPASS + 1, "every output also goes to the event detector");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
