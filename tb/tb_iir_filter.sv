// tb_iir_filter: self-checking test of the sixth-order CT digital IIR filter.
//
// Test 1: from reset a single input event (a step to x0) enters. After its window the
// filter behaves like a DT filter with period TD: the n-th output event must leave at
// t_in + tg + 5 tg + n*TD and carry y[n] of a DT reference (three direct-form-II biquads
// with the same fixed-point arithmetic, written here independently). With the event
// detector on, the loop must stop at the first event whose three state words repeat.
// Test 2: a second step at an arbitrary time; after settling the output must be within
// a few LSB of the DC gain times the input, and the loop must fall silent again.
// Test 3: the event detector off: events keep circulating (one per TD) and the output
// settles and holds.
module tb_iir_filter;
  import ctdsp_pkg::*;

  localparam int TG = 25;
  localparam int TD = 40 * TG;

  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  cfg_t cfg;
  logic in_req = 1'b0, in_ack, out_req, out_ack;
  logic [INW-1:0] in_data = '0;
  data_t out_data;
  logic grp_fire, r2_lone, in_collide, win_extend, ed_drop, tap1_evt, tap2_evt, fifo_err;
  grp_t grp_tag;

  iir_filter dut (
    .clk, .rst_n, .cfg, .tune_b1(8'(TG)), .tune_b2(8'(TG)), .tune_bhalf(8'(TG/2)),
    .in_req, .in_ack, .in_data, .out_req, .out_ack, .out_data,
    .grp_fire, .grp_tag, .r2_lone, .in_collide, .win_extend, .ed_drop,
    .tap1_evt, .tap2_evt, .fifo_err);

  assign out_ack = 1'b1;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // event log
    longint t_out [$];
  data_t  v_out [$];
  int n_in_grp = 0, n_r1 = 0, n_r1r2 = 0, n_lone = 0, n_drop = 0;
  longint t_take = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_req && in_ack) t_take <= cyc;
    if (out_req && out_ack) begin t_out.push_back(cyc); v_out.push_back(out_data); end
    if (grp_fire) begin
      if (grp_tag == GRP_IN)   n_in_grp++;
      if (grp_tag == GRP_R1)   n_r1++;
      if (grp_tag == GRP_R1R2) n_r1r2++;
    end
    if (r2_lone) n_lone++;
    if (ed_drop) n_drop++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // DT reference
  function automatic data_t sat(longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return data_t'(v);
  endfunction
  function automatic longint fl8(longint v);  // floor(v / 256)
    return v >>> 8;
  endfunction

  data_t ref_y [$];
  int    ref_stop;  // index of the first redundant event
  task automatic dt_reference(int x0, int nmax);
    longint w [3][3];  // w[s][0] now, [1] one TD ago, [2] two TD ago
    longint xs, prev [3];
    biquad_t b [3];
    ref_y.delete();
    ref_stop = -1;
    for (int s = 0; s < 3; s++) begin
      b[s] = cfg.sec[s];
      for (int k = 0; k < 3; k++) w[s][k] = 0;
      prev[s] = 0;
    end
    xs = longint'(x0) * 256;
    for (int n = 0; n < nmax; n++) begin
      longint in2, in3;
      w[0][0] = sat(fl8(longint'(cfg.g_in) * xs + longint'(b[0].fb1) * w[0][1] + longint'(b[0].fb2) * w[0][2]));
      w[1][0] = sat(fl8(longint'(b[0].ff0) * w[0][0] + longint'(b[0].ff1) * w[0][1] + longint'(b[0].ff2) * w[0][2]
                      + longint'(b[1].fb1) * w[1][1] + longint'(b[1].fb2) * w[1][2]));
      w[2][0] = sat(fl8(longint'(b[1].ff0) * w[1][0] + longint'(b[1].ff1) * w[1][1] + longint'(b[1].ff2) * w[1][2]
                      + longint'(b[2].fb1) * w[2][1] + longint'(b[2].fb2) * w[2][2]));
      ref_y.push_back(sat(fl8(longint'(b[2].ff0) * w[2][0] + longint'(b[2].ff1) * w[2][1] + longint'(b[2].ff2) * w[2][2])));
      if (w[0][0] == prev[0] && w[1][0] == prev[1] && w[2][0] == prev[2]) begin
        ref_stop = n;
        break;
      end
      for (int s = 0; s < 3; s++) begin
        prev[s] = w[s][0];
        w[s][2] = w[s][1];
        w[s][1] = w[s][0];
      end
    end
  endtask

  task automatic send(int v);
    // inputs change at the falling edge; the rising edge samples them
    @(negedge clk);
    in_data = INW'(v);
    in_req  = 1'b1;
    while (!in_ack) @(negedge clk);
    @(negedge clk);
    in_req  = 1'b0;
  endtask

  // watchdog
  initial begin
    repeat (3_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    int x0;
    x0 = 40;
    cfg = default_cfg();
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);

    // ---- test 1: step from reset, compared with the DT reference
    dt_reference(x0, 600);
    check(ref_stop > 0, "reference settles within 600 TD");
    send(x0);
    t0 = t_take;
    repeat ((ref_stop + 3) * TD) @(posedge clk);
    check(t_out.size() == ref_stop + 1, $sformatf("output events %0d, expected %0d", t_out.size(), ref_stop + 1));
    for (int n = 0; n < t_out.size() && n <= ref_stop; n++) begin
      check(t_out[n] == t0 + 6 * TG + longint'(n) * TD,
            $sformatf("output %0d at %0d, expected %0d", n, t_out[n] - t0, 6 * TG + n * TD));
      check(v_out[n] == ref_y[n], $sformatf("output %0d = %0d, expected %0d", n, v_out[n], ref_y[n]));
    end
    check(n_in_grp == 1, "one input-only group");
    check(n_r1 == 1, "one R1-only group (second loop)");
    check(n_r1r2 == ref_stop - 1, $sformatf("R1R2 groups %0d", n_r1r2));
    check(n_drop == 1, "one redundant event dropped");
    check(n_lone == 1, "one lone R2 event");
    check(!fifo_err, "no FIFO error");
    $display("test1: %0d output events, final y = %0d", t_out.size(), v_out[v_out.size()-1]);

    // ---- test 2: step at an arbitrary time, settle to DC gain * x
    begin
      int nbefore, x1;
      longint dc;
      x1 = -50;
      repeat (377) @(posedge clk);
      send(x1);
      repeat (700 * TD) @(posedge clk);
      nbefore = t_out.size();
      repeat (3 * TD) @(posedge clk);
      check(t_out.size() == nbefore, "loop silent after settling");
      dt_reference(x1, 2000);
      dc = ref_y[ref_y.size()-1];
      check(v_out[v_out.size()-1] - dc <= 32 && dc - v_out[v_out.size()-1] <= 32,
            $sformatf("settled output %0d, DT settles at %0d", v_out[v_out.size()-1], dc));
    end

    // ---- test 3: event detector off: events circulate, output holds
    begin
      int nb;
      data_t last;
      cfg.ed_en = 1'b0;
      send(-50);  // same value again
      repeat (600 * TD) @(posedge clk);
      nb = t_out.size();
      last = v_out[nb-1];
      repeat (4 * TD) @(posedge clk);
      check(t_out.size() - nb == 4, $sformatf("events circulate with detector off (%0d)", t_out.size() - nb));
      check(v_out[v_out.size()-1] - last <= 8 && last - v_out[v_out.size()-1] <= 8, "output holds");
      check(!fifo_err, "no FIFO error");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
