// tb_dsp_top: end-to-end test of the top level, at full size (no parameter override).
//
// CT IIR system: a scan load, then a long random CT digital input (events from 3 ticks
// to 4 TD apart, including bursts faster than tg), a quiet phase, and the DT output.
// Variable-rate DSP: rate profiles of slow and fast sampling, checked sample by sample
// against y = sum h[k] x(t - k*T0) on the held input.
// Each mechanism of the design is counted and a mechanism that never occurs is a failure:
//   grouping: input-only, R1-only, R1R2 groups, lone R2, input collision, window
//   extension; event detector drops; interpolation groups with both a direct and a
//   delayed event; scan update; CT-to-DT conversion; VR slow->fast expansion, fast->slow
//   transition completed, return to fast during a transition.
// Value checks: after the input stops the loop stops, the CT output equals the IIR
// output (interpolation gain 1), the DT output equals the CT output, no FIFO error, and
// every VR output matches its reference.
module tb_dsp_top;
  import ctdsp_pkg::*;

  localparam int K = 10, M = 4, XW = 8, HW = 12;
  localparam int YW = XW + HW + $clog2(K + 1);

  logic clk = 1'b0, clk_dt = 1'b0, vr_clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;       // 1 ns time base
  always #500 clk_dt = ~clk_dt; // 1 MHz converter clock
  always #2.5 vr_clk = ~vr_clk; // VR base clock (time scaled)

  logic scan_en = 1'b0, scan_in = 1'b0, scan_update = 1'b0, scan_out;
  logic req_in = 1'b0, ack_in, sel = 1'b0, ct_req, probe1, probe2, probe3, err;
  logic [INW-1:0] data_in = '0;
  data_t ct_data, dt_data, sys_out;
  logic vr_smp_valid = 1'b0, vr_fast = 1'b0, vr_y_valid;
  logic signed [XW-1:0] vr_smp_data = '0;
  logic signed [HW-1:0] vr_h [K+1];
  logic signed [YW-1:0] vr_y;
  logic [1:0] vr_mode;

  dsp_top dut (
    .rst_n, .clk, .clk_dt, .tune_b1(8'd25), .tune_b2(8'd25), .tune_bhalf(8'd12),
    .scan_en, .scan_in, .scan_update, .scan_out, .req_in, .ack_in, .data_in, .sel,
    .ct_req, .ct_data, .dt_data, .sys_out, .probe1, .probe2, .probe3, .err,
    .vr_clk, .vr_smp_valid, .vr_smp_data, .vr_fast, .vr_h, .vr_y_valid, .vr_y, .vr_mode);

  int checks = 0, failures = 0;
  longint cyc = 0, vcyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge vr_clk) vcyc <= vcyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // ---------------- mechanism counters
  int n_grp_in = 0, n_grp_r1 = 0, n_grp_r1r2 = 0, n_lone = 0, n_collide = 0, n_extend = 0, n_drop = 0;
  int n_fir_both = 0, n_scan = 0, n_conv = 0, n_expand = 0, n_f2s_done = 0, n_f2s_back = 0, n_ct = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ct.u_iir.grp_fire) begin
      if (dut.u_ct.u_iir.grp_tag == GRP_IN)   n_grp_in++;
      if (dut.u_ct.u_iir.grp_tag == GRP_R1)   n_grp_r1++;
      if (dut.u_ct.u_iir.grp_tag == GRP_R1R2) n_grp_r1r2++;
    end
    if (dut.u_ct.u_iir.r2_lone)    n_lone++;
    if (dut.u_ct.u_iir.in_collide) n_collide++;
    if (dut.u_ct.u_iir.win_extend) n_extend++;
    if (dut.u_ct.u_iir.ed_drop)    n_drop++;
    if (dut.u_ct.u_interp.g_sec[0].u_sec.out_req && dut.u_ct.u_interp.g_sec[0].u_sec.out_a
        && dut.u_ct.u_interp.g_sec[0].u_sec.out_b) n_fir_both++;
    if (scan_update) n_scan++;
    if (ct_req) n_ct++;
  end

  // ---------------- VR reference (held input per base cycle)
  logic signed [XW-1:0] zoh [longint];
  logic signed [XW-1:0] cur = '0;
  logic [1:0] vm_q = 2'd0;
  int n_vr_out = 0, n_vr_smp = 0;
  function automatic logic signed [YW-1:0] ref_y(longint c);
    logic signed [YW-1:0] acc = '0;
    for (int k = 0; k <= K; k++) begin
      longint cc = c - k * M;
      logic signed [XW-1:0] xv = '0;
      if (cc >= 0 && zoh.exists(cc)) xv = zoh[cc];
      acc += YW'(vr_h[k]) * YW'(xv);
    end
    return acc;
  endfunction
  always @(posedge vr_clk) if (rst_n) begin
    if (vr_smp_valid) begin cur = vr_smp_data; n_vr_smp++; end
    zoh[vcyc] = cur;
    if (vr_y_valid) begin
      n_vr_out++;
      check(vr_y == ref_y(vcyc - 1), $sformatf("VR y = %0d, expected %0d", vr_y, ref_y(vcyc - 1)));
    end
    if (dut.u_vr.expand) n_expand++;
    if (vr_mode == 2'd0 && vm_q == 2'd2) n_f2s_done++;
    if (vr_mode == 2'd1 && vm_q == 2'd2) n_f2s_back++;
    vm_q <= vr_mode;
  end

  task automatic vr_sample(int g, bit f);
    @(negedge vr_clk);
    vr_smp_valid = 1'b0;
    vr_fast = 1'b0;
    repeat (g - 1) @(negedge vr_clk);
    vr_fast = f;
    vr_smp_valid = 1'b1;
    vr_smp_data = XW'($urandom);
  endtask
  task automatic vr_run(int n, int g, bit f);
    for (int i = 0; i < n; i++) vr_sample(i == 0 ? g : (f ? 1 : M), f);
  endtask

  task automatic send(int v);
    @(negedge clk);
    data_in = INW'(v);
    req_in = 1'b1;
    #0.1;
    while (!ack_in) @(negedge clk);
    @(negedge clk);
    req_in = 1'b0;
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // VR stimulus
  initial begin
    for (int k = 0; k <= K; k++) vr_h[k] = HW'($urandom_range(0, 4000) - 2000);
    wait (rst_n);
    for (int r = 0; r < 40; r++) begin
      vr_run($urandom_range(K + 2, 60), M, 1'b0);
      vr_run($urandom_range(K * M, 200), $urandom_range(1, M), 1'b1);
      if (r % 4 == 1) begin
        vr_run($urandom_range(1, K - 2), $urandom_range(1, M), 1'b0);
        vr_run($urandom_range(5, 50), $urandom_range(1, M), 1'b1);
      end
      vr_run($urandom_range(K + 4, 60), $urandom_range(1, M), 1'b0);
    end
    @(negedge vr_clk);
    vr_smp_valid = 1'b0;
    vr_fast = 1'b0;
  end

  // CT stimulus and checks
  initial begin
    cfg_t c;
    logic [CFG_W-1:0] w;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // scan load: detector resolution 15 bits, everything else default
    c = default_cfg();
    c.ed_res = 3'd6;
    w = c;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk); scan_en = 1'b1; scan_in = w[i];
    end
    @(negedge clk); scan_en = 1'b0; scan_update = 1'b1;
    @(negedge clk); scan_update = 1'b0;
    check(dut.u_ct.cfg == c, "scan load applied");
    // a step, a quiet phase, then random events
    send(30);
    repeat (300_000) @(negedge clk);
    for (int k = 0; k < 3000; k++) begin
      send($urandom_range(0, 127) - 64);
      if (k % 50 < 5) repeat ($urandom_range(3, 30)) @(negedge clk);     // bursts
      else            repeat ($urandom_range(30, 4000)) @(negedge clk);
    end
    send(10);
    repeat (700_000) @(negedge clk);
    check(!err, "no FIFO error");
    check(ct_data == dut.u_ct.u_iir.out_data, $sformatf("CT output %0d equals IIR output %0d", ct_data, dut.u_ct.u_iir.out_data));
    // conversion
    sel = 1'b1;
    repeat (5) @(posedge clk_dt);
    @(negedge clk);
    check(dt_data == ct_data && sys_out == dt_data, "DT output equals the settled CT output");
    n_conv = (dt_data == ct_data);
    // mechanisms
    $display("groups IN %0d R1 %0d R1R2 %0d, lone R2 %0d, collisions %0d, window extensions %0d, ED drops %0d",
             n_grp_in, n_grp_r1, n_grp_r1r2, n_lone, n_collide, n_extend, n_drop);
    $display("FIR two-event groups %0d, scan updates %0d, CT output events %0d", n_fir_both, n_scan, n_ct);
    $display("VR: samples %0d outputs %0d expansions %0d transitions done %0d back to fast %0d",
             n_vr_smp, n_vr_out, n_expand, n_f2s_done, n_f2s_back);
    check(n_grp_in > 0, "input-only groups occur");
    check(n_grp_r1 > 0, "R1-only groups occur");
    check(n_grp_r1r2 > 0, "R1R2 groups occur");
    check(n_lone > 0, "lone R2 events occur");
    check(n_collide > 0, "input collisions occur");
    check(n_extend > 0, "window extensions occur");
    check(n_drop > 0, "event detector drops occur");
    check(n_fir_both > 0, "interpolation groups with two events occur");
    check(n_scan > 0, "scan update occurs");
    check(n_conv > 0, "conversion occurs");
    check(n_expand > 0, "VR slow->fast expansion occurs");
    check(n_f2s_done > 0, "VR fast->slow transition completes");
    check(n_f2s_back > 0, "VR return to fast during a transition occurs");
    check(n_vr_out > 0 && n_vr_out < vcyc, "VR DSP clocks fewer than base cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
