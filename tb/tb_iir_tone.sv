// tb_iir_tone: frequency response of the sixth-order CT digital IIR filter with tones.
//
// A sine of amplitude A (7-bit, two's complement) is quantised in continuous time: the
// input is looked at every 50 ns (a 20 MHz converter whose output is held) and an input
// event is sent only when the quantised value changes, so events come at the rate the
// signal moves, not at a clock rate. The filter runs at its defaults (TD = 40 tg = 1000
// ticks, default coefficients, event detector on).
// A CT digital filter with tap delay TD has the frequency response of its DT twin with
// z = exp(j*2*pi*f*TD). After the filter has settled, the output swing over two periods
// is measured and compared with A * 256 * |H| worked out here from the coefficients:
//   H(z) = g_in/256 * prod_s (ff0 + ff1 z^-1 + ff2 z^-2)/256 / (1 - fb1/256 z^-1 - fb2/256 z^-2)
// Tones: one in the passband (10 kHz), one near the band edge (40 kHz) and one in the
// stopband (200 kHz). The tolerance covers the input quantisation (half an input LSB,
// 128 output LSB, times the gain) and the sparse output sampling of the peak.
// The amplitude is drawn at random (40..60); the start phase is random too.
module tb_iir_tone;
  import ctdsp_pkg::*;

  localparam int  TG = 25;
  localparam int  TD = 40 * TG;
  localparam real PI = 3.14159265358979;

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

  // swing of the output while measuring
  logic  meas = 1'b0;
  data_t y_max = '0, y_min = '0;
  int    n_out = 0;
  always @(posedge clk) if (rst_n && out_req && out_ack) begin
    n_out <= n_out + 1;
    if (meas) begin
      if (out_data > y_max) y_max <= out_data;
      if (out_data < y_min) y_min <= out_data;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // |H(exp(j w TD))| of the default coefficient set
  function automatic real mag_h(real f);
    real w, re_n, im_n, re_d, im_d, m;
    w = 2.0 * PI * f * real'(TD) * 1.0e-9;
    m = real'(cfg.g_in) / 256.0;
    for (int s = 0; s < 3; s++) begin
      re_n = (real'(cfg.sec[s].ff0) + real'(cfg.sec[s].ff1) * $cos(w) + real'(cfg.sec[s].ff2) * $cos(2.0 * w)) / 256.0;
      im_n = -(real'(cfg.sec[s].ff1) * $sin(w) + real'(cfg.sec[s].ff2) * $sin(2.0 * w)) / 256.0;
      re_d = 1.0 - (real'(cfg.sec[s].fb1) * $cos(w) + real'(cfg.sec[s].fb2) * $cos(2.0 * w)) / 256.0;
      im_d = (real'(cfg.sec[s].fb1) * $sin(w) + real'(cfg.sec[s].fb2) * $sin(2.0 * w)) / 256.0;
      m = m * $sqrt((re_n * re_n + im_n * im_n) / (re_d * re_d + im_d * im_d));
    end
    return m;
  endfunction

  task automatic send(int v);
    @(negedge clk);
    in_data = INW'(v);
    in_req  = 1'b1;
    while (!in_ack) @(negedge clk);
    @(negedge clk);
    in_req  = 1'b0;
  endtask

  // one tone: settle for n_settle ticks, then measure the swing for n_meas ticks
  task automatic tone(real f, int amp, longint n_settle, longint n_meas);
    longint t_start, t_next;
    real    ph, exp_amp, got_amp, tol, h;
    int     v, last;
    ph      = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    h       = mag_h(f);
    exp_amp = real'(amp) * 256.0 * h;
    last    = 9999;
    t_start = cyc;
    t_next  = cyc;
    while (cyc - t_start < n_settle + n_meas) begin
      if (cyc - t_start >= n_settle && !meas) begin
        meas  = 1'b1;
        y_max = out_data;
        y_min = out_data;
      end
      v = int'($floor(real'(amp) * $sin(2.0 * PI * f * real'(cyc - t_start) * 1.0e-9 + ph) + 0.5));
      if (v != last) begin
        send(v);
        last = v;
      end
      t_next += 50;
      while (cyc < t_next) @(negedge clk);
    end
    meas    = 1'b0;
    got_amp = (real'(y_max) - real'(y_min)) / 2.0;
    tol     = 0.06 * exp_amp + 256.0 * h + 200.0;
    $display("tone %0.0f Hz: amplitude %0d, |H| = %0.4f, output swing %0.1f, expected %0.1f",
             f, amp, h, got_amp, exp_amp);
    check(got_amp <= exp_amp + tol && got_amp >= exp_amp - tol,
          $sformatf("tone %0.0f Hz: output amplitude %0.1f, expected %0.1f +- %0.1f", f, got_amp, exp_amp, tol));
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int amp;
    cfg = default_cfg();
    amp = 40 + int'($urandom_range(0, 20));
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);

    tone(10_000.0, amp, 400_000, 200_000);   // passband
    tone(40_000.0, amp, 300_000, 50_000);    // near the band edge
    tone(200_000.0, amp, 300_000, 10_000);   // stopband
    check(mag_h(200_000.0) < 0.05, "200 kHz lies in the stopband of the default response");
    check(!fifo_err, "no FIFO error");
    check(n_out > 1000, "the filter produced output events");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
