// tb_vr_dsp: self-checking test of the variable-rate FIR DSP.
//
// Reference: whatever the rate, the DSP must compute y = sum_k h[k] * x(t - k*T0), where
// x is the input held between samples (zero-order hold) and T0 = M base cycles. The
// testbench keeps the held input for every base cycle and checks every output of the DSP
// against that sum, taken at the cycle of the DSP clock that produced it.
// The input follows random rate profiles: slow stretches (a sample every M cycles),
// fast stretches (a sample every cycle), with random gaps (1..M cycles) at each switch,
// fast bursts shorter than the line, and a return to fast during the transition.
// Checks also: mode sequence SLOW -> FAST -> F2S -> SLOW; the transition lasts exactly
// K*M base cycles plus the wait for the next slow sample; the DSP clocks are the samples
// plus at most K*M + M dummy shifts per transition, i.e. the work follows the input rate.
// Last, the 80 ms example profile (1000 slow, 4000 fast, 2000 slow samples) must take
// 7000 DSP clocks plus about K*(M-1) dummy shifts, against 16000 for a fixed-rate DSP.
module tb_vr_dsp;
  localparam int K = 10, M = 4, XW = 8, HW = 12;
  localparam int YW = XW + HW + $clog2(K + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic smp_valid = 1'b0, fast = 1'b0, y_valid;
  logic signed [XW-1:0] smp_data = '0;
  logic signed [HW-1:0] h [K+1];
  logic signed [YW-1:0] y;
  logic [1:0] mode;

  vr_dsp #(.K(K), .M(M), .XW(XW), .HW(HW)) dut (.clk, .rst_n, .smp_valid, .smp_data, .fast, .h, .y_valid, .y, .mode);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // held input per base cycle
  logic signed [XW-1:0] zoh [longint];
  logic signed [XW-1:0] cur = '0;
  longint n_smp = 0, n_clk = 0, n_f2s = 0, f2s_start = -1;
  int     f2s_len [$];
  logic   sv_d = 1'b0;
  int     n_ent = 0;

  function automatic logic signed [YW-1:0] ref_y(longint c);
    logic signed [YW-1:0] acc = '0;
    for (int k = 0; k <= K; k++) begin
      longint cc = c - k * M;
      logic signed [XW-1:0] xv = '0;
      if (cc >= 0 && zoh.exists(cc)) xv = zoh[cc];
      acc += YW'(h[k]) * YW'(xv);
    end
    return acc;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (smp_valid) begin cur = smp_data; n_smp++; end
    zoh[cyc] = cur;
    if (y_valid) begin
      n_clk++;
      check(y == ref_y(cyc - 1), $sformatf("y = %0d, expected %0d (mode %0d)", y, ref_y(cyc - 1), mode));
    end
    if (y_valid && !sv_d) n_f2s++;  // DSP clocks without a new sample
    sv_d <= smp_valid;
  end

  // transition length
  logic [1:0] mode_q = 2'd0;
  always @(posedge clk) if (rst_n) begin
    if (mode == 2 && mode_q != 2) begin f2s_start = cyc; n_ent++; end
    if (mode == 0 && mode_q == 2) f2s_len.push_back(int'(cyc - f2s_start));
    mode_q <= mode;
  end

  // one sample g base cycles after the previous one; fast tells its rate
  task automatic sample_after(int g, bit f);
    @(negedge clk);
    smp_valid = 1'b0;
    fast = 1'b0;
    repeat (g - 1) @(negedge clk);
    fast = f;
    smp_valid = 1'b1;
    smp_data = XW'($urandom);
  endtask
  task automatic slow(int n, int first_gap);
    for (int i = 0; i < n; i++) sample_after(i == 0 ? first_gap : M, 1'b0);
  endtask
  task automatic fast_run(int n, int first_gap);
    for (int i = 0; i < n; i++) sample_after(i == 0 ? first_gap : 1, 1'b1);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= K; k++) h[k] = HW'($urandom_range(0, 4000) - 2000);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // random profiles
    for (int r = 0; r < 60; r++) begin
      slow($urandom_range(K + 2, 40), M);
      fast_run((r % 5 == 0) ? $urandom_range(1, K * M - 1) : $urandom_range(K * M, 150), $urandom_range(1, M));
      if (r % 7 == 3) begin  // back to fast during the transition
        slow($urandom_range(1, K - 2), $urandom_range(1, M));
        check(mode == 2, "still in transition");
        fast_run($urandom_range(5, 60), $urandom_range(1, M));
      end
      slow($urandom_range(K + 4, 40), $urandom_range(1, M));
      check(mode == 0, "back to SLOW");
    end
    // the 80 ms example: 20 ms at 50 kHz, 20 ms at 200 kHz, 40 ms at 50 kHz (T0 = 20 us,
    // 16000 base cycles); a fixed-rate DSP at 200 kHz would clock 16000 times
    begin
      longint c0, k0;
      c0 = n_clk;
      k0 = cyc;
      slow(1000, M);
      fast_run(4000, 1);
      slow(2000, 1);
      @(negedge clk);
      smp_valid = 1'b0;
      repeat (M) @(negedge clk);
      $display("80 ms example: %0d DSP clocks in %0d base cycles (%.2f times fewer)", n_clk - c0, cyc - k0,
               real'(cyc - k0) / real'(n_clk - c0));
      check(n_clk - c0 >= 7000 + K * (M - 1) && n_clk - c0 <= 7000 + K * M + M,
            $sformatf("80 ms example: %0d DSP clocks, expected 7000 + about K*(M-1) dummy clocks", n_clk - c0));
    end
    foreach (f2s_len[i])
      check(f2s_len[i] >= K * M && f2s_len[i] < K * M + M + 1, $sformatf("transition %0d cycles", f2s_len[i]));
    check(n_clk == n_smp + n_f2s, $sformatf("DSP clocks %0d = samples %0d + dummy clocks %0d", n_clk, n_smp, n_f2s));
    check(n_f2s <= n_ent * (K * M + M), $sformatf("%0d dummy clocks for %0d transitions", n_f2s, n_ent));
    $display("samples %0d, DSP clocks %0d, base cycles %0d", n_smp, n_clk, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
