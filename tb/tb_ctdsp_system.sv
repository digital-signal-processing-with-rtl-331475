// tb_ctdsp_system: self-checking test of the complete CT digital IIR filter system
// (scan chain, sixth-order IIR filter, interpolation filter, CT-to-DT converter).
//
// 1. After reset the built-in configuration is active; a new configuration is shifted
//    in (event detector resolution 14 bits, two interpolation sections) and applied.
// 2. A step input: the loop probes must toggle every TD = 1000 ticks (probe2, end of
//    tap 1) and 1012 ticks later (probe3, end of tap 2); the loop must stop by itself;
//    the CT output must settle at the IIR filter's settled output (interpolation gain 1).
// 3. With sel high the converter output, sampled by the 1 MHz clock, must equal the
//    settled CT output and sys_out must select it; with sel low sys_out is the CT value.
// 4. A random series of input events (a held DT signal with random sample spacing)
//    must run without FIFO errors and settle again.
module tb_ctdsp_system;
  import ctdsp_pkg::*;

  logic clk = 1'b0, clk_dt = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;
  always #500 clk_dt = ~clk_dt;

  logic scan_en = 1'b0, scan_in = 1'b0, scan_update = 1'b0, scan_out;
  logic req_in = 1'b0, ack_in, sel = 1'b0, ct_req, probe1, probe2, probe3, err;
  logic [INW-1:0] data_in = '0;
  data_t ct_data, dt_data, sys_out;

  ctdsp_system dut (.clk, .rst_n, .clk_dt, .tune_b1(8'd25), .tune_b2(8'd25), .tune_bhalf(8'd12),
                    .scan_en, .scan_in, .scan_update, .scan_out, .req_in, .ack_in, .data_in, .sel,
                    .ct_req, .ct_data, .dt_data, .sys_out, .probe1, .probe2, .probe3, .err);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  longint p2_t [$], p3_t [$];
  logic p2_q = 1'b0, p3_q = 1'b0;
  int n_ct = 0;
  always @(posedge clk) if (rst_n) begin
    if (probe2 != p2_q) p2_t.push_back(cyc);
    if (probe3 != p3_q) p3_t.push_back(cyc);
    p2_q <= probe2;
    p3_q <= probe3;
    if (ct_req) n_ct++;
  end

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
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_t c;
    logic [CFG_W-1:0] w;
    data_t settled;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(dut.cfg == default_cfg(), "default configuration");
    // 1. scan in a configuration
    c = default_cfg();
    c.ed_res = 3'd5;
    c.n_fir  = 3'd2;
    w = c;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk); scan_en = 1'b1; scan_in = w[i];
    end
    @(negedge clk); scan_en = 1'b0; scan_update = 1'b1;
    @(negedge clk); scan_update = 1'b0;
    check(dut.cfg == c, "configuration applied by the scan chain");
    // 2. step
    p2_t.delete(); p3_t.delete();
    send(45);
    repeat (400_000) @(negedge clk);
    check(p2_t.size() > 10, $sformatf("%0d loop passes", p2_t.size()));
    for (int i = 1; i < p2_t.size(); i++) check(p2_t[i] - p2_t[i-1] == 1000, "probe2 period TD = 1000");
    for (int i = 0; i < p3_t.size() && i < p2_t.size(); i++) check(p3_t[i] - p2_t[i] == 1012, "probe3 1012 after probe2");
    check(p2_t.size() > 0 && cyc - p2_t[p2_t.size() - 1] > 2000, "loop stopped by the event detector");
    settled = dut.u_iir.out_data;
    check(ct_data == settled, $sformatf("CT output %0d, IIR output %0d", ct_data, settled));
    check(settled > 11000 && settled < 13000, $sformatf("DC gain about 1 (%0d for %0d)", settled, 45 * 256));
    check(sys_out == ct_data, "sys_out = CT value with sel low");
    // 3. converter
    sel = 1'b1;
    repeat (5) @(posedge clk_dt);
    @(negedge clk);
    check(dt_data == ct_data && sys_out == dt_data, $sformatf("DT output %0d, CT %0d", dt_data, ct_data));
    // 4. random held DT input
    for (int k = 0; k < 300; k++) begin
      send($urandom_range(0, 100) - 50);
      repeat ($urandom_range(40, 3000)) @(negedge clk);
    end
    send(-20);
    repeat (600_000) @(negedge clk);
    check(!err, "no FIFO error");
    check(ct_data == dut.u_iir.out_data, "settled after random input");
    check(cyc - p2_t[p2_t.size() - 1] > 2000, "loop stopped after random input");
    $display("CT output events: %0d", n_ct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
