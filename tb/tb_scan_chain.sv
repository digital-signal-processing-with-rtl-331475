// tb_scan_chain: self-checking test of the configuration scan chain.
//
// After reset the configuration must be the built-in default. Random configurations are
// shifted in MSB first; the applied configuration must not change cfg_old scan_update and
// must equal the shifted word after it. While a new word is shifted in, the old word must
// come out on scan_out, MSB first. With scan_en low the chain holds.
module tb_scan_chain;
  import ctdsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0, scan_in = 1'b0, scan_update = 1'b0, scan_out;
  cfg_t cfg;
  always #0.5 clk = ~clk;

  scan_chain dut (.clk, .rst_n, .scan_en, .scan_in, .scan_update, .scan_out, .cfg);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [CFG_W-1:0] w, prev, outw, cfg_old;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(cfg == default_cfg(), "default configuration after reset");
    prev = default_cfg();
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < CFG_W; i += 32) w[i +: 32] = $urandom;  // wide random word
      cfg_old = cfg;
      for (int i = CFG_W - 1; i >= 0; i--) begin
        @(negedge clk);
        outw[i] = scan_out;
        scan_in = w[i];
        scan_en = 1'b1;
        if ($urandom_range(0, 9) == 0) begin  // a pause in the shifting
          @(negedge clk);
          scan_en = 1'b0;
          @(negedge clk);
        end
      end
      @(negedge clk);
      scan_en = 1'b0;
      check(cfg == cfg_t'(cfg_old), "configuration unchanged before update");
      check(outw == prev, "old word shifted out MSB first");
      scan_update = 1'b1;
      @(negedge clk);
      scan_update = 1'b0;
      check(cfg == cfg_t'(w), "configuration equals shifted word");
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
