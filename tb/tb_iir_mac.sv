// tb_iir_mac: self-checking test of the multiply-accumulate block used for the adders
// of the IIR data path (ADD1..ADD4).
//
// Random 16-bit words and 10-bit coefficients, plus corner cases (largest magnitudes,
// which must saturate, and exact negative values, which must round toward minus
// infinity). The result must equal floor(sum d*c / 256) clipped to 16 bits.
module tb_iir_mac;
  import ctdsp_pkg::*;

  data_t d [5];
  coef_t c [5];
  data_t y;

  iir_mac #(.N(5)) dut (.d, .c, .y);

  int checks = 0, failures = 0;

  function automatic data_t model();
    longint acc = 0;
    for (int i = 0; i < 5; i++) acc += longint'(d[i]) * longint'(c[i]);
    acc = acc >>> 8;
    if (acc > 32767) return 16'sh7fff;
    if (acc < -32768) return 16'sh8000;
    return data_t'(acc);
  endfunction

  task automatic try(string what);
    data_t e;
    #1;
    e = model();
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", what, y, e);
    end
  endtask

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin d[i] = '0; c[i] = '0; end
    try("zero");
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < 5; i++) begin
        d[i] = data_t'($urandom);
        c[i] = coef_t'($urandom);
        if (k % 3 == 0) d[i] = data_t'($signed(d[i]) >>> 4);  // also small words
      end
      try("random");
    end
    for (int i = 0; i < 5; i++) begin d[i] = 16'sh7fff; c[i] = 10'sh1ff; end
    try("positive saturation");
    for (int i = 0; i < 5; i++) begin d[i] = 16'sh8000; c[i] = 10'sh1ff; end
    try("negative saturation");
    for (int i = 0; i < 5; i++) begin d[i] = '0; c[i] = '0; end
    d[0] = -16'sd1; c[0] = 10'sd1;
    try("floor of -1/256 is -1");
    d[0] = -16'sd256; c[0] = 10'sd1;
    try("-256/256 is -1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
