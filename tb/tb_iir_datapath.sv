// tb_iir_datapath: self-checking test of the data path of the CT IIR filter (FIFO1..3,
// DFF1..DFF8 and the adders ADD1..ADD4), driven directly by the control strobes.
//
// The testbench plays the part of the timing block: for loop pass n it gives, in the
// order the timing block would, the FIFO1 read (one cell before the tap ends), the
// R1/R2 takes, req_grp with the group tag (IN for the first pass, R1 for the second,
// R1R2 after), the pipeline stage strobes P1..P4 and finally the FIFO write of the three
// state words (which the event detector would pass on). After each pass the output word
// and the three state words must equal a DT reference of three direct-form-II biquads
// with the same fixed-point arithmetic. Then a lone R2 group must advance the FIFO read
// pointers of ports 2 without changing any register, and no FIFO error may occur.
module tb_iir_datapath;
  import ctdsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  cfg_t cfg;
  logic in_take = 0, r1_take = 0, r2_take = 0, f1_rd1 = 0, f1_rd2 = 0, grp_fire = 0, wr = 0;
  logic [INW-1:0] in_data = '0;
  grp_t grp_tag = GRP_NONE, p1_tag = GRP_NONE;
  logic [4:0] pipe_fire = '0;
  data_t q1 = '0, q2 = '0, q3 = '0, data1, data2, data3, out_data;
  logic fifo_err;

  iir_datapath dut (.clk, .rst_n, .cfg, .in_take, .in_data, .r1_take, .r2_take, .f1_rd1, .f1_rd2,
                    .grp_fire, .grp_tag, .pipe_fire, .p1_tag, .wr, .q1, .q2, .q3,
                    .data1, .data2, .data3, .out_data, .fifo_err);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic data_t sat(longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return data_t'(v);
  endfunction

  // one-tick strobe
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0; @(negedge clk);
  endtask
  task automatic pipe(int i);
    @(negedge clk); pipe_fire[i] = 1'b1; @(negedge clk); pipe_fire[i] = 1'b0; @(negedge clk);
  endtask
  task automatic group(grp_t t);
    @(negedge clk); grp_tag = t; grp_fire = 1'b1; @(negedge clk); grp_fire = 1'b0; @(negedge clk);
    pipe_fire[0] = 1'b1; p1_tag = t; @(negedge clk); pipe_fire[0] = 1'b0; @(negedge clk);
  endtask

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint w [3][3], xs;
    data_t yref;
    data_t s1, s2, s3, sy;
    biquad_t b [3];
    cfg = default_cfg();
    for (int s = 0; s < 3; s++) begin
      b[s] = cfg.sec[s];
      for (int k = 0; k < 3; k++) w[s][k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      int x;
      x = (n < 30) ? 50 : -37;
      if (n == 0 || n == 30) begin
        in_data = INW'(x);
        pulse(in_take);
      end
      xs = longint'(x) * 256;
      // reference pass n
      w[0][0] = sat((longint'(cfg.g_in) * xs + longint'(b[0].fb1) * w[0][1] + longint'(b[0].fb2) * w[0][2]) >>> 8);
      w[1][0] = sat((longint'(b[0].ff0) * w[0][0] + longint'(b[0].ff1) * w[0][1] + longint'(b[0].ff2) * w[0][2]
                   + longint'(b[1].fb1) * w[1][1] + longint'(b[1].fb2) * w[1][2]) >>> 8);
      w[2][0] = sat((longint'(b[1].ff0) * w[1][0] + longint'(b[1].ff1) * w[1][1] + longint'(b[1].ff2) * w[1][2]
                   + longint'(b[2].fb1) * w[2][1] + longint'(b[2].fb2) * w[2][2]) >>> 8);
      yref = sat((longint'(b[2].ff0) * w[2][0] + longint'(b[2].ff1) * w[2][1] + longint'(b[2].ff2) * w[2][2]) >>> 8);
      // strobes of pass n
      if (n >= 1) begin pulse(f1_rd1); pulse(r1_take); end
      if (n >= 2) begin pulse(f1_rd2); pulse(r2_take); end
      group(n == 0 ? GRP_IN : n == 1 ? GRP_R1 : GRP_R1R2);
      for (int i = 1; i < 4; i++) pipe(i);
      check(out_data == yref, $sformatf("pass %0d: y = %0d, expected %0d", n, out_data, yref));
      check(data1 == data_t'(w[0][0]) && data2 == data_t'(w[1][0]) && data3 == data_t'(w[2][0]),
            $sformatf("pass %0d: state words", n));
      q1 = data1; q2 = data2; q3 = data3;
      pulse(wr);
      for (int s = 0; s < 3; s++) begin w[s][2] = w[s][1]; w[s][1] = w[s][0]; end
    end
    // lone R2: port 2 of FIFO1 is read by the tap, FIFO2 and FIFO3 skip one word
    s1 = data1; s2 = data2; s3 = data3; sy = out_data;
    pulse(f1_rd1);       // the last written word: its R1 will be dropped by the detector
    pulse(f1_rd2);
    group(GRP_R2);
    check(data1 == s1 && data2 == s2 && data3 == s3 && out_data == sy, "lone R2 changes nothing");
    check(dut.u_fifo2.rp2 == dut.u_fifo1.rp2 && dut.u_fifo3.rp2 == dut.u_fifo1.rp2, "port 2 pointers aligned");
    check(!fifo_err, "no FIFO error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
