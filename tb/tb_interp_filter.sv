// tb_interp_filter: self-checking test of the interpolation filter (up to four cascaded
// first-order CT FIR sections, default delays 20, 10, 5 and 2.5 tg, gains 1/2 + 1/2).
//
// For each number of sections used (0..4) a series of isolated steps is applied. Checks:
// the first output event leaves n_fir * tg after the input (0: the same tick); every
// output value lies between the old and the new level (each section averages two held
// values); the last output equals the new level; the number of output events per step is
// between 1 and 2^n_fir. A dense series of events (tg apart) must pass without a FIFO
// error and settle to the last value.
module tb_interp_filter;
  import ctdsp_pkg::*;

  localparam int TG = 25;
  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  cfg_t  cfg;
  logic  in_req = 1'b0, in_ack, out_req, fifo_err;
  data_t in_data = '0, out_data;

  interp_filter dut (.clk, .rst_n, .cfg, .tune(8'(TG)), .tune_half(8'(TG / 2)), .in_req, .in_ack, .in_data,
                     .out_req, .out_ack(1'b1), .out_data, .fifo_err);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  longint o_t [$];
  data_t  o_v [$];
  longint t_take;
  always @(posedge clk) if (rst_n) begin
    if (out_req) begin o_t.push_back(cyc); o_v.push_back(out_data); end
    if (in_req && in_ack) t_take <= cyc;
  end

  task automatic send(data_t v);
    @(negedge clk);
    in_data = v;
    in_req = 1'b1;
    #0.1;
    while (!in_ack) @(negedge clk);
    @(negedge clk);
    in_req = 1'b0;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t x, xold, lo, hi;
    bit in_rng;
    cfg = default_cfg();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    xold = '0;
    for (int n = 0; n <= 4; n++) begin
      cfg.n_fir = 3'(n);
      for (int k = 0; k < 10; k++) begin
        x = data_t'($urandom_range(0, 60000) - 30000);
        o_t.delete(); o_v.delete();
        send(x);
        repeat (45 * TG) @(negedge clk);
        lo = (x < xold) ? x : xold;
        hi = (x < xold) ? xold : x;
        check(o_t.size() >= 1 && o_t.size() <= (1 << n), $sformatf("n_fir %0d: %0d outputs", n, o_t.size()));
        if (o_t.size() > 0) begin
          check(o_t[0] == t_take + n * TG, $sformatf("n_fir %0d: first output after %0d ticks", n, o_t[0] - t_take));
          in_rng = 1'b1;
          foreach (o_v[i]) if (o_v[i] < lo || o_v[i] > hi) in_rng = 1'b0;
          check(in_rng, $sformatf("n_fir %0d: outputs between the two levels", n));
          check(o_v[o_v.size() - 1] == x, $sformatf("n_fir %0d: settles at %0d, expected %0d", n, o_v[o_v.size() - 1], x));
        end
        xold = x;
      end
    end
    // dense events
    for (int k = 0; k < 300; k++) begin
      x = data_t'($urandom_range(0, 60000) - 30000);
      send(x);
      repeat (TG - 2) @(negedge clk);
    end
    repeat (45 * TG) @(negedge clk);
    check(!fifo_err, "no FIFO error with dense events");
    check(o_v[o_v.size() - 1] == x, "dense: settles at the last value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
