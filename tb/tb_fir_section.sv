// tb_fir_section: self-checking test of one first-order CT digital FIR section,
// y(t) = c0*x(t) + c1*x(t - tau), tau = n_cells*tg (+ a half cell when half_en is set).
//
// Phase A (isolated events, further apart than tau + 2 tg): each input event at t must
// give exactly two output events, at t + tg with c0*x + c1*x_old and at t + tau + tg with
// (c0 + c1)*x (x_old: the previous input value). Random n_cells, half cell on and off,
// random coefficients. Phase B (dense events, tg..3 tg apart, so that up to
// tau/tg events are in the line): nothing is lost (no FIFO error), the number of output
// events lies between the number of inputs and twice that, and after the input stops
// the last output is (c0 + c1) times the last input.
module tb_fir_section;
  import ctdsp_pkg::*;

  localparam int TG = 25, TH = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic [NCW-1:0] n_cells = 7'd20;
  logic  half_en = 1'b0;
  coef_t c0 = 10'sd128, c1 = 10'sd128;
  logic  in_req = 1'b0, in_ack, out_req, fifo_err;
  data_t in_data = '0, out_data;

  fir_section dut (.clk, .rst_n, .tune(8'(TG)), .tune_half(8'(TH)), .n_cells, .half_en, .c0, .c1,
                   .in_req, .in_ack, .in_data, .out_req, .out_ack(1'b1), .out_data, .fifo_err);

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

  function automatic data_t fir(data_t a, data_t b);
    longint acc = (longint'(a) * c0 + longint'(b) * c1) >>> 8;
    if (acc > 32767) return 16'sh7fff;
    if (acc < -32768) return 16'sh8000;
    return data_t'(acc);
  endfunction

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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t x, xold;
    int tau, nin;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    xold = '0;
    // phase A
    for (int r = 0; r < 30; r++) begin
      n_cells = 7'($urandom_range(1, 30));
      half_en = $urandom_range(0, 1);
      c0 = coef_t'($urandom_range(0, 300) - 150);
      c1 = coef_t'($urandom_range(0, 300) - 150);
      tau = n_cells * TG + (half_en ? TH : 0);
      for (int k = 0; k < 4; k++) begin
        x = data_t'($urandom);
        o_t.delete(); o_v.delete();
        send(x);
        repeat (tau + 3 * TG) @(negedge clk);
        check(o_t.size() == 2, $sformatf("two outputs per isolated input (%0d)", o_t.size()));
        if (o_t.size() == 2) begin
          check(o_t[0] == t_take + TG, $sformatf("direct output after %0d ticks", o_t[0] - t_take));
          check(o_t[1] == t_take + tau + TG, $sformatf("delayed output after %0d ticks, tau %0d", o_t[1] - t_take, tau));
          check(o_v[0] == fir(x, xold), $sformatf("direct output value %0d, expected %0d (x %0d xold %0d c %0d %0d n %0d h %0d xh %0d fq %0d wp %0d rp %0d err %0d)", o_v[0], fir(x, xold), x, xold, c0, c1, n_cells, half_en, dut.x_hold, dut.fifo_q, dut.u_fifo.wp, dut.u_fifo.rp1, fifo_err));
          check(o_v[1] == fir(x, x), $sformatf("delayed output value %0d, expected %0d (x %0d c %0d %0d)", o_v[1], fir(x, x), x, c0, c1));
        end
        xold = x;
      end
    end
    // phase B: the full line (n = 30 cells, 30 events in flight at tg spacing)
    n_cells = 7'd30;
    half_en = 1'b1;
    c0 = 10'sd128; c1 = 10'sd128;
    o_t.delete(); o_v.delete();
    nin = 0;
    for (int k = 0; k < 400; k++) begin
      x = data_t'($urandom_range(0, 20000) - 10000);
      send(x);
      nin++;
      repeat ($urandom_range(TG, 3 * TG) - 2) @(negedge clk);
    end
    repeat (30 * TG + 4 * TG) @(negedge clk);
    check(!fifo_err, "no FIFO error with a full line");
    check(o_t.size() >= nin && o_t.size() <= 2 * nin, $sformatf("%0d outputs for %0d inputs", o_t.size(), nin));
    check(o_v[o_v.size() - 1] == fir(x, x), "settles to (c0+c1)*x");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
