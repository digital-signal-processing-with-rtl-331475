// tb_ct2dt_converter: self-checking test of the CT-to-DT converter.
//
// The CT value changes at random times between the 1 MHz sampling edges (every 1000
// ticks), sometimes close to an edge. With the thermometer path on and off, the output
// after each edge must equal the CT value that was present three sampling edges earlier
// (two synchronising flip-flops and the output register). All 256 values of the upper
// byte are visited (4000 random samples). With en low the output holds.
module tb_ct2dt_converter;
  import ctdsp_pkg::*;

  logic  clk_dt = 1'b0, rst_n = 1'b0, en = 1'b1, therm_en = 1'b1;
  data_t ct_data = '0, dt_data;
  always #500 clk_dt = ~clk_dt;  // 1 MHz with 1 ns ticks

  ct2dt_converter dut (.clk_dt, .rst_n, .en, .therm_en, .ct_data, .dt_data);

  int checks = 0, failures = 0;
  data_t hist [$];

  // the value sampled at each rising edge
  always @(posedge clk_dt) if (rst_n && en) hist.push_back(ct_data);

  // change the CT value at random times, never on an edge
  initial begin
    forever begin
      #($urandom_range(1, 998));
      @(negedge clk_dt);
      #($urandom_range(1, 499));
      ct_data = data_t'({8'($urandom_range(0, 255)), 8'($urandom)});
    end
  end

  initial begin
    #100ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    data_t held;
    #1700 rst_n = 1'b1;
    for (int ph = 0; ph < 2; ph++) begin
      therm_en = (ph == 0);
      repeat (4) @(posedge clk_dt);
      hist.delete();
      for (int k = 0; k < 2000; k++) begin
        @(posedge clk_dt);
        #1;
        if (hist.size() >= 3) begin
          checks++;
          if (dt_data !== hist[hist.size() - 3]) begin
            failures++;
            $display("FAIL: therm_en=%0d dt=%h expected %h", therm_en, dt_data, hist[hist.size() - 3]);
          end
        end
      end
    end
    en = 1'b0;
    repeat (2) @(posedge clk_dt);
    held = dt_data;
    repeat (5) @(posedge clk_dt);
    checks++;
    if (dt_data !== held) begin failures++; $display("FAIL: output not held with en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
