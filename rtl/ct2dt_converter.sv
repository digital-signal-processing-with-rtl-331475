// ct2dt_converter: turns the CT digital output into a synchronous (DT) digital signal.
//
// Sampling a CT digital word with a clock can catch a bit while it changes. Two
// flip-flops in series make the sample settle, but possibly to a wrong value: if several
// bits of a binary word change at once, the sample can be far from both the old and the
// new value. The output of the filter, however, changes slowly compared with the event
// rate: between two events it moves by at most max-slope * tg, below 2^11.3 LSB here. So
// the eight most significant bits are turned into a 255-bit thermometer code, in which a
// small change flips only a few neighbouring bits, and a bit caught mid-change costs at
// most one thermometer step. After the two sampling flip-flops the thermometer code is
// counted back into binary. The lower eight bits are sampled as they are.
// With therm_en low the 16-bit word is sampled directly. en (the system's sel) enables
// the converter; while it is low the output holds.
//
// Interface: ct_data (a CT value, held between events) and dt_data, updated on clk_dt.
// Timing: dt_data shows the value ct_data had three clk_dt edges earlier (two sampling
// flip-flops and the output register). The signed word is offset by 2^15 (made
// unsigned) before the thermometer conversion and back after it.
module ct2dt_converter
  import ctdsp_pkg::*;
(
  input  logic  clk_dt,
  input  logic  rst_n,
  input  logic  en,
  input  logic  therm_en,
  input  data_t ct_data,
  output data_t dt_data
);

  logic [15:0]  u;
  logic [254:0] therm;
  logic [254:0] t_s1, t_s2;
  logic [7:0]   lo_s1, lo_s2, hi_s1, hi_s2;
  logic         m_s1, m_s2;
  logic [7:0]   hi_dec;

  assign u = ct_data ^ 16'h8000;

  always_comb begin
    for (int i = 0; i < 255; i++) therm[i] = (u[15:8] > 8'(i));
  end

  always_ff @(posedge clk_dt or negedge rst_n) begin
    if (!rst_n) begin
      t_s1 <= '0; t_s2 <= '0;
      lo_s1 <= '0; lo_s2 <= '0; hi_s1 <= 8'h80; hi_s2 <= 8'h80;
      m_s1 <= 1'b0; m_s2 <= 1'b0;
    end else if (en) begin
      t_s1  <= therm_en ? therm : '0;
      hi_s1 <= therm_en ? 8'h00 : u[15:8];
      lo_s1 <= u[7:0];
      m_s1  <= therm_en;
      t_s2  <= t_s1;
      hi_s2 <= hi_s1;
      lo_s2 <= lo_s1;
      m_s2  <= m_s1;
    end
  end

  always_comb begin
    hi_dec = '0;
    for (int i = 0; i < 255; i++) hi_dec += 8'(t_s2[i]);
  end

  always_ff @(posedge clk_dt or negedge rst_n) begin
    if (!rst_n)  dt_data <= '0;
    else if (en) dt_data <= data_t'({m_s2 ? hi_dec : hi_s2, lo_s2} ^ 16'h8000);
  end

endmodule
