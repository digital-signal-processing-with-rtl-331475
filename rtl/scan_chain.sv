// scan_chain: serial configuration register of the CT digital IIR filter system.
//
// All settings of the system (IIR coefficients and input gain, the lengths of the two
// tap delays, event-detector enable and resolution, the number of interpolator sections
// with their delays and coefficients, thermometer use in the CT-to-DT converter) form one
// configuration word, cfg_t. It is shifted in one bit per clock while scan_en is high,
// most significant bit first, and copied to cfg on scan_update, so the running filter
// never sees a half-shifted word. scan_out is the last bit of the shift register, so
// chains can be cascaded or read back.
// Reset loads the default configuration into both registers.
// The bit order, update strobe and reset values are this design's choice.
module scan_chain
  import ctdsp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,
  input  logic scan_in,
  input  logic scan_update,
  output logic scan_out,
  output cfg_t cfg
);

  logic [CFG_W-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh  <= default_cfg();
      cfg <= default_cfg();
    end else begin
      if (scan_en)     sh  <= {sh[CFG_W-2:0], scan_in};
      if (scan_update) cfg <= cfg_t'(sh);
    end
  end

  assign scan_out = sh[CFG_W-1];

endmodule
