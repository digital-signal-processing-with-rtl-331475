// ctdsp_system: the complete CT digital IIR filter system.
//
// A CT digital signal (7-bit value plus an event request, from a level-crossing ADC or a
// held DT-ADC output) is filtered by the sixth-order CT IIR filter, cleaned of its
// repeated passbands by the interpolation filter, and turned into a synchronous 16-bit
// signal by the CT-to-DT converter. Processing happens only when events arrive, so the
// activity of the whole chain follows the input.
//
// Parts: scan_chain (configuration), iir_filter, interp_filter, ct2dt_converter. The
// interpolation filter's output value is held between events (ct_data) and is what the
// converter samples. sel high enables the converter and selects its output on sys_out;
// sel low selects the CT value. Three toggle flip-flops (probe1..3) change state at every
// input event, every event at the end of tap 1 and every event at the end of tap 2; they
// are the probes used to calibrate the loop delay (TD) and the second tap delay.
// Timing: one tick of clk stands for 1 ns. tune_b1 sets tg of the grouper, tap 1, the
// pipeline, the event detector and the interpolation filter; tune_b2 the tg cells of
// tap 2; tune_bhalf all half-delay cells. clk_dt is the sampling clock of the converter.
// The test mode of the chip (routing a chosen delay element to a pin) is not included.
module ctdsp_system
  import ctdsp_pkg::*;
#(
  parameter int TW             = 8,
  parameter int IIR_MAX_CELLS  = 64,
  parameter int IIR_FIFO_DEPTH = 128,
  parameter int FIR_MAX_CELLS  = 32,
  parameter int FIR_FIFO_DEPTH = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clk_dt,
  input  logic [TW-1:0]  tune_b1,
  input  logic [TW-1:0]  tune_b2,
  input  logic [TW-1:0]  tune_bhalf,
  input  logic           scan_en,
  input  logic           scan_in,
  input  logic           scan_update,
  output logic           scan_out,
  input  logic           req_in,
  output logic           ack_in,
  input  logic [INW-1:0] data_in,
  input  logic           sel,
  output logic           ct_req,
  output data_t          ct_data,
  output data_t          dt_data,
  output data_t          sys_out,
  output logic           probe1,
  output logic           probe2,
  output logic           probe3,
  output logic           err
);

  cfg_t  cfg;
  logic  i_req, i_ack, f_req, f_ack, e1, e2;
  data_t i_data, f_data;
  logic  grp_fire, r2_lone, in_collide, win_extend, ed_drop, tap1_evt, tap2_evt;
  grp_t  grp_tag;

  scan_chain u_scan (.clk, .rst_n, .scan_en, .scan_in, .scan_update, .scan_out, .cfg);

  iir_filter #(.TW(TW), .MAX_CELLS(IIR_MAX_CELLS), .FIFO_DEPTH(IIR_FIFO_DEPTH)) u_iir (
    .clk, .rst_n, .cfg, .tune_b1, .tune_b2, .tune_bhalf,
    .in_req(req_in), .in_ack(ack_in), .in_data(data_in),
    .out_req(i_req), .out_ack(i_ack), .out_data(i_data),
    .grp_fire, .grp_tag, .r2_lone, .in_collide, .win_extend, .ed_drop,
    .tap1_evt, .tap2_evt, .fifo_err(e1));

  interp_filter #(.TW(TW), .N_SEC(4), .MAX_CELLS(FIR_MAX_CELLS), .FIFO_DEPTH(FIR_FIFO_DEPTH)) u_interp (
    .clk, .rst_n, .cfg, .tune(tune_b1), .tune_half(tune_bhalf),
    .in_req(i_req), .in_ack(i_ack), .in_data(i_data),
    .out_req(f_req), .out_ack(f_ack), .out_data(f_data), .fifo_err(e2));

  // the system output accepts every event and holds its value
  assign f_ack  = 1'b1;
  assign ct_req = f_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct_data <= '0;
      probe1  <= 1'b0;
      probe2  <= 1'b0;
      probe3  <= 1'b0;
    end else begin
      if (f_req)              ct_data <= f_data;
      if (req_in && ack_in)   probe1  <= !probe1;
      if (tap1_evt)           probe2  <= !probe2;
      if (tap2_evt)           probe3  <= !probe3;
    end
  end

  ct2dt_converter u_ct2dt (.clk_dt, .rst_n, .en(sel), .therm_en(cfg.therm_en), .ct_data, .dt_data);

  assign sys_out = sel ? dt_data : ct_data;
  assign err     = e1 | e2;

endmodule
