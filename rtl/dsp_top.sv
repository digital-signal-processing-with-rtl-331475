// dsp_top: the two signal-derived-timing DSPs, side by side.
//
// ctdsp_system is the continuous-time digital IIR filter system: it processes a CT
// digital signal event by event with no sampling clock (here emulated on the time-base
// clock clk, one tick per nanosecond) and delivers both a CT and a synchronous output.
// vr_dsp is the variable-rate FIR DSP: a clocked filter whose clock follows the varying
// sampling rate of its ADC while its tap delay stays constant; it runs on its own base
// clock vr_clk. The two share nothing but the reset; each has its own ports.
module dsp_top
  import ctdsp_pkg::*;
#(
  parameter int VR_K  = 10,
  parameter int VR_M  = 4,
  parameter int VR_XW = 8,
  parameter int VR_HW = 12,
  localparam int VR_YW = VR_XW + VR_HW + $clog2(VR_K + 1)
) (
  input  logic                    rst_n,
  // CT digital IIR filter system
  input  logic                    clk,
  input  logic                    clk_dt,
  input  logic [TUNE_W-1:0]       tune_b1,
  input  logic [TUNE_W-1:0]       tune_b2,
  input  logic [TUNE_W-1:0]       tune_bhalf,
  input  logic                    scan_en,
  input  logic                    scan_in,
  input  logic                    scan_update,
  output logic                    scan_out,
  input  logic                    req_in,
  output logic                    ack_in,
  input  logic [INW-1:0]          data_in,
  input  logic                    sel,
  output logic                    ct_req,
  output data_t                   ct_data,
  output data_t                   dt_data,
  output data_t                   sys_out,
  output logic                    probe1,
  output logic                    probe2,
  output logic                    probe3,
  output logic                    err,
  // variable-rate DSP
  input  logic                    vr_clk,
  input  logic                    vr_smp_valid,
  input  logic signed [VR_XW-1:0] vr_smp_data,
  input  logic                    vr_fast,
  input  logic signed [VR_HW-1:0] vr_h [VR_K+1],
  output logic                    vr_y_valid,
  output logic signed [VR_YW-1:0] vr_y,
  output logic [1:0]              vr_mode
);

  ctdsp_system #(.TW(TUNE_W)) u_ct (
    .clk, .rst_n, .clk_dt, .tune_b1, .tune_b2, .tune_bhalf,
    .scan_en, .scan_in, .scan_update, .scan_out,
    .req_in, .ack_in, .data_in, .sel,
    .ct_req, .ct_data, .dt_data, .sys_out, .probe1, .probe2, .probe3, .err);

  vr_dsp #(.K(VR_K), .M(VR_M), .XW(VR_XW), .HW(VR_HW)) u_vr (
    .clk(vr_clk), .rst_n, .smp_valid(vr_smp_valid), .smp_data(vr_smp_data), .fast(vr_fast),
    .h(vr_h), .y_valid(vr_y_valid), .y(vr_y), .mode(vr_mode));

endmodule
