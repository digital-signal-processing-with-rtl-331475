// iir_filter: sixth-order CT digital IIR filter (three biquads, two shared tap delays).
//
// A CT digital filter has no clock: an event (a new input value with its req) is
// processed when it arrives, and its delayed copies come back one and two tap delays TD
// later from delay lines instead of from a clocked shift register. This filter's order is
// six, but it needs only the two tap delays of one biquad because all sections share one
// timing block; the data of the three sections waits in three FIFOs (one write, two
// reads each). A grouping window keeps the loop stable despite mismatched tap delays,
// and an event detector stops redundant events circulating once the input is quiet.
//
// This module wires the timing block, the event detector and the data path (with the
// FIFOs). Every grouped event gives one output event (out_req/out_data) five cells after
// its window closed. The input value in_data (7 bits, two's complement) comes with
// in_req/in_ack; the output is 16 bits. Configuration (coefficients, tap lengths, event
// detector) comes from cfg; tune_* set the cell delays in ticks of the time-base clock.
// Strobe outputs expose what happened, for calibration probes and for tests.
module iir_filter
  import ctdsp_pkg::*;
#(
  parameter int TW         = 8,
  parameter int MAX_CELLS  = 64,
  parameter int FIFO_DEPTH = 128
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cfg_t           cfg,
  input  logic [TW-1:0]  tune_b1,
  input  logic [TW-1:0]  tune_b2,
  input  logic [TW-1:0]  tune_bhalf,
  input  logic           in_req,
  output logic           in_ack,
  input  logic [INW-1:0] in_data,
  output logic           out_req,
  input  logic           out_ack,
  output data_t          out_data,
  // observation
  output logic           grp_fire,
  output grp_t           grp_tag,
  output logic           r2_lone,
  output logic           in_collide,
  output logic           win_extend,
  output logic           ed_drop,
  output logic           tap1_evt,
  output logic           tap2_evt,
  output logic           fifo_err
);

  logic       in_take, r1_take, r2_take, wr, f1_rd1, f1_rd2;
  logic [4:0] pipe_fire;
  grp_t       p1_tag;
  logic       ed_req, ed_ack, edo_req, edo_ack;
  data_t      d1, d2, d3, q1, q2, q3;

  iir_timing_block #(.TW(TW), .MAX_CELLS(MAX_CELLS), .N_PIPE(5)) u_timing (
    .clk, .rst_n, .tune_b1, .tune_b2, .tune_bhalf,
    .tap1_cells(cfg.tap1_cells), .tap2_cells(cfg.tap2_cells),
    .in_req, .in_ack, .out_req, .out_ack,
    .ed_req, .ed_ack, .edo_req, .edo_ack,
    .in_take, .r1_take, .r2_take, .grp_fire, .grp_tag, .pipe_fire, .p1_tag,
    .wr, .f1_rd1, .f1_rd2,
    .r2_lone, .in_collide, .win_extend, .tap1_evt, .tap2_evt);

  event_detector #(.TW(TW)) u_ed (
    .clk, .rst_n, .tune(tune_b1), .en(cfg.ed_en), .res(cfg.ed_res),
    .in_req(ed_req), .in_ack(ed_ack), .in1(d1), .in2(d2), .in3(d3),
    .out_req(edo_req), .out_ack(edo_ack), .q1, .q2, .q3, .dropped(ed_drop));

  iir_datapath #(.FIFO_DEPTH(FIFO_DEPTH)) u_dp (
    .clk, .rst_n, .cfg,
    .in_take, .in_data, .r1_take, .r2_take, .f1_rd1, .f1_rd2,
    .grp_fire, .grp_tag, .pipe_fire, .p1_tag,
    .wr, .q1, .q2, .q3,
    .data1(d1), .data2(d2), .data3(d3), .out_data, .fifo_err);

endmodule
