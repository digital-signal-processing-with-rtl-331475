// fir_section: one first-order CT digital FIR section of the interpolation filter.
//
// Computes y(t) = c0*x(t) + c1*x(t - tau) on a CT digital signal. The delay tau is a line
// of n_cells tg cells (plus a half-delay cell when half_en is set); as in the IIR filter,
// only the event travels down the line while its value waits in a FIFO. An input event
// is taken by the delay line (its value written into the FIFO) and, at the same time, by
// the grouping block (its value held in DFF1). When the event leaves the delay line its
// value is read from the FIFO into DFF2 and the grouping block is told. At the end of a
// grouping window the output c0*DFF1 + c1*DFF2 is formed (coefficients with 8 fractional
// bits, saturated to 16 bits) and offered as the output event.
//
// Interface: in_req/in_ack/in_data, out_req/out_ack/out_data (out_data is valid while
// out_req is high); fifo_err reports a FIFO overflow or underflow. Input events must be at least tg apart, as the output events are.
// Timing: an input event leaves, combined, tg after it arrived; its delayed copy
// contributes tg after it leaves the delay line. Output arithmetic takes no extra stage.
module fir_section
  import ctdsp_pkg::*;
#(
  parameter int TW         = 8,
  parameter int MAX_CELLS  = 32,
  parameter int FIFO_DEPTH = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [TW-1:0]  tune,
  input  logic [TW-1:0]  tune_half,
  input  logic [NCW-1:0] n_cells,
  input  logic           half_en,
  input  coef_t          c0,
  input  coef_t          c1,
  input  logic           in_req,
  output logic           in_ack,
  input  data_t          in_data,
  output logic           out_req,
  input  logic           out_ack,
  output data_t          out_data,
  output logic           fifo_err
);

  localparam int NW = $clog2(MAX_CELLS + 1);

  logic  dl_ack, dl_orq, dl_oak, ga_ack, h_orq, h_oak, h_ack, l_rq, l_ak;
  logic  in_take, b_take, out_a, out_b;
  data_t x_hold, x_del, fifo_q;

  // fork: the input goes to the delay line and to the grouper together
  assign in_ack  = dl_ack && ga_ack;
  assign in_take = in_req && in_ack;

  // optional half-delay cell, then the tg cells
  delay_cell #(.TW(TW), .TAGW(1)) u_half (
    .clk, .rst_n, .tune(tune_half),
    .in_req(half_en && in_req && ga_ack), .in_ack(h_ack), .in_tag(1'b0),
    .out_req(h_orq), .out_ack(h_oak), .out_tag());

  assign dl_ack = half_en ? h_ack : l_ak;
  assign l_rq   = half_en ? h_orq : (in_req && ga_ack);
  assign h_oak  = l_ak;

  delay_line #(.MAX_CELLS(MAX_CELLS), .TW(TW), .TAGW(1), .HALF(1'b0)) u_line (
    .clk, .rst_n, .n_cells(NW'(n_cells)), .tune, .tune_half,
    .in_req(l_rq), .in_ack(l_ak), .in_tag(1'b0),
    .out_req(dl_orq), .out_ack(dl_oak), .out_tag(), .pre_last());

  async_fifo #(.DEPTH(FIFO_DEPTH), .DW(DW)) u_fifo (
    .clk, .rst_n, .wr(in_take), .wdata(in_data),
    .rd1(b_take), .ld1(1'b1), .rd2(b_take), .ld2(1'b0),  // one reader: port 2 follows port 1
    .rdata1(fifo_q), .rdata2(), .err(fifo_err));

  assign b_take = dl_orq && dl_oak;
  assign x_del  = fifo_q;  // DFF2 is the FIFO's read register

  fir_grouper #(.TW(TW)) u_grp (
    .clk, .rst_n, .tune,
    .a_req(in_req && dl_ack), .a_ack(ga_ack),
    .b_req(dl_orq), .b_ack(dl_oak),
    .out_req, .out_ack, .out_a, .out_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       x_hold <= '0;
    else if (in_take) x_hold <= in_data;
  end

  always_comb begin
    logic signed [31:0] acc;
    acc = 32'(x_hold) * 32'(c0) + 32'(x_del) * 32'(c1);
    out_data = sat16(acc >>> CFRAC);
  end

endmodule
