// iir_timing_block: the shared timing path of the sixth-order CT digital IIR filter.
//
// In a cascade of CT biquads with equal tap delays, all delayed nodes of all sections
// switch at the same instants. So one timing path, with only two tap delays, can trigger
// the whole filter: it decides when every register of the data path loads and when every
// FIFO is written and read. The path is a loop:
//
//   input --> grouper --> P1..P5 --> [event detector] --> rest of tap 1 --+--> grouper R1
//                ^         (pipeline cells, tg each)    (write FIFOs)      |
//                |                                                         +--> tap 2 --> grouper R2
//
// The first tap delay is tap1_cells cells long in total: the N_PIPE pipeline cells, the
// event detector's cell and the rest, so that with the grouping window (tg) the loop
// from a Tap1 arrival to the next is (tap1_cells+1)*tg = TD (39 cells + window = 40 tg).
// The second tap delay (half-delay cell + tap2_cells cells, 40.5 tg) starts where tap 1
// ends, so its events land in the middle of the window opened by the next Tap1 event.
// The grouper releases each grouped event with its req_grp tag into P1; a lone R2 event
// is dropped after P1 (it only steps FIFO2 and FIFO3 past its word).
// At the end of P5 the event forks to the filter output and to the event detector; a
// passed event (edo) writes the FIFOs (wr) and enters the rest of tap 1.
// FIFO1 reads start one cell (tg) before an event reaches the grouper (f1_rd1, f1_rd2).
//
// Handshakes are req/ack (an event moves when both are high). Tune inputs give the cell
// delay in ticks: tune_b1 for the grouper, tap 1 and the pipeline, tune_b2 for the tg cells
// of tap 2 and tune_bhalf for its half-delay cell, as the three bias voltages of the chip.
module iir_timing_block
  import ctdsp_pkg::*;
#(
  parameter int TW        = 8,
  parameter int MAX_CELLS = 64,
  parameter int N_PIPE    = 5,
  localparam int NW       = $clog2(MAX_CELLS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [TW-1:0]  tune_b1,
  input  logic [TW-1:0]  tune_b2,
  input  logic [TW-1:0]  tune_bhalf,
  input  logic [NCW-1:0] tap1_cells,
  input  logic [NCW-1:0] tap2_cells,
  // input events
  input  logic           in_req,
  output logic           in_ack,
  // filter output events (end of the pipeline)
  output logic           out_req,
  input  logic           out_ack,
  // event detector
  output logic           ed_req,
  input  logic           ed_ack,
  input  logic           edo_req,
  output logic           edo_ack,
  // strobes for the data path
  output logic           in_take,
  output logic           r1_take,
  output logic           r2_take,
  output logic           grp_fire,
  output grp_t           grp_tag,
  output logic [N_PIPE-1:0] pipe_fire,
  output grp_t           p1_tag,
  output logic           wr,
  output logic           f1_rd1,
  output logic           f1_rd2,
  // strobes for observation
  output logic           r2_lone,
  output logic           in_collide,
  output logic           win_extend,
  output logic           tap1_evt,
  output logic           tap2_evt
);

  // grouper
  logic g_out_req, g_out_ack;
  logic r1_req, r1_ack, r2_req, r2_ack;

  iir_grouper #(.TW(TW)) u_grp (
    .clk, .rst_n, .tune(tune_b1),
    .in_req, .in_ack,
    .r1_req, .r1_ack, .r2_req, .r2_ack,
    .out_req(g_out_req), .out_ack(g_out_ack), .out_tag(grp_tag),
    .in_take, .r1_take, .r2_grp_take(r2_take), .r2_lone, .in_collide, .win_extend);

  assign grp_fire = g_out_req && g_out_ack;

  // pipeline cells P1..P_N_PIPE
  logic [N_PIPE-1:0] p_rq, p_ak, p_orq, p_oak;
  logic [3:0]         p_tin [N_PIPE];
  logic [3:0]         p_tout [N_PIPE];
  logic              fork_ok;

  for (genvar i = 0; i < N_PIPE; i++) begin : g_pipe
    delay_cell #(.TW(TW), .TAGW(4)) u_cell (
      .clk, .rst_n, .tune(tune_b1),
      .in_req(p_rq[i]), .in_ack(p_ak[i]), .in_tag(p_tin[i]),
      .out_req(p_orq[i]), .out_ack(p_oak[i]), .out_tag(p_tout[i]));
  end

  assign p_rq[0]   = g_out_req;
  assign p_tin[0]  = grp_tag;
  assign g_out_ack = p_ak[0];
  assign p1_tag    = grp_t'(p_tout[0]);

  // P1 drops lone R2 events
  assign p_rq[1]  = p_orq[0] && (p_tout[0] != GRP_R2);
  assign p_tin[1] = p_tout[0];
  assign p_oak[0] = (p_tout[0] == GRP_R2) ? 1'b1 : p_ak[1];
  for (genvar i = 2; i < N_PIPE; i++) begin : g_link
    assign p_rq[i]    = p_orq[i-1];
    assign p_tin[i]   = p_tout[i-1];
    assign p_oak[i-1] = p_ak[i];
  end

  for (genvar i = 0; i < N_PIPE; i++) begin : g_fire
    assign pipe_fire[i] = p_orq[i] && p_oak[i];
  end

  // fork at the pipeline end: filter output and event detector take the event together
  assign fork_ok           = out_ack && ed_ack;
  assign out_req           = p_orq[N_PIPE-1] && ed_ack;
  assign ed_req            = p_orq[N_PIPE-1] && out_ack;
  assign p_oak[N_PIPE-1]   = fork_ok;

  // rest of tap 1
  logic [NCW-1:0] rest1;
  logic           t1_req, t1_ack, t2_in_ack, t2_req, t2_ack;

  always_comb begin
    if (tap1_cells > NCW'(N_PIPE + 2)) rest1 = tap1_cells - NCW'(N_PIPE + 1);
    else                               rest1 = NCW'(1);
  end

  delay_line #(.MAX_CELLS(MAX_CELLS), .TW(TW), .TAGW(1), .HALF(1'b0)) u_tap1 (
    .clk, .rst_n, .n_cells(NW'(rest1)), .tune(tune_b1), .tune_half(tune_bhalf),
    .in_req(edo_req), .in_ack(edo_ack), .in_tag(1'b0),
    .out_req(t1_req), .out_ack(t1_ack), .out_tag(), .pre_last(f1_rd1));

  assign wr = edo_req && edo_ack;

  // fork at the end of tap 1: grouper R1 and the start of tap 2
  assign r1_req = t1_req && t2_in_ack;
  assign t1_ack = r1_ack && t2_in_ack;
  assign tap1_evt = t1_req && t1_ack;

  delay_line #(.MAX_CELLS(MAX_CELLS), .TW(TW), .TAGW(1), .HALF(1'b1)) u_tap2 (
    .clk, .rst_n, .n_cells(NW'(tap2_cells)), .tune(tune_b2), .tune_half(tune_bhalf),
    .in_req(t1_req && r1_ack), .in_ack(t2_in_ack), .in_tag(1'b0),
    .out_req(t2_req), .out_ack(t2_ack), .out_tag(), .pre_last(f1_rd2));

  assign r2_req   = t2_req;
  assign t2_ack   = r2_ack;
  assign tap2_evt = t2_req && t2_ack;

endmodule
