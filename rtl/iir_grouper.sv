// iir_grouper: the event-grouping block of the CT digital IIR filter's timing block.
//
// With two mismatched tap delays the feedback events of the two taps no longer coincide,
// and a second-order CT loop can then grow without bound. The grouper forces them back
// together: it holds the events that arrive within a window of length tg and releases
// them as one grouped event at the window's end. Its states follow the document's state
// diagram:
//   S0  idle;
//   S1  holds an input event (window opened by it);
//   S2  holds a Tap1 feedback event (window opened or restarted by it, lasting tg);
//   S3  holds a Tap1 and a Tap2 event (the Tap2 event does not change the window).
// An input event arriving in S2 or S3 is held with the feedback events; a second input
// event in S1 replaces the first (the data path keeps only the newest input value).
// A Tap2 event arriving in S0 or S1 has lost its partner (the event detector removed it):
// it is passed on at once (one tick later) as a lone R2 event, outside any window.
// A Tap1 event in S0 opens a window and moves to S2 (this design's reading of the state
// diagram, where only S1 -> S2 is drawn).
//
// Interface: req/ack pairs for the input, Tap1 (r1) and Tap2 (r2) events and for the
// grouped output, whose out_tag names the req_grp bit (GRP_IN, GRP_R1, GRP_R1R2, GRP_R2).
// An event that cannot be taken (for instance a Tap1 event while one is held) waits on
// its ack, as the four-phase handshake of the circuit would make it wait.
// Strobes report what was taken each tick, for the data path and for counting.
// Timing: a window lasts `tune` ticks from the event that opened or restarted it; the
// grouped event is offered in the tick the window closes.
module iir_grouper
  import ctdsp_pkg::*;
#(
  parameter int TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] tune,
  input  logic          in_req,
  output logic          in_ack,
  input  logic          r1_req,
  output logic          r1_ack,
  input  logic          r2_req,
  output logic          r2_ack,
  output logic          out_req,
  input  logic          out_ack,
  output grp_t          out_tag,
  // strobes
  output logic          in_take,      // input event taken (load DFF1)
  output logic          r1_take,      // Tap1 event taken (load DFF2)
  output logic          r2_grp_take,  // Tap2 event grouped, S2 -> S3 (load DFF3)
  output logic          r2_lone,      // lone Tap2 event passed on
  output logic          in_collide,   // input event replaced a held one
  output logic          win_extend    // Tap1 event extended an input window
);

  typedef enum logic [1:0] {S0, S1, S2, S3} gstate_t;

  gstate_t       state;
  logic [TW-1:0] cnt;
  logic          closing, grp_give, lone_take, lone_pend;

  assign closing  = (state != S0) && (cnt == '0);
  assign grp_give = closing && out_ack;

  // a lone Tap2 event is taken into a one-place holder and offered in the next tick;
  // a grouped event that closes at the same time goes first
  assign lone_take = r2_req && (state == S0 || state == S1) && !closing && !lone_pend;

  always_comb begin
    out_req = closing || lone_pend;
    if (!closing) out_tag = GRP_R2;
    else begin
      unique case (state)
        S1:      out_tag = GRP_IN;
        S2:      out_tag = GRP_R1;
        default: out_tag = GRP_R1R2;
      endcase
    end
  end

  assign in_ack = !closing;
  assign r1_ack = (state == S0 || state == S1) && !closing;
  assign r2_ack = (state == S2 && !closing) || lone_take;

  assign in_take     = in_req && in_ack;
  assign r1_take     = r1_req && r1_ack;
  assign r2_grp_take = r2_req && state == S2 && !closing;
  assign r2_lone     = lone_pend && !closing && out_ack;
  assign in_collide  = in_take && state == S1;
  assign win_extend  = r1_take && state == S1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              lone_pend <= 1'b0;
    else if (lone_take)      lone_pend <= 1'b1;
    else if (r2_lone)        lone_pend <= 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S0;
      cnt   <= '0;
    end else if (closing) begin
      if (grp_give) state <= S0;
    end else begin
      if (r1_take) begin
        state <= S2;
        cnt   <= (tune == '0) ? '0 : tune - 1'b1;
      end else if (in_take && state == S0) begin
        state <= S1;
        cnt   <= (tune == '0) ? '0 : tune - 1'b1;
      end else begin
        if (r2_grp_take) state <= S3;
        if (state != S0 && cnt != '0) cnt <= cnt - 1'b1;
      end
    end
  end

  // an offered event always names exactly one req_grp bit
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) out_req |-> $onehot(out_tag));

endmodule
