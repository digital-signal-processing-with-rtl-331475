// delay_cell: one tg delay cell of a CT delay line, with a req/ack handshake on each side.
//
// In the original circuit a current source charges a capacitor until an inverter
// threshold is crossed; the tune voltage sets the current and so the delay, and a
// C-element plus SR latch give a hazard-free four-phase handshake with the neighbours.
// Here the same behaviour is emulated on the time-base clock: an accepted event starts a
// count of `tune` ticks, after which the cell raises out_req and holds the event until the
// next stage takes it. Only then is the cell free again, so no event is ever lost and an
// event can never overtake another. The analog effects (mismatch, jitter, the
// signal-dependent delay the split current source cures) are not modelled.
//
// Handshake: an event moves in the tick where req and ack are both high. in_ack is
// combinational: the cell takes a new event when it is idle, or in the very tick its own
// event is taken downstream, so events spaced exactly tg keep their spacing.
// Timing: an event taken at tick t is offered at out_req from tick t+tune (tune 0 acts
// as 1). A payload tag (the req_grp bits) travels with the event.
// The half-delay cell is this module driven by its own tune value.
module delay_cell #(
  parameter int TW   = 8,
  parameter int TAGW = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TW-1:0]   tune,
  input  logic            in_req,
  output logic            in_ack,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_req,
  input  logic            out_ack,
  output logic [TAGW-1:0] out_tag
);

  logic          busy;
  logic [TW-1:0] cnt;
  logic          take, give;

  assign out_req = busy && (cnt == '0);
  assign give    = out_req && out_ack;
  assign in_ack  = !busy || give;
  assign take    = in_req && in_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      out_tag <= '0;
    end else if (take) begin
      busy    <= 1'b1;
      cnt     <= (tune == '0) ? '0 : tune - 1'b1;
      out_tag <= in_tag;
    end else if (give) begin
      busy <= 1'b0;
    end else if (busy && cnt != '0) begin
      cnt <= cnt - 1'b1;
    end
  end

endmodule
