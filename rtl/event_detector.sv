// event_detector: removes redundant events from the feedback loop of the CT IIR filter.
//
// The timing block is a closed loop: once an event enters, it circulates forever. When
// the three words an event would write into the FIFOs (data1..3, the states of the three
// biquads) equal those of the previous event, the event carries no news. The detector
// then keeps it out of the tap delay and out of the FIFOs, so the filter falls quiet
// when its input does, and its power follows the input activity.
//
// How it works: an arriving event is taken into a tg delay cell (the "left" stage) while
// its three words are stored (DFF9). During that delay they are compared, at the
// programmed resolution, with the words of the last event that passed (DFF10). When the
// cell finishes, a differing event is offered on out_req (reqEDO); a redundant one is
// acknowledged by the detector itself and disappears (dropped pulses). Words passed on
// are available on q1..q3 for the FIFO write that accompanies the outgoing event.
// Resolution: res = r compares the top 9+r bits (r = 7: all 16 bits). With en low every
// event passes. Timing: an event taken at tick t leaves at t + tune.
module event_detector
  import ctdsp_pkg::*;
#(
  parameter int TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] tune,
  input  logic          en,
  input  logic [2:0]    res,
  input  logic          in_req,
  output logic          in_ack,
  input  data_t         in1,
  input  data_t         in2,
  input  data_t         in3,
  output logic          out_req,
  input  logic          out_ack,
  output data_t         q1,
  output data_t         q2,
  output data_t         q3,
  output logic          dropped
);

  logic  c_req, c_ack, c_take, same;
  data_t p1, p2, p3;
  data_t mask;

  assign c_take = in_req && in_ack;

  delay_cell #(.TW(TW), .TAGW(1)) u_left (
    .clk, .rst_n, .tune,
    .in_req, .in_ack, .in_tag(1'b0),
    .out_req(c_req), .out_ack(c_ack), .out_tag()
  );

  // top 9+res bits are compared
  assign mask = data_t'(16'hffff << (3'd7 - res));
  assign same = en && ((q1 & mask) == (p1 & mask))
                   && ((q2 & mask) == (p2 & mask))
                   && ((q3 & mask) == (p3 & mask));

  assign out_req = c_req && !same;
  assign c_ack   = same ? 1'b1 : out_ack;
  assign dropped = c_req && same;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= '0; q2 <= '0; q3 <= '0;
      p1 <= '0; p2 <= '0; p3 <= '0;
    end else begin
      if (c_take) begin
        q1 <= in1; q2 <= in2; q3 <= in3;
      end
      if (out_req && out_ack) begin
        p1 <= q1; p2 <= q2; p3 <= q3;
      end
    end
  end

endmodule
