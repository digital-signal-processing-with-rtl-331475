// fir_grouper: two-channel grouping block of an interpolation-filter FIR section.
//
// The adder of a first-order CT FIR section sees events on its two inputs (the direct
// input and the end of the section's delay line) at arbitrary distances. Its output must
// still keep at least tg between events, so events closer than tg are combined: an event
// on either channel opens a window of tg; an event on the other channel inside the window
// joins it; when the window closes one grouped event leaves, telling which channels it
// holds. This is simpler than the IIR grouper: one window, no extension, no lone events.
//
// Interface: a_req/a_ack and b_req/b_ack in, out_req/out_ack out with out_a/out_b.
// An event on a channel already held waits (its ack stays low) until the window has
// closed and been taken; no event is taken while the grouped event is offered.
// Timing: the window lasts `tune` ticks from the first event; the grouped event is
// offered in the tick the window closes.
module fir_grouper #(
  parameter int TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] tune,
  input  logic          a_req,
  output logic          a_ack,
  input  logic          b_req,
  output logic          b_ack,
  output logic          out_req,
  input  logic          out_ack,
  output logic          out_a,
  output logic          out_b
);

  logic          open, closing;
  logic [TW-1:0] cnt;
  logic          a_take, b_take;

  assign closing = open && (cnt == '0);
  assign out_req = closing;
  assign a_ack   = !closing && !out_a;
  assign b_ack   = !closing && !out_b;
  assign a_take  = a_req && a_ack;
  assign b_take  = b_req && b_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open  <= 1'b0;
      cnt   <= '0;
      out_a <= 1'b0;
      out_b <= 1'b0;
    end else if (closing) begin
      if (out_ack) begin
        open  <= 1'b0;
        out_a <= 1'b0;
        out_b <= 1'b0;
      end
    end else begin
      if (a_take) out_a <= 1'b1;
      if (b_take) out_b <= 1'b1;
      if (!open && (a_take || b_take)) begin
        open <= 1'b1;
        cnt  <= (tune == '0) ? '0 : tune - 1'b1;
      end else if (open) begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
