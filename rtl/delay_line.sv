// delay_line: a configurable chain of tg delay cells (a one-bit CT tap delay).
//
// A tap delay of a CT filter must hold many events at once, since events arrive far more
// often than once per tap delay. It is therefore a cascade of small cells, each delaying
// one event by tg and passing it on with a handshake. The line length is chosen at run
// time: n_cells of the MAX_CELLS cells are used, the event entering at cell
// MAX_CELLS-n_cells (n_cells 0 counts as 1). With HALF=1 a half-delay cell, tuned by
// tune_half, leads the chain. Data never travels here: the line carries only the event and
// a small tag, while the event's data waits in a FIFO.
//
// Interface: in_req/in_ack/in_tag in, out_req/out_ack/out_tag out (an event moves when
// req and ack are both high). pre_last pulses when an event enters the last cell, one
// cell delay before it leaves; this lets a FIFO read start tg ahead of the arrival.
// Timing: with all cells free, an event taken at tick t is offered at
// t + n_cells*tune (+ tune_half with HALF=1).
module delay_line #(
  parameter int MAX_CELLS = 64,
  parameter int TW        = 8,
  parameter int TAGW      = 1,
  parameter bit HALF      = 1'b0,
  localparam int NW       = $clog2(MAX_CELLS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NW-1:0]   n_cells,
  input  logic [TW-1:0]   tune,
  input  logic [TW-1:0]   tune_half,
  input  logic            in_req,
  output logic            in_ack,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_req,
  input  logic            out_ack,
  output logic [TAGW-1:0] out_tag,
  output logic            pre_last
);

  logic [NW-1:0]   n_eff;
  int unsigned     start;
  logic            h_req, h_ack;
  logic [TAGW-1:0] h_tag;
  logic [MAX_CELLS-1:0] cell_ack;

  always_comb begin
    n_eff = n_cells;
    if (n_eff == '0) n_eff = NW'(1);
    if (n_eff > NW'(MAX_CELLS)) n_eff = NW'(MAX_CELLS);
    start = MAX_CELLS - int'(n_eff);
  end

  if (HALF) begin : g_half
    delay_cell #(.TW(TW), .TAGW(TAGW)) u_half (
      .clk, .rst_n, .tune(tune_half),
      .in_req, .in_ack, .in_tag,
      .out_req(h_req), .out_ack(h_ack), .out_tag(h_tag)
    );
  end else begin : g_nohalf
    assign h_req  = in_req;
    assign in_ack = h_ack;
    assign h_tag  = in_tag;
  end

  for (genvar i = 0; i < MAX_CELLS; i++) begin : g_cell
    logic            rq, ak, orq, oak;
    logic [TAGW-1:0] tg_in, tg_out;
    if (i == 0) begin : g_first
      assign rq    = (start == 0) ? h_req : 1'b0;
      assign tg_in = h_tag;
    end else begin : g_next
      assign rq    = (start == i) ? h_req :
                     (start < i)  ? g_cell[i-1].orq : 1'b0;
      assign tg_in = (start == i) ? h_tag : g_cell[i-1].tg_out;
    end
    if (i == MAX_CELLS - 1) begin : g_last
      assign oak = out_ack;
    end else begin : g_mid
      assign oak = g_cell[i+1].ak && (start <= i);
    end
    delay_cell #(.TW(TW), .TAGW(TAGW)) u_cell (
      .clk, .rst_n, .tune,
      .in_req(rq), .in_ack(ak), .in_tag(tg_in),
      .out_req(orq), .out_ack(oak), .out_tag(tg_out)
    );
  end

  // the head hands to whichever cell is the entry
  assign h_ack = cell_ack[start];

  for (genvar i = 0; i < MAX_CELLS; i++) begin : g_ack
    assign cell_ack[i] = g_cell[i].ak;
  end

  assign out_req  = g_cell[MAX_CELLS-1].orq;
  assign out_tag  = g_cell[MAX_CELLS-1].tg_out;
  assign pre_last = g_cell[MAX_CELLS-1].rq && g_cell[MAX_CELLS-1].ak;

endmodule
