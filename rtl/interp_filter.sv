// interp_filter: interpolation filter placed between the CT IIR filter and the CT-to-DT
// converter.
//
// A filter built on tap delays TD has a frequency response that repeats every 1/TD. The
// noise and distortion in those repeated passbands would alias into the baseband once
// the CT output is sampled by a clock. A cascade of first-order CT FIR sections
// y = c0*x(t) + c1*x(t - tau_k) puts notches on them: with c0 = c1 = 1/2 and
// tau = TD/2, TD/4, TD/8, TD/16 (20, 10, 5 and 2.5 cells, the last using a half-delay cell)
// every multiple k/TD except k = 16, 32, ... is notched, so the first intact repeat moves
// out to 16/TD. The number of sections in use (n_fir, 0..4), each section's delay and
// coefficients come from the configuration; a section not in use passes events through.
//
// Interface: in_req/in_ack/in_data, out_req/out_ack/out_data (valid while out_req).
// Timing: each section in use adds tg to an event's path.
module interp_filter
  import ctdsp_pkg::*;
#(
  parameter int TW         = 8,
  parameter int N_SEC      = 4,
  parameter int MAX_CELLS  = 32,
  parameter int FIFO_DEPTH = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg,
  input  logic [TW-1:0] tune,
  input  logic [TW-1:0] tune_half,
  input  logic          in_req,
  output logic          in_ack,
  input  data_t         in_data,
  output logic          out_req,
  input  logic          out_ack,
  output data_t         out_data,
  output logic          fifo_err
);

  logic [N_SEC-1:0] errs;

  for (genvar i = 0; i < N_SEC; i++) begin : g_sec
    logic  rq, ak, orq, oak, s_ak, s_orq;
    data_t d, od, s_od;
    logic  used;
    assign used = (3'(i) < cfg.n_fir);

    if (i == 0) begin : g_first
      assign rq     = in_req;
      assign d      = in_data;
      assign in_ack = ak;
    end else begin : g_next
      assign rq              = g_sec[i-1].orq;
      assign d               = g_sec[i-1].od;
      assign g_sec[i-1].oak  = ak;
    end

    fir_section #(.TW(TW), .MAX_CELLS(MAX_CELLS), .FIFO_DEPTH(FIFO_DEPTH)) u_sec (
      .clk, .rst_n, .tune, .tune_half,
      .n_cells(cfg.fir[i].n_cells), .half_en(cfg.fir[i].half_en),
      .c0(cfg.fir[i].c0), .c1(cfg.fir[i].c1),
      .in_req(used && rq), .in_ack(s_ak), .in_data(d),
      .out_req(s_orq), .out_ack(used && oak), .out_data(s_od), .fifo_err(errs[i]));

    assign ak  = used ? s_ak  : oak;
    assign orq = used ? s_orq : rq;
    assign od  = used ? s_od  : d;

    if (i == N_SEC - 1) begin : g_last
      assign out_req  = orq;
      assign out_data = od;
      assign oak      = out_ack;
    end
  end

  assign fifo_err = |errs;

endmodule
