// iir_datapath: the arithmetic pipeline and tap-delay FIFOs of the sixth-order CT IIR filter.
//
// The filter is three cascaded direct-form-II biquads. All their delayed states share the
// timing of one timing block, so the data path is driven entirely by strobes from it:
//   DFF1  <- input value                 when an input event is taken
//   DFF2  <- FIFO1 read channel 1         when a Tap1 event is taken   (w1 one TD ago)
//   DFF3  <- FIFO1 read channel 2         when a grouped Tap2 event is taken (w1 2TD ago)
//   grp_fire (end of a grouping window):  DFF4 <- DFF1..3; FIFO2 reads per the req_grp bit
//   pipe_fire[0]: DFF5 <- w1 = g*x + fb1*w1(-TD) + fb2*w1(-2TD);  FIFO3 reads
//   pipe_fire[1]: DFF6 <- w2 = biquad-1 output + section-2 feedback
//   pipe_fire[2]: DFF7 <- w3 = biquad-2 output + section-3 feedback
//   pipe_fire[3]: DFF8 <- y  = biquad-3 output
//   pipe_fire[4]: the output event; y is out_data, w1..w3 go to the event detector.
// The feed-forward sum of each biquad is merged into the adder of the next section, so
// the sixth-order filter needs four adders in four stages. A read for a req_grp R1 event
// reads channel 1 of the FIFO, R1R2 reads both channels, a lone R2 event only steps
// channel 2 past its word (it takes no part in the arithmetic and DFF4/DFF5 keep their
// values); an input-only group reads nothing. Values read are held, so a stage always
// sees the latest value of each delayed state, as the CT signals they stand for.
// The words needed later travel down the pipeline with their event, so an event that
// follows one cell behind cannot overwrite them.
// FIFO1..3 are written together (wr, from the event detector) with the words q1..q3.
// The 7-bit input is placed in the top of the 16-bit word (shifted left by 8).
module iir_datapath
  import ctdsp_pkg::*;
#(
  parameter int FIFO_DEPTH = 128
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cfg_t           cfg,
  input  logic           in_take,
  input  logic [INW-1:0] in_data,
  input  logic           r1_take,
  input  logic           r2_take,
  input  logic           f1_rd1,
  input  logic           f1_rd2,
  input  logic           grp_fire,
  input  grp_t           grp_tag,
  input  logic [4:0]     pipe_fire,
  input  grp_t           p1_tag,
  input  logic           wr,
  input  data_t          q1,
  input  data_t          q2,
  input  data_t          q3,
  output data_t          data1,
  output data_t          data2,
  output data_t          data3,
  output data_t          out_data,
  output logic           fifo_err
);

  // FIFO read control from a req_grp tag
  function automatic logic [2:0] rd_ctl(grp_t t);  // {rd1, rd2, ld2}
    return {(t == GRP_R1) || (t == GRP_R1R2), (t == GRP_R1R2) || (t == GRP_R2), t != GRP_R2};
  endfunction

  logic [2:0] c2, c3;
  data_t f1r1, f1r2, f2r1, f2r2, f3r1, f3r2;
  logic  e1, e2, e3;

  assign c2 = grp_fire ? rd_ctl(grp_tag) : 3'b000;
  assign c3 = pipe_fire[0] ? rd_ctl(p1_tag) : 3'b000;

  async_fifo #(.DEPTH(FIFO_DEPTH), .DW(DW)) u_fifo1 (
    .clk, .rst_n, .wr, .wdata(q1), .rd1(f1_rd1), .ld1(1'b1), .rd2(f1_rd2), .ld2(1'b1),
    .rdata1(f1r1), .rdata2(f1r2), .err(e1));
  async_fifo #(.DEPTH(FIFO_DEPTH), .DW(DW)) u_fifo2 (
    .clk, .rst_n, .wr, .wdata(q2), .rd1(c2[2]), .ld1(1'b1), .rd2(c2[1]), .ld2(c2[0]),
    .rdata1(f2r1), .rdata2(f2r2), .err(e2));
  async_fifo #(.DEPTH(FIFO_DEPTH), .DW(DW)) u_fifo3 (
    .clk, .rst_n, .wr, .wdata(q3), .rd1(c3[2]), .ld1(1'b1), .rd2(c3[1]), .ld2(c3[0]),
    .rdata1(f3r1), .rdata2(f3r2), .err(e3));

  assign fifo_err = e1 | e2 | e3;

  // pipeline registers
  data_t x1, d2, d3;                         // DFF1..DFF3
  data_t x4, a4, b4;                         // DFF4
  data_t w1_5, a5, b5, f2a5, f2b5;           // DFF5
  data_t w1_6, w2_6, f2a6, f2b6, f3a6, f3b6; // DFF6
  data_t w1_7, w2_7, w3_7, f3a7, f3b7;       // DFF7
  data_t w1_8, w2_8, w3_8, y8;               // DFF8

  data_t m1, m2, m3, m4;

  iir_mac #(.N(5)) u_add1 (
    .d('{x4, a4, b4, data_t'(0), data_t'(0)}),
    .c('{cfg.g_in, cfg.sec[0].fb1, cfg.sec[0].fb2, coef_t'(0), coef_t'(0)}),
    .y(m1));
  iir_mac #(.N(5)) u_add2 (
    .d('{w1_5, a5, b5, f2a5, f2b5}),
    .c('{cfg.sec[0].ff0, cfg.sec[0].ff1, cfg.sec[0].ff2, cfg.sec[1].fb1, cfg.sec[1].fb2}),
    .y(m2));
  iir_mac #(.N(5)) u_add3 (
    .d('{w2_6, f2a6, f2b6, f3a6, f3b6}),
    .c('{cfg.sec[1].ff0, cfg.sec[1].ff1, cfg.sec[1].ff2, cfg.sec[2].fb1, cfg.sec[2].fb2}),
    .y(m3));
  iir_mac #(.N(5)) u_add4 (
    .d('{w3_7, f3a7, f3b7, data_t'(0), data_t'(0)}),
    .c('{cfg.sec[2].ff0, cfg.sec[2].ff1, cfg.sec[2].ff2, coef_t'(0), coef_t'(0)}),
    .y(m4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; d2 <= '0; d3 <= '0;
      x4 <= '0; a4 <= '0; b4 <= '0;
      w1_5 <= '0; a5 <= '0; b5 <= '0; f2a5 <= '0; f2b5 <= '0;
      w1_6 <= '0; w2_6 <= '0; f2a6 <= '0; f2b6 <= '0; f3a6 <= '0; f3b6 <= '0;
      w1_7 <= '0; w2_7 <= '0; w3_7 <= '0; f3a7 <= '0; f3b7 <= '0;
      w1_8 <= '0; w2_8 <= '0; w3_8 <= '0; y8 <= '0;
    end else begin
      if (in_take) x1 <= {in_data[INW-1], in_data, 8'h00};  // two's complement, sign-extended
      if (r1_take) d2 <= f1r1;
      if (r2_take) d3 <= f1r2;
      if (grp_fire && grp_tag != GRP_R2) begin
        x4 <= x1; a4 <= d2; b4 <= d3;
      end
      if (pipe_fire[0] && p1_tag != GRP_R2) begin
        w1_5 <= m1; a5 <= a4; b5 <= b4; f2a5 <= f2r1; f2b5 <= f2r2;
      end
      if (pipe_fire[1]) begin
        w1_6 <= w1_5; w2_6 <= m2; f2a6 <= f2a5; f2b6 <= f2b5; f3a6 <= f3r1; f3b6 <= f3r2;
      end
      if (pipe_fire[2]) begin
        w1_7 <= w1_6; w2_7 <= w2_6; w3_7 <= m3; f3a7 <= f3a6; f3b7 <= f3b6;
      end
      if (pipe_fire[3]) begin
        w1_8 <= w1_7; w2_8 <= w2_7; w3_8 <= w3_7; y8 <= m4;
      end
    end
  end

  assign data1    = w1_8;
  assign data2    = w2_8;
  assign data3    = w3_8;
  assign out_data = y8;

endmodule
