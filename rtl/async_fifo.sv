// async_fifo: FIFO with one write and two independent read channels (tap-delay data store).
//
// A CT tap delay carries only the event through its delay cells; the data of the event is
// written into this FIFO when the event enters the tap delay and read back when the
// event reaches the end of the first tap (read channel 1) and the end of the second tap
// (read channel 2). Because every event is written once and read once on each channel,
// in order, each channel needs only its own address counter. In the circuit each
// operation is a self-timed SRAM access of tg/2, with the address counter stepping on the
// falling edge of the enable; here each operation takes one tick of the time-base clock.
//
// Interface: wr with wdata writes one word. rd1/rd2 read the next word of their channel;
// with ld1/ld2 high the word is loaded into the channel's output register (rdata1/2,
// which holds its value between reads); with ld low the channel only steps past it.
// err latches an overflow (write with DEPTH words still unread by channel 2) or an
// underflow (a read of an empty channel). All three operations may happen in one tick.
// Reset clears the pointers and output registers.
// The SRAM of 128 16-bit words (4 columns by 32 rows) is an array here.
module async_fifo #(
  parameter int DEPTH = 128,
  parameter int DW    = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  input  logic          rd1,
  input  logic          ld1,
  input  logic          rd2,
  input  logic          ld2,
  output logic [DW-1:0] rdata1,
  output logic [DW-1:0] rdata2,
  output logic          err
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wp, rp1, rp2;
  logic          full, empty1, empty2;

  assign full   = (wp - rp2) == (AW+1)'(DEPTH);
  assign empty1 = (wp == rp1);
  assign empty2 = (wp == rp2);

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wp[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp     <= '0;
      rp1    <= '0;
      rp2    <= '0;
      rdata1 <= '0;
      rdata2 <= '0;
      err    <= 1'b0;
    end else begin
      if (wr) begin
        if (full) err <= 1'b1;
        else      wp  <= wp + 1'b1;
      end
      if (rd1) begin
        if (empty1) err <= 1'b1;
        else begin
          rp1 <= rp1 + 1'b1;
          if (ld1) rdata1 <= mem[rp1[AW-1:0]];
        end
      end
      if (rd2) begin
        if (empty2) err <= 1'b1;
        else begin
          rp2 <= rp2 + 1'b1;
          if (ld2) rdata2 <= mem[rp2[AW-1:0]];
        end
      end
    end
  end

endmodule
