// vr_dsp: variable-rate FIR DSP whose tap delay does not depend on the sampling rate.
//
// A variable-rate ADC samples at 1/T0 while its input is slow and at M/T0 while it is
// fast. A conventional FIR clocked by that sample clock would scale its frequency
// response with the rate. This DSP keeps the tap delay at T0: its delay line has K*M+1
// places, and taps sit M places apart while the samples come at M/T0 (each place holds
// one sample period), and one place apart while they come at 1/T0. The DSP clock follows
// the sampling clock, so the work done follows the input activity:
//   SLOW  one sample per T0; places 0..K are the taps; one output per sample.
//   FAST  one sample per base cycle (T0/M); taps at places 0, M, ..., K*M.
//   slow -> fast: at once, the slow line is spread over the fast places: each place gets
//         the slow sample that was being held at the instant the place stands for
//         (zero-order hold), taking into account the gap (1..M base cycles) between the
//         last slow sample and the first fast one; the DSP goes to the fast rate.
//   fast -> slow (F2S): the DSP stays at the fast rate as long as any fast sample is in
//         the line. Each base cycle without a new sample shifts in a dummy copy of the
//         last input sample. After K*M shifts the taps hold only slow samples: the line
//         is compacted to one place per tap, dummies are discarded, and the DSP is SLOW.
// y = sum h[k] * tap_k is computed for every shift, with full precision (XW+HW+4 bits).
//
// Interface: clk is the base clock (rate M/T0). smp_valid/smp_data bring a sample from
// the ADC; fast tells the rate the ADC currently uses (high: M/T0). In SLOW mode a sample
// is expected every M cycles. y_valid/y give one output per DSP clock, registered (one
// cycle after the shift that produced it); mode shows the state.
// Defaults K = 10 and M = 4 follow the illustrative example (10th-order FIR, 50 kHz and
// 200 kHz sampling); sample width 8 bits; coefficient width (12 bits) is assumed.
module vr_dsp #(
  parameter int K  = 10,
  parameter int M  = 4,
  parameter int XW = 8,
  parameter int HW = 12,
  localparam int YW = XW + HW + $clog2(K + 1),
  localparam int L  = K * M + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 smp_valid,
  input  logic signed [XW-1:0] smp_data,
  input  logic                 fast,
  input  logic signed [HW-1:0] h [K+1],
  output logic                 y_valid,
  output logic signed [YW-1:0] y,
  output logic [1:0]           mode
);

  typedef enum logic [1:0] {SLOW = 2'd0, FAST = 2'd1, F2S = 2'd2} vmode_t;

  vmode_t                     st;
  logic signed [XW-1:0]       ln [L];
  logic signed [XW-1:0]       base [L];   // line after a slow->fast expansion
  logic signed [XW-1:0]       nx [L];     // line after this cycle's shift
  logic                       expand, shift, compact, fast_lay;
  logic [$clog2(L+1)-1:0]     cnt;
  logic [$clog2(M+1)-1:0]     gap;        // base cycles since the last sample, 1..M
  logic signed [YW-1:0]       acc;

  assign expand   = (st == SLOW) && fast;
  assign fast_lay = (st != SLOW) || expand;
  // from the first base cycle without fast samples the line moves every cycle
  assign shift    = (st == F2S || (st == FAST && !fast)) ? 1'b1 : smp_valid;
  assign compact  = (st == F2S) && !fast && smp_valid && (cnt >= ($clog2(L+1))'(K * M));

  always_comb begin
    for (int p = 0; p < L; p++) begin
      // place p after the shift stands for gap + p - 1 cycles after the newest slow
      // sample, i.e. holds slow sample (p + M - gap) / M
      if (expand) base[p] = ln[(p + M - int'(gap)) / M];
      else        base[p] = ln[p];
    end
    for (int p = 0; p < L; p++) nx[p] = base[p];
    if (shift) begin
      if (fast_lay) begin
        for (int p = L - 1; p > 0; p--) nx[p] = base[p-1];
      end else begin
        for (int p = K; p > 0; p--) nx[p] = base[p-1];
      end
      nx[0] = smp_valid ? smp_data : base[0];
    end
    acc = '0;
    for (int k = 0; k <= K; k++)
      acc += YW'(h[k]) * YW'(fast_lay ? nx[k*M] : nx[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= SLOW;
      cnt     <= '0;
      y_valid <= 1'b0;
      y       <= '0;
      gap     <= ($clog2(M+1))'(M);
      for (int p = 0; p < L; p++) ln[p] <= '0;
    end else begin
      y_valid <= shift;
      if (smp_valid)                      gap <= ($clog2(M+1))'(1);
      else if (gap != ($clog2(M+1))'(M))  gap <= gap + 1'b1;
      if (shift) y <= acc;
      if (compact) begin
        for (int j = 0; j <= K; j++) ln[j] <= nx[j*M];
      end else begin
        for (int p = 0; p < L; p++) ln[p] <= nx[p];
      end
      unique case (st)
        SLOW: if (fast) st <= FAST;
        FAST: if (!fast) begin
          st  <= F2S;
          cnt <= ($clog2(L+1))'(shift);
        end
        F2S: begin
          if (fast)         st  <= FAST;
          else if (compact) st  <= SLOW;
          else              cnt <= cnt + 1'b1;
        end
        default: st <= SLOW;
      endcase
    end
  end

  assign mode = st;

endmodule
