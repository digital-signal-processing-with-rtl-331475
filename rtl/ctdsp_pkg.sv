// ctdsp_pkg: types and constants shared by the CT digital IIR filter system.
//
// The system is a clockless ("continuous-time") digital filter whose timing comes from
// the input events themselves. In this RTL it is emulated on a fine time-base clock:
// every delay is a count of ticks of that clock (1 tick stands for 1 ns), so the nominal
// cell delay tg = 25 ns is a tune value of 25 and the tap delay TD = 1 us is 40 cells.
//
// The package holds the word widths (16-bit data, 7-bit input, 10-bit coefficients with
// 8 fractional bits), the req_grp tag of the IIR grouping block, and the configuration
// word that the scan chain loads, with its reset value: a sixth-order Butterworth
// low-pass at 50 kHz for TD = 1 us (coefficients are this design's own choice), tap
// delays of 39 and 40 cells, four interpolator sections of TD/2, TD/4, TD/8, TD/16.
package ctdsp_pkg;

  localparam int DW    = 16;  // data word everywhere except the input
  localparam int INW   = 7;   // input resolution
  localparam int CW    = 10;  // coefficient resolution
  localparam int CFRAC = 8;   // fractional bits of a coefficient
  localparam int TUNE_W = 8;  // width of a delay tune value (ticks)
  localparam int NCW   = 7;   // width of a configured delay-line length

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [CW-1:0] coef_t;

  // Which events a closed IIR grouping window holds (the four req_grp bits).
  typedef enum logic [3:0] {
    GRP_NONE = 4'b0000,
    GRP_IN   = 4'b0001,  // an input event only
    GRP_R1   = 4'b0010,  // a Tap1 feedback event (and maybe an input event)
    GRP_R1R2 = 4'b0100,  // a Tap1 and a Tap2 event (and maybe an input event)
    GRP_R2   = 4'b1000   // a lone Tap2 event: reads FIFO2/3, takes no part in arithmetic
  } grp_t;

  // One direct-form-II biquad: w = in + fb1*w(t-TD) + fb2*w(t-2TD),
  // its output ff0*w + ff1*w(t-TD) + ff2*w(t-2TD) is the next section's input.
  typedef struct packed {
    coef_t fb1;
    coef_t fb2;
    coef_t ff0;
    coef_t ff1;
    coef_t ff2;
  } biquad_t;

  typedef struct packed {
    logic [NCW-1:0] n_cells;  // tg cells in the section's delay line
    logic           half_en;  // add a half-delay cell
    coef_t          c0;       // weight of the direct input
    coef_t          c1;       // weight of the delayed input
  } fir_cfg_t;

  typedef struct packed {
    coef_t          g_in;       // input gain in front of section 1
    biquad_t [2:0]  sec;        // the three biquads, sec[0] first
    logic [NCW-1:0] tap1_cells; // cells in the first tap delay (pipeline included)
    logic [NCW-1:0] tap2_cells; // tg cells in the second tap delay (plus a half cell)
    logic           ed_en;      // event detector on
    logic [2:0]     ed_res;     // compare 9 + ed_res bits
    logic [2:0]     n_fir;      // interpolator sections in use, 0..4
    fir_cfg_t [3:0] fir;        // fir[0] is the first section
    logic           therm_en;   // CT-to-DT converter uses thermometer code
  } cfg_t;

  localparam int CFG_W = $bits(cfg_t);

  function automatic biquad_t mk_bq(int fb1, int fb2, int ff0, int ff1, int ff2);
    biquad_t b;
    b.fb1 = coef_t'(fb1);
    b.fb2 = coef_t'(fb2);
    b.ff0 = coef_t'(ff0);
    b.ff1 = coef_t'(ff1);
    b.ff2 = coef_t'(ff2);
    return b;
  endfunction

  function automatic fir_cfg_t mk_fir(int cells, bit half);
    fir_cfg_t f;
    f.n_cells = NCW'(cells);
    f.half_en = half;
    f.c0      = coef_t'(128);  // 1/2
    f.c1      = coef_t'(128);  // 1/2
    return f;
  endfunction

  function automatic cfg_t default_cfg();
    cfg_t c;
    c.g_in       = coef_t'(19);
    c.sec[0]     = mk_bq(375, -138, 5, 10, 5);
    c.sec[1]     = mk_bq(400, -164, 6, 12, 6);
    c.sec[2]     = mk_bq(451, -218, 64, 128, 64);
    c.tap1_cells = NCW'(39);
    c.tap2_cells = NCW'(40);
    c.ed_en      = 1'b1;
    c.ed_res     = 3'd7;
    c.n_fir      = 3'd4;
    c.fir[0]     = mk_fir(20, 1'b0);
    c.fir[1]     = mk_fir(10, 1'b0);
    c.fir[2]     = mk_fir(5, 1'b0);
    c.fir[3]     = mk_fir(2, 1'b1);
    c.therm_en   = 1'b1;
    return c;
  endfunction

  // Saturate a wide signed value to a data word.
  function automatic data_t sat16(logic signed [31:0] v);
    if (v > 32'sd32767) return data_t'(16'sh7fff);
    if (v < -32'sd32768) return data_t'(16'sh8000);
    return data_t'(v[DW-1:0]);
  endfunction

endpackage
