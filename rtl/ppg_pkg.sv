// ppg_pkg: types and constants shared by the digital back end (DBE) of the
// compressively sampled PPG readout.
//
// The DBE works on 4 s windows of 512 slots (128 Hz slot clock derived from a
// 32 kHz master clock by /256). In a compressive-sampling (CS) mode only a
// fixed pseudorandom subset of the 512 slots is sampled. The spectrum is
// evaluated on 64 bins f_k = 0.5 Hz + k*3/64 Hz, so the phase of bin k at slot
// n is exactly n*(32+3k) in units of 2*pi/8192, which is why phases here are
// 13-bit integers. Compression ratios 1x, 8x, 10x and 30x follow the original ASIC;
// the encoding of the ratio select is this design's own.
package ppg_pkg;

  // Number of slots in a 4 s window and number of spectral bins.
  localparam int unsigned NSLOT     = 512;
  localparam int unsigned NBIN      = 64;
  localparam int unsigned SLOT_W    = 9;    // $clog2(NSLOT)
  localparam int unsigned BIN_W     = 6;    // $clog2(NBIN)
  localparam int unsigned ADC_W     = 12;   // SAR ADC resolution
  localparam int unsigned PSD_W     = 18;   // width of a stored LSP coefficient
  localparam int unsigned HR_W      = 8;    // width of the heart-rate result
  localparam int unsigned PHASE_W   = 13;   // phase in units of 2*pi/8192
  localparam int unsigned COEF_W    = 12;   // signed sine/cosine coefficient
  localparam int unsigned CLK_DIV   = 256;  // 32 kHz / 256 = 128 Hz

  // Compression-ratio select.
  typedef enum logic [1:0] {
    CR_1X  = 2'd0,   // uniform sampling, 512 samples per window
    CR_8X  = 2'd1,   // 64 samples per window (16 Hz average)
    CR_10X = 2'd2,   // 51 samples per window (12.75 Hz average)
    CR_30X = 2'd3    // 17 samples per window (4.25 Hz average)
  } cr_e;

  // Programmable analog front end settings held in the configuration registers.
  typedef struct packed {
    logic [1:0] tia_gain;  // 0:10k 1:50k 2:100k 3:250k ohm
    logic [3:0] tia_cf;    // feedback capacitor, 2 pF + 2 pF*code (2..22 pF)
    logic [2:0] si_cint;   // integrator capacitor, 50 pF + code*(200/7) pF
    logic [4:0] idac;      // static photocurrent cancellation, code*10uA/31
  } afe_cfg_t;

  // Timing signals for the LED driver and analog front end.
  typedef struct packed {
    logic led_pulse;  // LED on
    logic pd_act;     // photodiode/TIA active phase
    logic int_clk;    // switched integrator integrates while high
    logic ch_samp;    // rising edge samples SI output into the ADC
    logic int_rst;    // resets the integrator after sampling
    logic en;         // OTA enable (power-down mode)
  } afe_timing_t;

endpackage
