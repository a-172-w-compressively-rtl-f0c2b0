// coef_rom: pre-evaluated Lomb-Scargle coefficients cos/sin(w_k (t_n - tau_k)).
//
// For slot n (t_n = n/128 s) and bin k (f_k = 0.5 + 3k/64 Hz) the phase
// w_k t_n is exactly n*(32+3k) in units of 2*pi/8192. tau_k depends on the
// sampling instants of the compression ratio in use and is pre-evaluated from
// tan(2 w tau) = sum sin(2 w t_j) / sum cos(2 w t_j) over the sampled slots;
// the table tau_phase.hex stores phi_k = w_k*tau_k = atan2(that ratio)/2 in
// the same units (64 words for each of 1x, 8x, 10x, 30x; 0 where both sums
// vanish and tau is undefined). The coefficient
// is then read from a quarter-wave sine table of 256 words,
// round(2047*sin((i+0.5)/256 * pi/2)), addressed by the top 10 bits of the
// 13-bit phase n*(32+3k) - phi_k. The original ASIC stores the complete 512x64
// cosine and sine matrices in ROM for each ratio; this module yields the same
// entries (to the 10-bit phase resolution) from 2.3 kbit of tables instead of
// several Mbit. Purely combinational.
module coef_rom
  import ppg_pkg::*;
(
  input  cr_e                       cr_i,
  input  logic [SLOT_W-1:0]         n_i,     // slot index
  input  logic [BIN_W-1:0]          k_i,     // frequency bin
  output logic signed [COEF_W-1:0]  cos_o,
  output logic signed [COEF_W-1:0]  sin_o
);

  logic [COEF_W-2:0]  sine_q [256];
  logic [PHASE_W-1:0] tau_ph [256];

  initial begin
    $readmemh("rtl/sine_q.hex", sine_q);
    $readmemh("rtl/tau_phase.hex", tau_ph);
  end

  function automatic logic signed [COEF_W-1:0] sine(input logic [PHASE_W-1:0] p);
    logic [7:0]        i;
    logic [COEF_W-2:0] mag;
    i   = p[PHASE_W-2] ? ~p[PHASE_W-3 -: 8] : p[PHASE_W-3 -: 8];
    mag = sine_q[i];
    return p[PHASE_W-1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

  logic [PHASE_W-1:0] ph;
  logic [7:0]         step;

  always_comb begin
    step  = 8'd32 + 8'd3 * {2'b00, k_i};
    ph    = (PHASE_W'(n_i) * PHASE_W'(step)) - tau_ph[{cr_i, k_i}];
    sin_o = sine(ph);
    cos_o = sine(ph + PHASE_W'(2048));
  end

endmodule
