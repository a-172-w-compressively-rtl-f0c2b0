// timing_ctrl: timing control of the control unit.
//
// Divides the 32 kHz master clock by CLK_DIV (256) into 128 Hz slot ticks and
// counts slots with a 9-bit counter (512 slots = one 4 s window). In uniform
// mode every tick is a sampling instant; in a CS mode the slot counter
// addresses the sampling LUT of the selected compression ratio and only the
// slots marked there become sampling instants (o_samp). From each o_samp the
// LED and front-end control pulses are generated, one 32 kHz period per step:
//
//   step   1       2       3        4        5
//   led    1       1       1        0        0
//   pd_act 1       1       1        1        0
//   intclk 0       0       1        0        0     (T_int = one clock period)
//   chsamp 0       0       0        1        0
//   intrst 0       0       0        0        1
//
// With power-down enabled, en rises with pd_act and falls with the falling
// edge of int_rst; otherwise en stays high. The order of the pulses follows
// the original ASIC (integrate while INT_clk is high, sample on the rising edge of
// CH_Samp, then reset the integrator); the step lengths are this design's.
// The compression ratio is latched at slot 0 so a window never mixes tables.
// Outputs are registered. o_samp, win_start and samp_idx_o are valid together
// for one cycle, one clock after the divider wraps.
module timing_ctrl
  import ppg_pkg::*;
#(
  parameter int unsigned CLK_DIV_P = CLK_DIV   // master clocks per slot
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cr_e               cr_i,        // requested compression ratio
  input  logic              pd_en_i,     // optional OTA power-down mode
  output logic              o_samp,      // sampling instant (1-cycle pulse)
  output logic [SLOT_W-1:0] samp_idx_o,  // slot index of this tick
  output logic              tick_o,      // 128 Hz slot tick (1-cycle pulse)
  output logic              win_start_o, // tick of slot 0
  output cr_e               cr_win_o,    // compression ratio of this window
  output afe_timing_t       afe_o        // LED and AFE control pulses
);

  localparam int unsigned DW = $clog2(CLK_DIV_P);

  logic [DW-1:0]     div_cnt;
  logic [SLOT_W-1:0] slot_cnt;
  logic              wrap;
  cr_e               cr_eff;
  logic              lut_samp;
  logic [2:0]        step;

  assign wrap   = (div_cnt == DW'(CLK_DIV_P - 1));
  assign cr_eff = (slot_cnt == '0) ? cr_i : cr_win_o;

  cs_lut u_lut (.cr_i(cr_eff), .slot_i(slot_cnt), .samp_o(lut_samp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt     <= '0;
      slot_cnt    <= '0;
      o_samp      <= 1'b0;
      tick_o      <= 1'b0;
      win_start_o <= 1'b0;
      samp_idx_o  <= '0;
      cr_win_o    <= CR_1X;
    end else begin
      div_cnt     <= wrap ? '0 : div_cnt + 1'b1;
      tick_o      <= wrap;
      o_samp      <= wrap & lut_samp;
      win_start_o <= wrap & (slot_cnt == '0);
      if (wrap) begin
        samp_idx_o <= slot_cnt;
        slot_cnt   <= slot_cnt + 1'b1;
        if (slot_cnt == '0) cr_win_o <= cr_i;
      end
    end
  end

  // Pulse sequencer: step 0 idle, 1..5 as in the table above.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step  <= '0;
      afe_o <= '0;
      afe_o.en <= 1'b1;   // power-down mode is off after reset
    end else begin
      logic [2:0] nstep;
      nstep = o_samp ? 3'd1 : (step == 3'd0 || step == 3'd5) ? 3'd0 : step + 1'b1;
      step            <= nstep;
      afe_o.led_pulse <= (nstep >= 3'd1) && (nstep <= 3'd3);
      afe_o.pd_act    <= (nstep >= 3'd1) && (nstep <= 3'd4);
      afe_o.int_clk   <= (nstep == 3'd3);
      afe_o.ch_samp   <= (nstep == 3'd4);
      afe_o.int_rst   <= (nstep == 3'd5);
      afe_o.en        <= pd_en_i ? (nstep != 3'd0) : 1'b1;
    end
  end

endmodule
