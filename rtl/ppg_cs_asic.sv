// ppg_cs_asic: digital part of the single-channel compressively sampled PPG
// readout with on-chip heart-rate estimation.
//
// The photodiode current is amplified by a TIA, integrated by a switched
// integrator and digitised by a 12-bit SAR ADC; those analog circuits live
// outside this module and connect through its ports: the LED and front-end
// control pulses and settings go out, and the SAR comparator decision comes
// in (comp_i = 1 when the sampled input is at or above the level of dac_o).
// Inside are the SAR logic and the digital back end, which samples either
// uniformly at 128 Hz or at pseudorandom slots (8x, 10x, 30x compression),
// and every 4 s estimates the average heart rate with a Lomb-Scargle
// periodogram computed directly on the compressively sampled data.
// Clock: 32 kHz. Reset: active-low, asynchronous.
module ppg_cs_asic
  import ppg_pkg::*;
#(
  parameter int unsigned CLK_DIV_P = CLK_DIV,
  parameter int unsigned PSD_SHIFT = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we_i,
  input  logic [1:0]        cfg_addr_i,
  input  logic [7:0]        cfg_wdata_i,
  output logic [7:0]        cfg_rdata_o,
  output afe_timing_t       afe_o,        // LED_Pulse, PD_Act, INT_clk, CH_Samp, INT_Rst, En
  output afe_cfg_t          afe_cfg_o,    // TIA gain/Cf, SI Cint, IDAC code
  output logic              o_samp,
  input  logic              comp_i,       // SAR comparator
  output logic [ADC_W-1:0]  dac_o,        // SAR capacitive DAC code
  output logic [HR_W-1:0]   hr_o,
  output logic [BIN_W-1:0]  hr_bin_o,
  output logic              hr_done_o
);

  logic             adc_busy, adc_done;
  logic [ADC_W-1:0] adc_data;

  sar_ctrl #(.W(ADC_W)) u_sar (
    .clk, .rst_n, .start_i(afe_o.ch_samp), .comp_i, .dac_o,
    .busy_o(adc_busy), .done_o(adc_done), .data_o(adc_data)
  );

  dbe #(.CLK_DIV_P(CLK_DIV_P), .PSD_SHIFT(PSD_SHIFT)) u_dbe (
    .clk, .rst_n, .cfg_we_i, .cfg_addr_i, .cfg_wdata_i, .cfg_rdata_o,
    .afe_o, .afe_cfg_o, .o_samp, .adc_done_i(adc_done), .adc_data_i(adc_data),
    .hr_o, .hr_bin_o, .hr_done_o
  );

endmodule
