// dbe: digital back end of the compressively sampled PPG readout.
//
// Ties together the control unit (timing control, configuration registers and
// the estimation sequencer), the DMA, the two 12 x 512 ping-pong sample banks
// DMEM0/DMEM1, the mean divider, the feature extraction unit with its 18 x 64
// LSP coefficient memory, and the peak search. It runs from the 32 kHz
// master clock. While the DMA fills one bank with the current 4 s window,
// the feature extraction reads the other bank, so a result (hr_o with
// hr_done_o) appears about 8.3k clocks after the end of each window.
// The ADC appears as a start pulse (afe_o.ch_samp) and a done/data pair.
// The set of units, the memory sizes and the ping-pong use of the banks follow
// the original ASIC; how they hand over to each other is this design's.
module dbe
  import ppg_pkg::*;
#(
  parameter int unsigned CLK_DIV_P = CLK_DIV,
  parameter int unsigned PSD_SHIFT = 12
) (
  input  logic              clk,          // 32 kHz master clock
  input  logic              rst_n,
  // configuration write/read port (external microcontroller)
  input  logic              cfg_we_i,
  input  logic [1:0]        cfg_addr_i,
  input  logic [7:0]        cfg_wdata_i,
  output logic [7:0]        cfg_rdata_o,
  // analog front end control
  output afe_timing_t       afe_o,
  output afe_cfg_t          afe_cfg_o,
  output logic              o_samp,
  // ADC result
  input  logic              adc_done_i,
  input  logic [ADC_W-1:0]  adc_data_i,
  // heart-rate result
  output logic [HR_W-1:0]   hr_o,
  output logic [BIN_W-1:0]  hr_bin_o,
  output logic              hr_done_o
);

  cr_e               cr_cfg, cr_win, win_cr, feu_cr;
  logic              pd_en;
  logic [SLOT_W-1:0] samp_idx;
  logic              tick, win_start;

  cfg_regs u_cfg (
    .clk, .rst_n, .we_i(cfg_we_i), .addr_i(cfg_addr_i), .wdata_i(cfg_wdata_i),
    .raddr_i(cfg_addr_i), .rdata_o(cfg_rdata_o),
    .cr_o(cr_cfg), .pd_en_o(pd_en), .afe_o(afe_cfg_o)
  );

  timing_ctrl #(.CLK_DIV_P(CLK_DIV_P)) u_tc (
    .clk, .rst_n, .cr_i(cr_cfg), .pd_en_i(pd_en),
    .o_samp, .samp_idx_o(samp_idx), .tick_o(tick), .win_start_o(win_start),
    .cr_win_o(cr_win), .afe_o
  );

  // DMA and ping-pong banks
  logic                    dma_we, dma_bank, win_done, win_bank;
  logic [SLOT_W-1:0]       dma_addr;
  logic [ADC_W-1:0]        dma_data;
  logic [ADC_W+SLOT_W-1:0] win_sum;
  logic [SLOT_W:0]         win_cnt;

  dma_ctrl u_dma (
    .clk, .rst_n, .samp_i(o_samp), .samp_idx_i(samp_idx), .win_start_i(win_start),
    .cr_win_i(cr_win), .adc_done_i, .adc_data_i,
    .we_o(dma_we), .wbank_o(dma_bank), .waddr_o(dma_addr), .wdata_o(dma_data),
    .win_done_o(win_done), .win_bank_o(win_bank), .win_sum_o(win_sum),
    .win_cnt_o(win_cnt), .win_cr_o(win_cr)
  );

  logic              feu_re, feu_bank;
  logic [SLOT_W-1:0] feu_raddr;
  logic [ADC_W-1:0]  bank_rdata [2];
  logic              feu_bank_q;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    dmem #(.WIDTH(ADC_W), .DEPTH(NSLOT)) u_dmem (
      .clk,
      .we_i   (dma_we && (dma_bank == 1'(b))),
      .waddr_i(dma_addr),
      .wdata_i(dma_data),
      .re_i   (feu_re && (feu_bank == 1'(b))),
      .raddr_i(feu_raddr),
      .rdata_o(bank_rdata[b])
    );
  end

  always_ff @(posedge clk) feu_bank_q <= feu_bank;

  // mean divider
  logic                    div_start, div_done, div_busy;
  logic [ADC_W+SLOT_W-1:0] div_dividend, div_quot;
  logic [SLOT_W:0]         div_divisor, div_rem;

  nr_divider #(.ND(ADC_W+SLOT_W), .NV(SLOT_W+1)) u_div (
    .clk, .rst_n, .start_i(div_start), .dividend_i(div_dividend),
    .divisor_i(div_divisor), .busy_o(div_busy), .done_o(div_done),
    .quot_o(div_quot), .rem_o(div_rem)
  );

  // feature extraction and LSP memory
  logic              feu_start, feu_done, feu_busy;
  logic [ADC_W-1:0]  mean;
  logic              psd_we;
  logic [BIN_W-1:0]  psd_waddr;
  logic [PSD_W-1:0]  psd_wdata, psd_rdata;

  feu #(.PSD_SHIFT(PSD_SHIFT)) u_feu (
    .clk, .rst_n, .start_i(feu_start), .cr_i(feu_cr), .mean_i(mean),
    .re_o(feu_re), .raddr_o(feu_raddr), .rdata_i(bank_rdata[feu_bank_q]),
    .psd_we_o(psd_we), .psd_waddr_o(psd_waddr), .psd_wdata_o(psd_wdata),
    .busy_o(feu_busy), .done_o(feu_done)
  );

  logic             pk_start, pk_done, pk_busy, pk_re;
  logic [BIN_W-1:0] pk_raddr, pk_bin;
  logic [PSD_W-1:0] pk_peak;
  logic [HR_W-1:0]  pk_hr;

  dmem #(.WIDTH(PSD_W), .DEPTH(NBIN)) u_psd_mem (
    .clk, .we_i(psd_we), .waddr_i(psd_waddr), .wdata_i(psd_wdata),
    .re_i(pk_re), .raddr_i(pk_raddr), .rdata_o(psd_rdata)
  );

  peak_search u_pk (
    .clk, .rst_n, .start_i(pk_start), .re_o(pk_re), .raddr_o(pk_raddr),
    .rdata_i(psd_rdata), .busy_o(pk_busy), .done_o(pk_done),
    .bin_o(pk_bin), .peak_o(pk_peak), .hr_o(pk_hr)
  );

  cu_ctrl u_cu (
    .clk, .rst_n,
    .win_done_i(win_done), .win_bank_i(win_bank), .win_sum_i(win_sum),
    .win_cnt_i(win_cnt), .win_cr_i(win_cr),
    .div_start_o(div_start), .div_dividend_o(div_dividend),
    .div_divisor_o(div_divisor), .div_done_i(div_done), .div_quot_i(div_quot),
    .feu_start_o(feu_start), .feu_bank_o(feu_bank), .feu_cr_o(feu_cr),
    .mean_o(mean), .feu_done_i(feu_done),
    .pk_start_o(pk_start), .pk_done_i(pk_done), .pk_hr_i(pk_hr), .pk_bin_i(pk_bin),
    .hr_o, .hr_bin_o, .hr_done_o
  );

  // The DMA never writes the bank the feature extraction is reading.
  a_no_bank_clash: assert property (@(posedge clk) disable iff (!rst_n)
    (dma_we && feu_busy) |-> (dma_bank != feu_bank));

endmodule
