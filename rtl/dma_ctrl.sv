// dma_ctrl: moves ADC results into the ping-pong sample banks and keeps the
// running sum for the window mean.
//
// At each sampling instant the slot index is latched; when the ADC finishes
// that conversion the 12-bit code is written to the bank being filled at the
// address of its slot, and added to the window sum and sample count. At the
// slot-0 tick of every window the filled bank is handed over (win_done_o with
// its bank number, sum, count and compression ratio) and filling continues in
// the other bank, so one bank is always free for the feature extraction of
// the previous window. The first slot-0 tick after reset only starts filling;
// there is no window before it to report.
// Storing each sample at its slot address keeps the 512 x 1 layout of the
// document's data vector; the handshake is this design's.
module dma_ctrl
  import ppg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               samp_i,       // sampling instant
  input  logic [SLOT_W-1:0]  samp_idx_i,   // its slot
  input  logic               win_start_i,  // slot-0 tick
  input  cr_e                cr_win_i,     // ratio of the window now starting
  input  logic               adc_done_i,
  input  logic [ADC_W-1:0]   adc_data_i,
  output logic               we_o,
  output logic               wbank_o,      // bank being filled
  output logic [SLOT_W-1:0]  waddr_o,
  output logic [ADC_W-1:0]   wdata_o,
  output logic               win_done_o,   // a full window is in bank win_bank_o
  output logic               win_bank_o,
  output logic [ADC_W+SLOT_W-1:0] win_sum_o,
  output logic [SLOT_W:0]    win_cnt_o,
  output cr_e                win_cr_o
);

  logic                      primed;
  logic                      pend;
  logic [SLOT_W-1:0]         idx;
  logic [ADC_W+SLOT_W-1:0]   sum;
  logic [SLOT_W:0]           cnt;
  cr_e                       cr_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed <= 1'b0; pend <= 1'b0; idx <= '0; sum <= '0; cnt <= '0;
      cr_cur <= CR_1X;
      we_o <= 1'b0; wbank_o <= 1'b0; waddr_o <= '0; wdata_o <= '0;
      win_done_o <= 1'b0; win_bank_o <= 1'b0; win_sum_o <= '0; win_cnt_o <= '0;
      win_cr_o <= CR_1X;
    end else begin
      we_o       <= 1'b0;
      win_done_o <= 1'b0;
      if (win_start_i) begin
        win_done_o <= primed;
        win_bank_o <= wbank_o;
        win_sum_o  <= sum;
        win_cnt_o  <= cnt;
        win_cr_o   <= cr_cur;
        if (primed) wbank_o <= ~wbank_o;
        primed <= 1'b1;
        sum    <= '0;
        cnt    <= '0;
        cr_cur <= cr_win_i;
      end else if (adc_done_i && pend) begin
        we_o    <= 1'b1;
        waddr_o <= idx;
        wdata_o <= adc_data_i;
        sum     <= sum + (ADC_W+SLOT_W)'(adc_data_i);
        cnt     <= cnt + 1'b1;
      end
      if (samp_i) begin
        pend <= 1'b1;
        idx  <= samp_idx_i;
      end else if (adc_done_i) begin
        pend <= 1'b0;
      end
    end
  end

endmodule
