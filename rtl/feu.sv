// feu: feature extraction unit, a Lomb-Scargle periodogram accelerator.
//
// Computes, for the 64 bins k, P_k = |sum_n C[n,k] x_n| + |sum_n S[n,k] x_n|
// with C and S the pre-evaluated cosine and sine coefficients of the window's
// compression ratio and x_n the mean-subtracted sample of slot n. A slot that
// the sampling LUT does not mark contributes x_n = 0, which makes the 512-slot
// sum equal to the sum over the M sampled instants. The squares of the
// textbook periodogram are replaced by absolute values and its denominators
// are dropped, as in the original ASIC.
//
// Schedule: 16 passes of 512 clocks; pass p reads the sample bank once in slot
// order and the eight MAC lanes accumulate bins 4p..4p+3 (four cosine, four
// sine lanes): 8192 accumulate clocks in all. At the start of the next pass
// the four finished sums are captured and written to the LSP memory, one word
// per clock, overlapping the next pass. Each word is (|C|+|S|) >> PSD_SHIFT,
// saturated to 18 bits; the 18-bit width is the original ASIC's, the scaling is
// this design's choice. start_i begins a run (bank contents, mean_i and cr_i
// must then stay stable); done_o pulses 8192+7 clocks after start_i.
// Sample memory reads have one clock of latency.
module feu
  import ppg_pkg::*;
#(
  parameter int unsigned PSD_SHIFT = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  cr_e               cr_i,          // ratio the window was sampled with
  input  logic [ADC_W-1:0]  mean_i,        // window mean
  // sample bank read port
  output logic              re_o,
  output logic [SLOT_W-1:0] raddr_o,
  input  logic [ADC_W-1:0]  rdata_i,
  // LSP coefficient memory write port
  output logic              psd_we_o,
  output logic [BIN_W-1:0]  psd_waddr_o,
  output logic [PSD_W-1:0]  psd_wdata_o,
  output logic              busy_o,
  output logic              done_o
);

  localparam int unsigned XW   = ADC_W + 1;
  localparam int unsigned ACCW = XW + COEF_W + SLOT_W;
  localparam int unsigned CNTW = SLOT_W + BIN_W - 2;   // 13 bits: 8192 clocks

  logic                 run;
  logic [CNTW-1:0]      cnt;
  logic                 s1_valid;
  logic [SLOT_W-1:0]    s1_n;
  logic [BIN_W-3:0]     s1_pass;
  logic                 last_q;
  logic                 samp;
  logic signed [XW-1:0] x;
  logic signed [COEF_W-1:0] cos_c [4];
  logic signed [COEF_W-1:0] sin_c [4];
  logic signed [ACCW-1:0]   acc_c [4];
  logic signed [ACCW-1:0]   acc_s [4];
  logic [PSD_W-1:0]     hold [4];
  logic [BIN_W-3:0]     hold_pass;
  logic [2:0]           wr_left;
  logic [1:0]           wr_lane;
  logic                 capture;
  logic                 finishing;

  // Stage 0: address the sample bank.
  assign re_o    = run;
  assign raddr_o = cnt[SLOT_W-1:0];

  // Stage 1: mean subtraction, sampling mask and coefficients.
  cs_lut u_mask (.cr_i(cr_i), .slot_i(s1_n), .samp_o(samp));

  assign x = samp ? ($signed({1'b0, rdata_i}) - $signed({1'b0, mean_i})) : '0;

  for (genvar l = 0; l < 4; l++) begin : g_coef
    coef_rom u_coef (
      .cr_i (cr_i),
      .n_i  (s1_n),
      .k_i  ({s1_pass, 2'(l)}),
      .cos_o(cos_c[l]),
      .sin_o(sin_c[l])
    );
  end

  mac8 u_mac (
    .clk    (clk),
    .rst_n  (rst_n),
    .en_i   (s1_valid),
    .clr_i  (s1_n == '0),
    .x_i    (x),
    .cos_i  (cos_c),
    .sin_i  (sin_c),
    .acc_c_o(acc_c),
    .acc_s_o(acc_s)
  );

  function automatic logic [PSD_W-1:0] scale(input logic signed [ACCW-1:0] c,
                                             input logic signed [ACCW-1:0] s);
    logic [ACCW:0] m;
    logic [ACCW:0] sh;
    m  = {1'b0, (c < 0) ? ACCW'(-c) : ACCW'(c)} + {1'b0, (s < 0) ? ACCW'(-s) : ACCW'(s)};
    sh = m >> PSD_SHIFT;
    return (sh > (ACCW+1)'({PSD_W{1'b1}})) ? '1 : PSD_W'(sh);
  endfunction

  // A finished pass is captured when the next pass starts accumulating, or
  // one clock after the final sample.
  assign capture   = (s1_valid && s1_n == '0 && s1_pass != '0) || last_q;
  assign finishing = last_q || (wr_left != '0) || s1_valid || run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; cnt <= '0;
      s1_valid <= 1'b0; s1_n <= '0; s1_pass <= '0; last_q <= 1'b0;
      hold_pass <= '0; wr_left <= '0; wr_lane <= '0;
      psd_we_o <= 1'b0; psd_waddr_o <= '0; psd_wdata_o <= '0;
      busy_o <= 1'b0; done_o <= 1'b0;
      for (int l = 0; l < 4; l++) hold[l] <= '0;
    end else begin
      done_o   <= 1'b0;
      psd_we_o <= 1'b0;
      if (start_i && !busy_o) begin
        run <= 1'b1; cnt <= '0; busy_o <= 1'b1;
      end else if (run) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) run <= 1'b0;
      end
      s1_valid <= run;
      s1_n     <= cnt[SLOT_W-1:0];
      s1_pass  <= cnt[CNTW-1:SLOT_W];
      last_q   <= s1_valid && (s1_n == '1) && (s1_pass == '1);

      if (capture) begin
        for (int l = 0; l < 4; l++) hold[l] <= scale(acc_c[l], acc_s[l]);
        hold_pass <= last_q ? '1 : s1_pass - 1'b1;
        wr_left   <= 3'd4;
        wr_lane   <= '0;
      end else if (wr_left != '0) begin
        psd_we_o    <= 1'b1;
        psd_waddr_o <= {hold_pass, wr_lane};
        psd_wdata_o <= hold[wr_lane];
        wr_lane     <= wr_lane + 1'b1;
        wr_left     <= wr_left - 1'b1;
      end

      if (busy_o && !start_i && !finishing) begin
        busy_o <= 1'b0;
        done_o <= 1'b1;
      end
    end
  end

endmodule
