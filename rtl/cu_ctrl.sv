// cu_ctrl: control sequencer of the digital back end.
//
// Runs the heart-rate estimation of each finished 4 s window: when the DMA
// reports a full bank, the sample sum is divided by the sample count
// (non-restoring divider) to give the mean, the feature extraction unit
// computes the 64 LSP coefficients from that bank, and the peak search turns
// the largest coefficient into the 8-bit heart rate. The result is held in a
// register and hr_done_o is raised; it stays high until the next window's
// estimation begins. A window with no samples is skipped.
//
// The original ASIC gives this role to a RISC controller driven by configuration
// and instruction registers but not its instruction set; this module is a
// fixed finite-state sequencer that performs the same sequence. Sub-unit
// start strobes double as clock-enable points (the original ASIC uses clock
// gating; here the idle units simply hold their state).
module cu_ctrl
  import ppg_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // from the DMA
  input  logic                    win_done_i,
  input  logic                    win_bank_i,
  input  logic [ADC_W+SLOT_W-1:0] win_sum_i,
  input  logic [SLOT_W:0]         win_cnt_i,
  input  cr_e                     win_cr_i,
  // divider
  output logic                    div_start_o,
  output logic [ADC_W+SLOT_W-1:0] div_dividend_o,
  output logic [SLOT_W:0]         div_divisor_o,
  input  logic                    div_done_i,
  input  logic [ADC_W+SLOT_W-1:0] div_quot_i,
  // feature extraction unit
  output logic                    feu_start_o,
  output logic                    feu_bank_o,    // bank the FEU reads
  output cr_e                     feu_cr_o,
  output logic [ADC_W-1:0]        mean_o,
  input  logic                    feu_done_i,
  // peak search
  output logic                    pk_start_o,
  input  logic                    pk_done_i,
  input  logic [HR_W-1:0]         pk_hr_i,
  input  logic [BIN_W-1:0]        pk_bin_i,
  // result
  output logic [HR_W-1:0]         hr_o,
  output logic [BIN_W-1:0]        hr_bin_o,
  output logic                    hr_done_o
);

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_FEU_GO, S_FEU, S_PK_GO, S_PK} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      div_start_o <= 1'b0; div_dividend_o <= '0; div_divisor_o <= '0;
      feu_start_o <= 1'b0; feu_bank_o <= 1'b0; feu_cr_o <= CR_1X; mean_o <= '0;
      pk_start_o <= 1'b0; hr_o <= '0; hr_bin_o <= '0; hr_done_o <= 1'b0;
    end else begin
      div_start_o <= 1'b0;
      feu_start_o <= 1'b0;
      pk_start_o  <= 1'b0;
      unique case (state)
        S_IDLE: if (win_done_i && win_cnt_i != '0) begin
          div_start_o    <= 1'b1;
          div_dividend_o <= win_sum_i;
          div_divisor_o  <= win_cnt_i;
          feu_bank_o     <= win_bank_i;
          feu_cr_o       <= win_cr_i;
          hr_done_o      <= 1'b0;
          state          <= S_DIV;
        end
        S_DIV: if (div_done_i) begin
          mean_o <= ADC_W'(div_quot_i);
          state  <= S_FEU_GO;
        end
        S_FEU_GO: begin
          feu_start_o <= 1'b1;
          state       <= S_FEU;
        end
        S_FEU: if (feu_done_i) begin
          pk_start_o <= 1'b1;
          state      <= S_PK_GO;
        end
        S_PK_GO: state <= S_PK;
        S_PK: if (pk_done_i) begin
          hr_o      <= pk_hr_i;
          hr_bin_o  <= pk_bin_i;
          hr_done_o <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
