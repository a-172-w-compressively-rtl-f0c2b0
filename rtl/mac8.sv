// mac8: eight-way multiply-accumulate unit of the feature extraction unit.
//
// Four lanes accumulate x_n * cos(w_k (t_n - tau_k)) and four accumulate
// x_n * sin(w_k (t_n - tau_k)) for four frequency bins at once; all eight
// share the mean-subtracted sample x_n. With one sample per clock, 512 slots
// and 64 bins, the 64x512 cosine and 64x512 sine products take
// 64*512/4 = 8192 clocks, the figure the original ASIC gives. en_i accumulates;
// clr_i together with en_i starts a new sum with the current product
// (acc <= product). Results are available one clock after the last en_i.
// The split of four cosine and four sine lanes is the original ASIC's; operand
// widths and the clear mechanism are this design's.
module mac8
  import ppg_pkg::*;
#(
  parameter int unsigned XW   = ADC_W + 1,              // signed sample width
  parameter int unsigned CW   = COEF_W,                 // signed coefficient
  parameter int unsigned ACCW = XW + CW + SLOT_W        // no overflow over 512
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic                    clr_i,
  input  logic signed [XW-1:0]    x_i,
  input  logic signed [CW-1:0]    cos_i [4],
  input  logic signed [CW-1:0]    sin_i [4],
  output logic signed [ACCW-1:0]  acc_c_o [4],
  output logic signed [ACCW-1:0]  acc_s_o [4]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < 4; l++) begin
        acc_c_o[l] <= '0;
        acc_s_o[l] <= '0;
      end
    end else if (en_i) begin
      for (int l = 0; l < 4; l++) begin
        logic signed [XW+CW-1:0] pc, ps;
        pc = x_i * cos_i[l];
        ps = x_i * sin_i[l];
        acc_c_o[l] <= (clr_i ? '0 : acc_c_o[l]) + ACCW'(pc);
        acc_s_o[l] <= (clr_i ? '0 : acc_s_o[l]) + ACCW'(ps);
      end
    end
  end

endmodule
