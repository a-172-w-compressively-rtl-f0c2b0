// sar_ctrl: successive-approximation register of the 12-bit SAR ADC.
//
// The capacitive DAC and the comparator of the converter are analog; this is
// the digital half. A rising edge of ch_samp (the sampling pulse from the
// timing control) starts a conversion: starting at the MSB, each clock one
// trial bit is set in dac_o, and on the next clock it is kept if the
// comparator reports the input at or above the DAC level (comp_i = 1) and
// cleared otherwise. After W trial clocks the code is presented on data_o with
// a one-cycle done_o pulse, W+1 clocks after the edge that sees the start. The original ASIC names a
// 12-bit SAR ADC with a split capacitor DAC; the bit-serial search and its
// timing are the standard SAR algorithm, chosen here.
module sar_ctrl #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,   // sampling pulse (level, rising edge starts)
  input  logic         comp_i,    // comparator: 1 when vin >= DAC level
  output logic [W-1:0] dac_o,     // DAC code under trial
  output logic         busy_o,
  output logic         done_o,    // one-cycle pulse with a new result
  output logic [W-1:0] data_o     // last conversion result
);

  localparam int unsigned BW = $clog2(W + 1);

  logic          start_q;
  logic [BW-1:0] bit_idx;   // bit under trial
  logic [W-1:0]  sar;

  assign dac_o = sar;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      bit_idx <= '0;
      sar     <= '0;
      data_o  <= '0;
    end else begin
      start_q <= start_i;
      done_o  <= 1'b0;
      if (start_i && !start_q && !busy_o) begin
        busy_o  <= 1'b1;
        bit_idx <= BW'(W - 1);
        sar     <= W'(1) << (W - 1);
      end else if (busy_o) begin
        // Decide the bit under trial, then try the next one.
        sar[bit_idx] <= comp_i;
        if (bit_idx == '0) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
          data_o <= {sar[W-1:1], comp_i};
        end else begin
          sar[bit_idx - 1'b1] <= 1'b1;
          bit_idx <= bit_idx - 1'b1;
        end
      end
    end
  end

endmodule
