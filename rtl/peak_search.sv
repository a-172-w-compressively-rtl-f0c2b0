// peak_search: linear search for the largest LSP coefficient and HR estimate.
//
// After start_i the 64 words of the LSP memory are read in bin order, one per
// clock (the memory answers one clock after the address), and the largest
// value and its bin are kept; on equal values the lower bin wins. The heart
// rate of bin k is HR = 60 * f_k with f_k = 0.5 + 3k/64 Hz, i.e.
// 30 + 180k/64 bpm, rounded to the nearest integer: 30..207 bpm in 8 bits.
// done_o pulses 66 clocks after the edge that accepts start_i, with bin_o, peak_o and hr_o valid and
// held until the next search. The linear search and HR = 60 f_pk are the
// document's; the rounding is this design's.
module peak_search
  import ppg_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  output logic              re_o,
  output logic [BIN_W-1:0]  raddr_o,
  input  logic [PSD_W-1:0]  rdata_i,
  output logic              busy_o,
  output logic              done_o,
  output logic [BIN_W-1:0]  bin_o,
  output logic [PSD_W-1:0]  peak_o,
  output logic [HR_W-1:0]   hr_o
);

  logic [BIN_W:0]     addr;      // one extra bit: 64 means all issued
  logic               v1;
  logic [BIN_W-1:0]   k1;
  logic [PSD_W-1:0]   best;
  logic [BIN_W-1:0]   best_k;

  assign re_o    = busy_o && !addr[BIN_W];
  assign raddr_o = addr[BIN_W-1:0];

  function automatic logic [HR_W-1:0] bin_to_hr(input logic [BIN_W-1:0] k);
    logic [15:0] t;
    t = 16'd180 * 16'(k) + 16'd32;
    return HR_W'(16'd30 + (t >> 6));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0; v1 <= 1'b0; k1 <= '0; best <= '0; best_k <= '0;
      busy_o <= 1'b0; done_o <= 1'b0; bin_o <= '0; peak_o <= '0; hr_o <= '0;
    end else begin
      done_o <= 1'b0;
      v1     <= re_o;
      k1     <= raddr_o;
      if (start_i && !busy_o) begin
        busy_o <= 1'b1;
        addr   <= '0;
        best   <= '0;
        best_k <= '0;
      end else if (busy_o) begin
        if (!addr[BIN_W]) addr <= addr + 1'b1;
        if (v1 && (k1 == '0 || rdata_i > best)) begin
          best   <= rdata_i;
          best_k <= k1;
        end
        if (v1 && k1 == '1) begin
          logic [BIN_W-1:0] kf;
          logic [PSD_W-1:0] pf;
          kf = (rdata_i > best) ? k1 : best_k;
          pf = (rdata_i > best) ? rdata_i : best;
          busy_o <= 1'b0;
          done_o <= 1'b1;
          bin_o  <= kf;
          peak_o <= pf;
          hr_o   <= bin_to_hr(kf);
        end
      end
    end
  end

endmodule
