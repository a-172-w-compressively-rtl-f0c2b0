// nr_divider: sequential non-restoring divider for the window mean.
//
// Computes quotient = dividend / divisor (unsigned, truncated) one quotient
// bit per clock with the non-restoring algorithm: the partial remainder is
// kept signed, and each step shifts in the next dividend bit and subtracts the
// divisor when the remainder is non-negative or adds it when negative; the
// quotient bit is 1 when the new remainder is non-negative. A final
// correction adds the divisor back to a negative remainder. start_i loads the
// operands; done_o pulses ND+2 clocks after the edge that loads them. The original ASIC
// specifies non-restoring division of the sample sum by the number of
// samples; widths and timing are this design's. Division by zero returns an
// all-ones quotient.
module nr_divider #(
  parameter int unsigned ND = 21,   // dividend width
  parameter int unsigned NV = 10    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [ND-1:0] dividend_i,
  input  logic [NV-1:0] divisor_i,
  output logic          busy_o,
  output logic          done_o,
  output logic [ND-1:0] quot_o,
  output logic [NV-1:0] rem_o
);

  localparam int unsigned CW = $clog2(ND + 1);

  logic signed [NV+1:0] r;      // partial remainder, one guard bit
  logic [ND-1:0]        q;      // dividend bits shifting out, quotient in
  logic [NV-1:0]        d;
  logic [CW-1:0]        cnt;
  logic                 fix;    // final remainder correction cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; q <= '0; d <= '0; cnt <= '0; fix <= 1'b0;
      busy_o <= 1'b0; done_o <= 1'b0; quot_o <= '0; rem_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        r <= '0; q <= dividend_i; d <= divisor_i;
        cnt <= CW'(ND); fix <= 1'b0; busy_o <= 1'b1;
      end else if (busy_o && !fix) begin
        logic signed [NV+1:0] rs, rn;
        rs = {r[NV:0], q[ND-1]};
        rn = r[NV+1] ? rs + $signed({2'b00, d}) : rs - $signed({2'b00, d});
        r   <= rn;
        q   <= {q[ND-2:0], ~rn[NV+1]};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) fix <= 1'b1;
      end else if (busy_o) begin
        logic signed [NV+1:0] rf;
        rf = r[NV+1] ? r + $signed({2'b00, d}) : r;
        busy_o <= 1'b0;
        done_o <= 1'b1;
        quot_o <= (d == '0) ? '1 : q;
        rem_o  <= rf[NV-1:0];
      end
    end
  end

endmodule
