// tb_ppg_snr: 10x compressive sampling against uniform sampling on PPG-shaped
// signals of falling signal-to-noise ratio. The input is a pulse wave with a
// fundamental, a second harmonic at half amplitude and a third at a quarter
// (a systolic peak with a dicrotic shoulder), at heart rates from 55 to
// 110 bpm, with peak-to-peak AC swings of 12, 24, 36 and 48 ADC codes over
// +-3 codes of uniform noise. Each case is acquired once at 1x and once at
// 10x; the 10x estimate must agree with the 1x estimate within 3 bpm (about
// one 2.8 bpm bin) and the 1x estimate must be within 3 bpm of the true rate.
// Uses the digital back end with a shortened slot clock (CLK_DIV_P = 32).
module tb_ppg_snr;
  import ppg_pkg::*;
  localparam int DIV = 32;
  localparam int NC  = 8;                 // cases; two windows each
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [1:0] cfg_addr = 0; logic [7:0] cfg_wdata = 0, cfg_rdata;
  afe_timing_t afe; afe_cfg_t afe_cfg; logic o_samp;
  logic adc_done = 0; logic [11:0] adc_data = 0;
  logic [7:0] hr; logic [5:0] hr_bin; logic hr_done;
  dbe #(.CLK_DIV_P(DIV)) dut (.clk, .rst_n, .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr),
    .cfg_wdata_i(cfg_wdata), .cfg_rdata_o(cfg_rdata), .afe_o(afe), .afe_cfg_o(afe_cfg), .o_samp,
    .adc_done_i(adc_done), .adc_data_i(adc_data), .hr_o(hr), .hr_bin_o(hr_bin), .hr_done_o(hr_done));
  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;
  real f_case [NC] = '{0.92, 1.10, 1.35, 1.55, 1.25, 1.70, 1.02, 1.83};
  real a_case [NC] = '{6.0, 6.0, 12.0, 12.0, 18.0, 18.0, 24.0, 24.0};  // AC amplitude (half swing)

  function automatic real pulse(real ph);
    return ($sin(ph) + 0.5 * $sin(2.0 * ph + 0.8) + 0.25 * $sin(3.0 * ph + 1.9)) / 1.45;
  endfunction

  always @(posedge clk) begin
    adc_done <= 1'b0;
    if (afe.ch_samp) begin
      int w, c;
      real v, t;
      w = int'((cyc / DIV - 1) / 512);
      c = (w / 2 < NC) ? w / 2 : NC - 1;
      t = real'(cyc) / real'(DIV * 128);
      v = 1500.0 + a_case[c] * pulse(2.0 * 3.14159265358979 * f_case[c] * t)
          + real'($urandom_range(6)) - 3.0;
      repeat (13) @(posedge clk);
      adc_data <= 12'(int'(v));
      adc_done <= 1'b1;
    end
  end

  task automatic cfg_write(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    int hr_u;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    cfg_write(2'd0, 8'd0);
    for (int w = 0; w < 2 * NC; w++) begin
      int c, truth, d;
      c = w / 2;
      // in mid-window, select the ratio of the next window (even: 1x, odd: 10x)
      while (cyc < longint'(DIV) * (512 * longint'(w) + 256)) @(posedge clk);
      cfg_write(2'd0, (w % 2 == 0) ? 8'd2 : 8'd0);
      while (cyc < longint'(DIV) * (512 * longint'(w + 1) + 1) + 20) @(posedge clk);
      wait (hr_done);
      @(negedge clk);
      truth = int'(60.0 * f_case[c]);
      checks++;
      if (w % 2 == 0) begin
        hr_u = int'(hr);
        d = hr_u - truth;
        if (d > 3 || d < -3) begin failures++; $display("FAIL case %0d: 1x HR %0d, true %0d", c, hr_u, truth); end
      end else begin
        d = int'(hr) - hr_u;
        $display("case %0d: AC %0d codes pp, true %0d bpm, 1x %0d bpm, 10x %0d bpm",
                 c, int'(2.0 * a_case[c]), truth, hr_u, hr);
        if (d > 3 || d < -3) begin failures++; $display("FAIL case %0d: 10x HR %0d vs 1x %0d", c, hr, hr_u); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(longint'(DIV) * 512 * 10 * (2 * NC + 4));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
