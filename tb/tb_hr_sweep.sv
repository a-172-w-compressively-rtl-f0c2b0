// tb_hr_sweep: heart-rate accuracy sweep. A sinusoidal input is swept from
// 0.5 Hz to 3.4 Hz in 0.1 Hz steps (30 to 204 bpm), one 4 s window per tone,
// for each of the compressive-sampling ratios 8x, 10x and 30x, through the
// digital back end with an ideal 12-bit ADC model (about 40 codes peak-peak
// signal plus noise). The slot clock is shortened (CLK_DIV_P = 32) so the
// 90 windows simulate quickly; this changes only the time scale of the
// sampling, not the slots, tables or arithmetic. Every estimate must be within
// 10 bpm of 60*f; the worst error per ratio is printed.
module tb_hr_sweep;
  import ppg_pkg::*;
  localparam int DIV = 32;
  localparam int NT  = 30;
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

  // time from reset release; window w covers slots 512w..512w+511
  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;
  real f_of_win [3 * NT + 2];

  always @(posedge clk) begin
    adc_done <= 1'b0;
    if (afe.ch_samp) begin
      int w;
      real v, t;
      w = int'((cyc / DIV - 1) / 512);
      t = real'(cyc) / real'(DIV * 128);
      v = 2048.0 + 20.0 * $sin(2.0 * 3.14159265358979 * f_of_win[w] * t) + real'($urandom_range(8)) - 4.0;
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
    int worst [3];
    for (int w = 0; w < 3 * NT + 2; w++) f_of_win[w] = 0.5 + 0.1 * real'(w % NT);
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < 3; c++) worst[c] = 0;
    cfg_write(2'd0, 8'd1);   // 8x from the first window on
    for (int w = 0; w < 3 * NT; w++) begin
      int exp_hr, err;
      // in mid-window, select the ratio of the next window
      while (cyc < longint'(DIV) * (512 * longint'(w) + 256)) @(posedge clk);
      if ((w + 1) % NT == 0 && w + 1 < 3 * NT) cfg_write(2'd0, 8'((w + 1) / NT + 1));
      // wait for window w to end, then for its result
      while (cyc < longint'(DIV) * (512 * longint'(w + 1) + 1) + 20) @(posedge clk);
      wait (hr_done);
      @(negedge clk);
      exp_hr = int'(60.0 * f_of_win[w]);
      err = (int'(hr) > exp_hr) ? int'(hr) - exp_hr : exp_hr - int'(hr);
      if (err > worst[w / NT]) worst[w / NT] = err;
      checks++;
      if (err > 3) $display("ratio sel %0d tone %0d bpm: HR %0d", w / NT + 1, exp_hr, hr);
      if (err > 10) begin
        failures++;
        $display("FAIL ratio sel %0d tone %0d bpm: HR %0d", w / NT + 1, exp_hr, hr);
      end
    end
    $display("worst HR error: 8x %0d bpm, 10x %0d bpm, 30x %0d bpm", worst[0], worst[1], worst[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(longint'(DIV) * 512 * 10 * (3 * NT + 4));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
