// tb_dbe: runs the digital back end with an ideal ADC model (result 13 clocks
// after CH_Samp) on sinusoidal PPG-like inputs across many windows and all
// four compression ratios, with a shortened slot clock (CLK_DIV_P = 32) so
// that many windows fit. Each reported heart rate is compared with 60*f of
// the tone that filled the window (within one 2.8 bpm bin, or 10 bpm at 30x);
// the number of samples per window and HR_DONE are checked.
module tb_dbe;
  import ppg_pkg::*;
  import tb_ref_pkg::*;
  localparam int DIV = 32;
  localparam int WIN = DIV * 512;
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
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // tone per window, in units of the 128 Hz slot: frequency f Hz at slot n
  real f_win [32];
  int  cr_of_win [32];
  int  nsamp [32];
  int  win = -1;
  longint cyc = 0;
  real fcur = 1.2;
  always @(posedge clk) cyc++;

  // ideal ADC: converts 13 clocks after the CH_Samp edge
  always @(posedge clk) begin
    adc_done <= 1'b0;
    if (afe.ch_samp) begin
      real v;
      v = 2048.0 + 500.0 * $sin(2.0 * 3.14159265358979 * fcur * real'(dut.u_dma.idx) / 128.0)
          + real'($urandom_range(60)) - 30.0;
      repeat (13) @(posedge clk);
      adc_data <= 12'(int'(v));
      adc_done <= 1'b1;
    end
  end

  always @(negedge clk) begin
   if (dut.win_start) begin
    win++;
    if (win < 32) begin
      fcur = f_win[win];
      cr_of_win[win] = int'(dut.cr_win);
      if (win > 0) begin
        check(nsamp[win-1] == msize[cr_of_win[win-1]],
              $sformatf("window %0d samples %0d", win - 1, nsamp[win-1]));
      end
    end
   end
   if (o_samp && win >= 0 && win < 32) nsamp[win]++;
  end

  task automatic cfg_write(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  int nres = 0;
  initial begin
    init_ref();
    for (int w = 0; w < 32; w++) begin
      f_win[w] = 0.6 + real'($urandom_range(2800)) / 1000.0;
      nsamp[w] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 12; w++) begin
      int tgt, exp_hr, tol;
      cfg_write(2'd0, 8'(w % 4));               // next window's ratio
      wait (win == w + 1);
      @(posedge hr_done);
      @(negedge clk);
      exp_hr = int'(60.0 * f_win[w]);
      tol = (cr_of_win[w] == 3) ? 10 : 4;
      check(int'(hr) - exp_hr <= tol && exp_hr - int'(hr) <= tol,
            $sformatf("window %0d cr %0d: HR %0d expected %0d", w, cr_of_win[w], hr, exp_hr));
      check(int'(hr) == hr_of_bin(int'(hr_bin)), "HR matches bin");
      nres++;
    end
    check(nres == 12, "results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(longint'(WIN) * 16 * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
