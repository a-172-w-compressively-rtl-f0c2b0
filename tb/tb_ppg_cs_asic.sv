// tb_ppg_cs_asic: end-to-end test of the readout at its default sizes
// (32 kHz clock divided by 256, 512-slot windows, 64 bins).
//
// The analog chain is modelled behaviourally: the front-end output in ADC
// codes is 2048 + A*sin(2*pi*f*t) + noise with t the real time of the 32 kHz
// clock; it is held at each rising edge of CH_Samp and compared with the SAR
// DAC code by an ideal comparator. Five 4 s windows are estimated (a sixth is
// started to hand the fifth over): 1x at 72 bpm,
// 8x at 96 bpm, 10x at 120 bpm, 30x at 96 bpm with OTA power-down enabled,
// and 8x at 54 bpm, with every ratio change written in the middle of the
// preceding window (power-down takes effect at once, the ratio at the next
// window). Checked: the number of sampling instants of every
// window and its LED pulses (one 3-clock pulse per sample, so the LED duty
// falls with the ratio), that ratio changes wait for the window boundary, the LED/AFE pulse
// order, En toggling only in power-down mode, the AFE settings and their
// read-back, and each window's heart rate (within 4 bpm, 10 bpm at 30x).
// Each mechanism is counted and must occur at least once.
module tb_ppg_cs_asic;
  import ppg_pkg::*;
  localparam int DIV = 256;
  localparam int WIN = DIV * 512;
  localparam int NW  = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [1:0] cfg_addr = 0; logic [7:0] cfg_wdata = 0, cfg_rdata;
  afe_timing_t afe; afe_cfg_t afe_cfg; logic o_samp, comp;
  logic [11:0] dac; logic [7:0] hr; logic [5:0] hr_bin; logic hr_done;
  ppg_cs_asic dut (.clk, .rst_n, .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata),
    .cfg_rdata_o(cfg_rdata), .afe_o(afe), .afe_cfg_o(afe_cfg), .o_samp, .comp_i(comp), .dac_o(dac),
    .hr_o(hr), .hr_bin_o(hr_bin), .hr_done_o(hr_done));
  always #5 clk = ~clk;
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // window plan
  int  w_cr  [NW+1] = '{0, 1, 2, 3, 1, 0};
  int  w_m   [NW+1] = '{512, 64, 51, 17, 64, 512};
  real w_f   [NW+1] = '{1.2, 1.6, 2.0, 1.6, 0.9, 1.2};
  bit  w_pd  [NW+1] = '{0, 0, 0, 1, 0, 0};

  // cycle counter from reset release; slot s (global) ticks after clock 256*(s+1)
  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;
  function automatic int win_of(longint c);
    return int'((c / DIV - 1) / 512);
  endfunction

  // analog model: sample-and-hold at CH_Samp, ideal comparator
  real held = 2048.0;
  logic chs_q = 0;
  always @(posedge clk) begin
    chs_q <= afe.ch_samp;
    if (afe.ch_samp && !chs_q) begin
      int w;
      real t;
      w = win_of(cyc);
      t = real'(cyc) / 32768.0;
      held = 2048.0 + 400.0 * $sin(2.0 * 3.14159265358979 * w_f[(w < 0) ? 0 : (w > NW ? NW : w)] * t)
             + real'($urandom_range(40)) - 20.0;
    end
  end
  assign comp = (held >= real'(dac));

  // mechanism counters
  int n_samp [NW+2];
  int n_led [NW+2], n_led_clk [NW+2];   // LED pulses and LED-on clocks, by window of their sampling instant
  logic led_q = 0;
  int n_uniform = 0, n_cs8 = 0, n_cs10 = 0, n_cs30 = 0, n_deferred = 0, n_pd_toggle = 0;
  int n_hr = 0, n_pulse_ok = 0;
  logic en_q = 1;
  bit pd_now = 0;
  longint pd_seen = -100;
  longint last_samp = -100;
  always @(negedge clk) if (rst_n) begin
    if (o_samp) begin
      int w;
      w = win_of(cyc);
      if (w >= 0 && w <= NW) n_samp[w]++;
      last_samp = cyc;
    end
    if (afe.led_pulse) begin
      int w;
      w = win_of(last_samp);
      if (w >= 0 && w <= NW) begin
        n_led_clk[w]++;
        if (!led_q) n_led[w]++;
      end
    end
    led_q <= afe.led_pulse;
    // pulse order after each sampling instant
    if (cyc - last_samp == 3) begin
      check(afe.int_clk && afe.led_pulse && afe.pd_act && !afe.ch_samp, "INT_clk phase");
      n_pulse_ok++;
    end
    if (cyc - last_samp == 4) check(afe.ch_samp && !afe.int_clk && !afe.led_pulse, "CH_Samp phase");
    if (cyc - last_samp == 5) check(afe.int_rst && !afe.pd_act, "INT_Rst phase");
    if (!afe.en && en_q) n_pd_toggle++;
    if (pd_now) pd_seen = cyc;
    if (!afe.en) check(cyc - pd_seen <= 8, "En low outside power-down mode");
    en_q <= afe.en;
  end

  task automatic cfg_write(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    for (int i = 0; i < NW + 2; i++) begin n_samp[i] = 0; n_led[i] = 0; n_led_clk[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // front-end settings: TIA 50 kOhm / 6 pF, Cint code 3, IDAC code 20
    cfg_write(2'd1, {2'b00, 4'd2, 2'd1});
    cfg_write(2'd2, 8'd3);
    cfg_write(2'd3, 8'd20);
    cfg_write(2'd0, 8'(w_cr[0]));
    #1;
    check(afe_cfg.tia_gain == 2'd1 && afe_cfg.tia_cf == 4'd2 && afe_cfg.si_cint == 3'd3
          && afe_cfg.idac == 5'd20, "AFE settings");
    cfg_addr = 2'd3; #1;
    check(cfg_rdata == 8'd20, "read-back");
    for (int w = 0; w < NW; w++) begin
      // mid-window: ask for the next window's ratio and power-down setting
      while (cyc < longint'(DIV) + longint'(w) * WIN + WIN / 2) @(posedge clk);
      pd_now = pd_now | w_pd[w + 1];
      cfg_write(2'd0, {5'd0, w_pd[w + 1], 2'(w_cr[w + 1])});
      pd_now = w_pd[w + 1];
      // the request must not change the current window
      while (cyc < longint'(DIV) + longint'(w + 1) * WIN + 10) @(posedge clk);
      check(n_samp[w] == w_m[w], $sformatf("window %0d: %0d samples, expected %0d", w, n_samp[w], w_m[w]));
      check(n_led[w] == w_m[w] && n_led_clk[w] == 3 * w_m[w],
            $sformatf("window %0d: %0d LED pulses over %0d clocks, expected %0d over %0d",
                      w, n_led[w], n_led_clk[w], w_m[w], 3 * w_m[w]));
      if (n_samp[w] == w_m[w] && w_cr[w + 1] != w_cr[w]) n_deferred++;
      case (w_cr[w])
        0: n_uniform++;
        1: n_cs8++;
        2: n_cs10++;
        default: n_cs30++;
      endcase
      // result of window w
      begin
        int t, exp_hr, tol;
        t = 0;
        while (!hr_done && t < 20000) begin @(posedge clk); t++; end
        @(negedge clk);
        exp_hr = int'(60.0 * w_f[w]);
        tol = (w_cr[w] == 3) ? 10 : 4;
        check(hr_done, $sformatf("window %0d: no HR_DONE", w));
        check(int'(hr) - exp_hr <= tol && exp_hr - int'(hr) <= tol,
              $sformatf("window %0d (cr sel %0d): HR %0d bpm, expected %0d", w, w_cr[w], hr, exp_hr));
        $display("window %0d ratio sel %0d: HR %0d bpm (tone %0d bpm), %0d clocks after window end",
                 w, w_cr[w], hr, exp_hr, t + 10);
        if (hr_done) n_hr++;
      end
    end
    check(n_uniform > 0, "uniform mode exercised");
    check(n_cs8 > 0, "8x mode exercised");
    check(n_cs10 > 0, "10x mode exercised");
    check(n_cs30 > 0, "30x mode exercised");
    check(n_deferred > 0, "deferred ratio switch exercised");
    check(n_pd_toggle > 0, "power-down En toggling exercised");
    check(n_hr == NW, "HR_DONE for every window (ping-pong banks)");
    check(n_pulse_ok > 0, "AFE pulse sequence exercised");
    $display("mechanisms: uniform=%0d cs8=%0d cs10=%0d cs30=%0d deferred=%0d pd_toggles=%0d hr=%0d pulses=%0d",
             n_uniform, n_cs8, n_cs10, n_cs30, n_deferred, n_pd_toggle, n_hr, n_pulse_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(longint'(WIN) * 10 * (NW + 3));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
