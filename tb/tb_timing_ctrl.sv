// tb_timing_ctrl: checks the 128 Hz tick period (256 clocks), the number and
// positions of sampling instants per 4 s window for 1x, 8x and 30x, that a
// ratio change waits for the next window, the LED/AFE pulse pattern after
// every sampling instant, and En with and without power-down mode.
module tb_timing_ctrl;
  import ppg_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cr_e cr = CR_1X; logic pd_en = 0;
  logic o_samp, tick, win_start; logic [8:0] idx; cr_e cr_win; afe_timing_t afe;
  timing_ctrl dut (.clk, .rst_n, .cr_i(cr), .pd_en_i(pd_en), .o_samp, .samp_idx_o(idx),
                   .tick_o(tick), .win_start_o(win_start), .cr_win_o(cr_win), .afe_o(afe));
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  longint cyc = 0, last_tick = -1, last_samp = -1000;
  int win_no = -1, nsamp = 0;
  int exp_cnt [8];
  int got_cnt [8];
  cr_e win_cr [8];
  always @(posedge clk) if (rst_n) cyc++;

  // expected pulse pattern, indexed by clocks after o_samp
  function automatic afe_timing_t pat(int s, bit pd);
    afe_timing_t a;
    a.led_pulse = (s >= 1 && s <= 3);
    a.pd_act    = (s >= 1 && s <= 4);
    a.int_clk   = (s == 3);
    a.ch_samp   = (s == 4);
    a.int_rst   = (s == 5);
    a.en        = pd ? (s >= 1 && s <= 5) : 1'b1;
    return a;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (tick) begin
      if (last_tick >= 0) check(cyc - last_tick == 256, $sformatf("tick period %0d", cyc - last_tick));
      last_tick = cyc;
    end
    if (win_start) begin
      if (win_no >= 0 && win_no < 8) got_cnt[win_no] = nsamp;
      win_no++; nsamp = 0;
      if (win_no < 8) win_cr[win_no] = cr_win;
    end
    if (o_samp) begin
      check(tick, "o_samp without tick");
      check(mask[int'(cr_win)][idx] == 1'b1, $sformatf("o_samp at unmarked slot %0d", idx));
      nsamp++;
      last_samp = cyc;
    end
    if (cyc - last_samp >= 1 && cyc - last_samp <= 8)
      check(afe == pat(int'(cyc - last_samp), pd_en),
            $sformatf("pulse pattern step %0d: %b", cyc - last_samp, afe));
    else if (cyc - last_samp > 8)
      check(afe == pat(0, pd_en), "idle pulse levels");
  end

  initial begin
    init_ref();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // window 0: 1x. Change to 8x mid-window; must apply from window 1.
    wait (win_no == 0);
    repeat (1000) @(posedge clk);
    cr = CR_8X;
    wait (win_no == 1);
    repeat (1000) @(posedge clk);
    cr = CR_30X;
    wait (win_no == 2);
    @(posedge clk); pd_en = 1;    // power-down mode from the first sample on
    wait (win_no == 3);
    repeat (2) @(posedge clk);
    check(got_cnt[0] == 512, $sformatf("1x window samples %0d", got_cnt[0]));
    check(win_cr[1] == CR_8X && got_cnt[1] == 64, $sformatf("8x window samples %0d", got_cnt[1]));
    check(win_cr[2] == CR_30X && got_cnt[2] == 17, $sformatf("30x window samples %0d", got_cnt[2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(10 * 256 * 512 * 5);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
