// tb_dma_ctrl: drives sampling instants, ADC results and window starts as the
// timing control and SAR ADC would (compressed slot timing), and checks every
// bank write (bank, slot address, data), the bank swap, and the reported sum,
// count and ratio of each window; nothing is reported before the first window.
module tb_dma_ctrl;
  import ppg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic samp = 0, ws = 0, adone = 0; logic [8:0] sidx = 0; cr_e crw = CR_1X; logic [11:0] adata = 0;
  logic we, wbank, wd_done, wd_bank; logic [8:0] waddr; logic [11:0] wdata;
  logic [20:0] wsum; logic [9:0] wcnt; cr_e wcr;
  dma_ctrl dut (.clk, .rst_n, .samp_i(samp), .samp_idx_i(sidx), .win_start_i(ws), .cr_win_i(crw),
                .adc_done_i(adone), .adc_data_i(adata), .we_o(we), .wbank_o(wbank), .waddr_o(waddr),
                .wdata_o(wdata), .win_done_o(wd_done), .win_bank_o(wd_bank), .win_sum_o(wsum),
                .win_cnt_o(wcnt), .win_cr_o(wcr));
  always #5 clk = ~clk;
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  int exp_sum, exp_cnt, exp_bank, nwin, nwrites;
  cr_e exp_cr;
  logic [8:0] exp_addr; logic [11:0] exp_data; bit exp_we;

  always @(posedge clk) if (rst_n) begin
    #1;
    if (exp_we) begin
      check(we && waddr == exp_addr && wdata == exp_data && int'(wbank) == exp_bank,
            $sformatf("write %0b a=%0d d=%0d b=%0d", we, waddr, wdata, wbank));
      nwrites++;
    end else check(!we, "spurious write");
    exp_we = 0;
  end

  initial begin
    int bank;
    exp_we = 0; nwin = 0; nwrites = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    bank = 0;
    // six windows with changing ratio; the first has samples only at its end
    for (int w = 0; w < 6; w++) begin
      cr_e c;
      c = cr_e'(w % 4);
      exp_sum = 0; exp_cnt = 0;
      for (int s = 0; s < 512; s++) begin
        bit take;
        take = (w == 0) ? (s > 500) : ((c == CR_1X) || ($urandom_range(9) == 0));
        @(negedge clk);
        ws = (s == 0); samp = take; sidx = 9'(s); crw = c;
        @(negedge clk);
        if (ws && w > 0) begin
          check(wd_done && wd_bank == 1'(bank) && int'(wsum) == exp_sum_prev && int'(wcnt) == exp_cnt_prev
                && wcr == exp_cr_prev, $sformatf("window report w=%0d sum %0d/%0d cnt %0d/%0d", w, wsum, exp_sum_prev, wcnt, exp_cnt_prev));
          bank = 1 - bank;
          nwin++;
        end else if (ws) begin
          check(!wd_done, "no report before the first window");
        end
        ws = 0; samp = 0;
        if (take) begin
          repeat (3) @(negedge clk);
          adone = 1; adata = 12'($urandom);
          exp_we = 1; exp_addr = 9'(s); exp_data = adata; exp_bank = bank;
          exp_sum += int'(adata); exp_cnt++;
          @(negedge clk); adone = 0;
        end
      end
      exp_sum_prev = exp_sum; exp_cnt_prev = exp_cnt; exp_cr_prev = c;
    end
    check(nwin == 5, $sformatf("windows reported %0d", nwin));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int exp_sum_prev, exp_cnt_prev; cr_e exp_cr_prev;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
