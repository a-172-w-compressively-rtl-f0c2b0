// tb_cu_ctrl: drives the sequencer with window reports and answers its start
// strobes from simple models of the divider, FEU and peak search (random
// delays). Checks the order divider -> FEU -> peak search, the operands
// passed on (sum, count, mean, bank, ratio), the HR result and HR_DONE, and
// that an empty window is skipped.
module tb_cu_ctrl;
  import ppg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wd = 0, wbank = 0; logic [20:0] wsum = 0; logic [9:0] wcnt = 0; cr_e wcr = CR_1X;
  logic div_start, div_done = 0; logic [20:0] div_a, div_q = 0; logic [9:0] div_b;
  logic feu_start, feu_bank, feu_done = 0; cr_e feu_cr; logic [11:0] mean;
  logic pk_start, pk_done = 0; logic [7:0] pk_hr = 0, hr; logic [5:0] pk_bin = 0, hr_bin; logic hr_done;
  cu_ctrl dut (.clk, .rst_n, .win_done_i(wd), .win_bank_i(wbank), .win_sum_i(wsum), .win_cnt_i(wcnt),
               .win_cr_i(wcr), .div_start_o(div_start), .div_dividend_o(div_a), .div_divisor_o(div_b),
               .div_done_i(div_done), .div_quot_i(div_q), .feu_start_o(feu_start), .feu_bank_o(feu_bank),
               .feu_cr_o(feu_cr), .mean_o(mean), .feu_done_i(feu_done), .pk_start_o(pk_start),
               .pk_done_i(pk_done), .pk_hr_i(pk_hr), .pk_bin_i(pk_bin), .hr_o(hr), .hr_bin_o(hr_bin),
               .hr_done_o(hr_done));
  always #5 clk = ~clk;
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  task automatic wait_for(ref logic sig, input int lim, output int t);
    t = 0;
    while (!sig && t < lim) begin @(posedge clk); #1; t++; end
  endtask

  int nskip = 0;
  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      int cnt, sum, q, k;
      bit b; cr_e c;
      cnt = (w % 7 == 3) ? 0 : int'($urandom_range(512, 17));
      sum = int'($urandom_range(cnt * 4095));
      q = (cnt == 0) ? 0 : sum / cnt;
      b = 1'($urandom); c = cr_e'($urandom_range(3)); k = int'($urandom_range(63));
      @(negedge clk);
      wd = 1; wbank = b; wsum = 21'(sum); wcnt = 10'(cnt); wcr = c;
      @(negedge clk); wd = 0; wsum = 0; wcnt = 0;
      if (cnt == 0) begin
        repeat (20) @(posedge clk); #1;
        check(!div_start && !feu_start, "empty window skipped");
        nskip++;
        continue;
      end
      #1;
      check(div_start && div_a == 21'(sum) && div_b == 10'(cnt), "divider start and operands");
      check(!hr_done, "HR_DONE cleared while estimating");
      repeat ($urandom_range(30, 5)) begin @(posedge clk); #1; check(!feu_start, "FEU waits for mean"); end
      @(negedge clk); div_done = 1; div_q = 21'(q);
      @(negedge clk); div_done = 0;
      wait_for(feu_start, 10, t);
      check(feu_start && mean == 12'(q) && feu_bank == b && feu_cr == c, "FEU start, mean, bank, ratio");
      repeat ($urandom_range(50, 5)) begin @(posedge clk); #1; check(!pk_start, "peak search waits for FEU"); end
      @(negedge clk); feu_done = 1;
      @(negedge clk); feu_done = 0;
      wait_for(pk_start, 10, t);
      check(pk_start == 1'b1, "peak search started");
      repeat ($urandom_range(70, 5)) @(posedge clk);
      @(negedge clk); pk_done = 1; pk_hr = 8'(30 + k * 3); pk_bin = 6'(k);
      @(negedge clk); pk_done = 0;
      #1;
      check(hr_done && hr == 8'(30 + k * 3) && hr_bin == 6'(k), "HR result and HR_DONE");
    end
    check(nskip > 0, "empty windows exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
