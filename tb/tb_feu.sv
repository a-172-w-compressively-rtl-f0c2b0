// tb_feu: runs the feature extraction unit on a modelled sample bank holding
// a sinusoid plus noise at the sampled slots and garbage at the others, for
// every compression ratio. Each of the 64 LSP words must be written exactly
// once and lie within the coefficient-quantisation bound of a real-arithmetic
// Lomb-Scargle reference (absolute values, no denominators, >> 12); the peak
// bin must match the reference; the run must take 8192 accumulate clocks plus
// at most a few clocks of pipeline.
module tb_feu;
  import ppg_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  cr_e cr = CR_1X; logic [11:0] mean = 0;
  logic re, we, busy, done; logic [8:0] raddr; logic [11:0] rdata = 0;
  logic [5:0] waddr; logic [17:0] wdata;
  logic [11:0] bank [512];
  logic [17:0] psd [64];
  int nwr [64];
  feu dut (.clk, .rst_n, .start_i(start), .cr_i(cr), .mean_i(mean), .re_o(re), .raddr_o(raddr),
           .rdata_i(rdata), .psd_we_o(we), .psd_waddr_o(waddr), .psd_wdata_o(wdata),
           .busy_o(busy), .done_o(done));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (re) rdata <= bank[raddr];
    if (we) begin psd[waddr] <= wdata; nwr[waddr]++; end
  end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  initial begin
    init_ref();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      int c, kf, sum, m, lat, kref, kdut;
      int x [512];
      real sabs, pref [64], best, tol;
      c = run % 4;
      kf = int'($urandom_range(60, 2));
      sum = 0; m = 0;
      for (int n = 0; n < 512; n++) begin
        if (mask[c][n]) begin
          real v;
          v = 2048.0 + 300.0 * $sin(2.0 * 3.14159265358979 * (0.5 + 3.0 * real'(kf) / 64.0) * real'(n) / 128.0
                                     + real'(run)) + real'($urandom_range(40)) - 20.0;
          bank[n] = 12'(int'(v));
          sum += int'(bank[n]); m++;
        end else bank[n] = 12'($urandom);
      end
      sabs = 0.0;
      for (int n = 0; n < 512; n++) begin
        x[n] = mask[c][n] ? int'(bank[n]) - sum / m : 0;
        sabs += (x[n] < 0) ? -real'(x[n]) : real'(x[n]);
      end
      best = -1.0; kref = 0;
      for (int k = 0; k < 64; k++) begin
        pref[k] = lsp_ref(c, k, x) / 4096.0;
        if (pref[k] > best) begin best = pref[k]; kref = k; end
        nwr[k] = 0;
      end
      tol = sabs * 24.0 / 4096.0 + 2.0;
      @(negedge clk);
      cr = cr_e'(c); mean = 12'(sum / m); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done && lat < 9000) begin @(negedge clk); lat++; end
      check(lat >= 8192 && lat <= 8200, $sformatf("run %0d latency %0d", run, lat));
      kdut = 0;
      for (int k = 0; k < 64; k++) begin
        real d;
        d = real'(psd[k]) - pref[k];
        check(nwr[k] == 1, $sformatf("bin %0d written %0d times", k, nwr[k]));
        check(d <= tol && d >= -tol, $sformatf("run %0d cr %0d bin %0d: %0d ref %f tol %f", run, c, k, psd[k], pref[k], tol));
        if (psd[k] > psd[kdut]) kdut = k;
      end
      check(kdut == kref && kref - kf <= 1 && kf - kref <= 1, $sformatf("peak bin dut %0d ref %0d tone %0d", kdut, kref, kf));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
