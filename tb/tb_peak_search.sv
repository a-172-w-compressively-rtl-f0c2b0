// tb_peak_search: fills a modelled 18x64 LSP memory (one-clock read latency)
// with random values, single peaks at every bin and ties, and checks the bin,
// peak value, heart rate (60*(0.5+3k/64) rounded) and the latency (66 clocks after the edge that accepts start).
module tb_peak_search;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, re, busy, done;
  logic [5:0] raddr, bin; logic [17:0] rdata, peak; logic [7:0] hr;
  logic [17:0] mem [64];
  peak_search dut (.clk, .rst_n, .start_i(start), .re_o(re), .raddr_o(raddr), .rdata_i(rdata),
                   .busy_o(busy), .done_o(done), .bin_o(bin), .peak_o(peak), .hr_o(hr));
  always #5 clk = ~clk;
  always @(posedge clk) if (re) rdata <= mem[raddr];
  initial begin
    rdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int eb, mx, lat;
      mx = -1; eb = 0;
      for (int k = 0; k < 64; k++) mem[k] = 18'($urandom_range((t < 64) ? 1000 : 262143));
      if (t < 64) mem[t] = 18'd5000 + 18'(t);            // peak at every bin
      if (t >= 64 && t < 80) begin mem[10] = '1; mem[40] = '1; end   // tie: lower bin
      for (int k = 0; k < 64; k++) if (int'(mem[k]) > mx) begin mx = int'(mem[k]); eb = k; end
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      lat = 1;
      while (!done && lat < 100) begin @(posedge clk); lat++; end
      checks += 4;
      if (int'(bin) != eb) begin failures++; $display("FAIL bin %0d exp %0d", bin, eb); end
      if (int'(peak) != mx) begin failures++; $display("FAIL peak %0d exp %0d", peak, mx); end
      if (int'(hr) != hr_of_bin(eb)) begin failures++; $display("FAIL hr %0d exp %0d", hr, hr_of_bin(eb)); end
      if (lat != 67) begin failures++; $display("FAIL latency %0d", lat); end
    end
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
