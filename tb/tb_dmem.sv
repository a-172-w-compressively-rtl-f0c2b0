// tb_dmem: writes random words to a 12x512 and an 18x64 memory, reads them
// back with one clock of latency, and checks unwritten words read zero.
module tb_dmem;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we_a, re_a; logic [8:0] wa_a, ra_a; logic [11:0] wd_a, rd_a;
  logic we_b, re_b; logic [5:0] wa_b, ra_b; logic [17:0] wd_b, rd_b;
  logic [11:0] ref_a [512];
  logic [17:0] ref_b [64];
  dmem #(.WIDTH(12), .DEPTH(512)) dut_a (.clk, .we_i(we_a), .waddr_i(wa_a), .wdata_i(wd_a),
                                         .re_i(re_a), .raddr_i(ra_a), .rdata_o(rd_a));
  dmem #(.WIDTH(18), .DEPTH(64)) dut_b (.clk, .we_i(we_b), .waddr_i(wa_b), .wdata_i(wd_b),
                                        .re_i(re_b), .raddr_i(ra_b), .rdata_o(rd_b));
  always #5 clk = ~clk;
  initial begin
    we_a = 0; re_a = 0; we_b = 0; re_b = 0; wa_a = 0; ra_a = 0; wd_a = 0; wa_b = 0; ra_b = 0; wd_b = 0;
    for (int i = 0; i < 512; i++) ref_a[i] = '0;
    for (int i = 0; i < 64; i++) ref_b[i] = '0;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      we_a <= 1; wa_a <= 9'($urandom); wd_a <= 12'($urandom);
      we_b <= 1; wa_b <= 6'($urandom_range(47)); wd_b <= 18'($urandom);
      @(posedge clk);
      ref_a[wa_a] = wd_a; ref_b[wa_b] = wd_b;
    end
    we_a <= 0; we_b <= 0;
    for (int i = 0; i < 512; i++) begin
      re_a <= 1; ra_a <= 9'(i); re_b <= 1; ra_b <= 6'(i % 64);
      @(posedge clk); #1;
      checks += 2;
      if (rd_a !== ref_a[i]) begin failures++; $display("FAIL a[%0d] %h exp %h", i, rd_a, ref_a[i]); end
      if (rd_b !== ref_b[i % 64]) begin failures++; $display("FAIL b[%0d] %h exp %h", i % 64, rd_b, ref_b[i % 64]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
