// tb_mac8: feeds random samples and coefficients, with sums restarted by
// clr_i at random points and idle cycles in between, and compares all eight
// accumulators with a software sum every clock.
module tb_mac8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic signed [12:0] x;
  logic signed [11:0] co [4], si [4];
  logic signed [33:0] ac [4], as_ [4];
  longint rc [4], rs [4];
  mac8 dut (.clk, .rst_n, .en_i(en), .clr_i(clr), .x_i(x), .cos_i(co), .sin_i(si),
            .acc_c_o(ac), .acc_s_o(as_));
  always #5 clk = ~clk;
  initial begin
    x = 0;
    for (int l = 0; l < 4; l++) begin co[l] = 0; si[l] = 0; rc[l] = 0; rs[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(9) != 0);
      clr = (i % 512 == 0) || ($urandom_range(99) == 0);
      x = (i < 600) ? ((i % 2) ? -13'sd4095 : 13'sd4095) : 13'($signed($urandom_range(8190)) - 4095);
      for (int l = 0; l < 4; l++) begin
        co[l] = (i < 600) ? ((i % 2) ? -12'sd2047 : 12'sd2047) : 12'($signed($urandom_range(4094)) - 2047);
        si[l] = 12'($signed($urandom_range(4094)) - 2047);
      end
      if (en) for (int l = 0; l < 4; l++) begin
        rc[l] = (clr ? 0 : rc[l]) + longint'(x) * longint'(co[l]);
        rs[l] = (clr ? 0 : rs[l]) + longint'(x) * longint'(si[l]);
      end
      @(posedge clk); #1;
      for (int l = 0; l < 4; l++) begin
        checks += 2;
        if (longint'(ac[l]) != rc[l] || longint'(as_[l]) != rs[l]) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d lane %0d %0d/%0d %0d/%0d", i, l, ac[l], rc[l], as_[l], rs[l]);
        end
      end
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
