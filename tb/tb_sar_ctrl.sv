// tb_sar_ctrl: converts random and edge-case input levels with an ideal
// comparator and checks the result equals the level and arrives 13 clocks
// after the start edge.
module tb_sar_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, comp, busy, done;
  logic [11:0] dac, data;
  int vin;
  sar_ctrl #(.W(12)) dut (.clk, .rst_n, .start_i(start), .comp_i(comp), .dac_o(dac),
                          .busy_o(busy), .done_o(done), .data_o(data));
  always #5 clk = ~clk;
  assign comp = (vin >= int'(dac));
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int t;
      vin = (i == 0) ? 0 : (i == 1) ? 4095 : (i == 2) ? 2048 : int'($urandom_range(4095));
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      t = 0;
      while (!done && t < 40) begin @(posedge clk); t++; end
      checks += 2;
      if (data != 12'(vin)) begin failures++; $display("FAIL vin=%0d got %0d", vin, data); end
      if (t != 13) begin failures++; $display("FAIL latency %0d", t); end
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
