// tb_nr_divider: divides window sums by sample counts (512, 64, 51, 17 and
// random) and checks quotient, remainder and the 23-clock latency.
module tb_nr_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [20:0] a, q; logic [9:0] b, r;
  nr_divider #(.ND(21), .NV(10)) dut (.clk, .rst_n, .start_i(start), .dividend_i(a),
                                      .divisor_i(b), .busy_o(busy), .done_o(done), .quot_o(q), .rem_o(r));
  always #5 clk = ~clk;
  initial begin
    a = 0; b = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int cnt, t;
      int divs [4] = '{512, 64, 51, 17};
      cnt = (i < 200) ? divs[i % 4] : int'($urandom_range(512, 1));
      @(posedge clk);
      b <= 10'(cnt);
      a <= 21'($urandom_range(cnt * 4095));
      start <= 1;
      @(posedge clk); start <= 0;
      t = 0;
      while (!done && t < 60) begin @(posedge clk); t++; end
      checks += 3;
      if (q != a / b) begin failures++; $display("FAIL %0d/%0d q=%0d", a, b, q); end
      if (r != 10'(a % b)) begin failures++; $display("FAIL %0d%%%0d r=%0d", a, b, r); end
      if (t != 23) begin failures++; $display("FAIL latency %0d", t); end
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
