// tb_cs_lut: checks the three sampling LUTs and the uniform mode against the
// segment/LFSR definition, and the sample counts 512, 64, 51, 17.
module tb_cs_lut;
  import ppg_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  cr_e cr; logic [8:0] slot; logic samp;
  cs_lut dut (.cr_i(cr), .slot_i(slot), .samp_o(samp));
  initial begin
    init_ref();
    for (int c = 0; c < 4; c++) begin
      int cnt;
      cnt = 0;
      for (int n = 0; n < 512; n++) begin
        cr = cr_e'(c); slot = 9'(n); #1;
        checks++;
        if (samp !== mask[c][n]) begin
          failures++;
          if (failures < 10) $display("FAIL cr=%0d slot=%0d got %0b exp %0b", c, n, samp, mask[c][n]);
        end
        cnt += int'(samp);
      end
      checks++;
      if (cnt != 512 / cr_of(c)) begin failures++; $display("FAIL cr=%0d count %0d", c, cnt); end
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
