// tb_coef_rom: compares the coefficient generator with cos/sin of
// w_k (t_n - tau_k) evaluated in real arithmetic, tau_k recomputed from the
// sampling instants. Tolerance 12 LSB of 2047 (10-bit phase resolution).
module tb_coef_rom;
  import ppg_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  cr_e cr; logic [8:0] n; logic [5:0] k;
  logic signed [11:0] co, si;
  coef_rom dut (.cr_i(cr), .n_i(n), .k_i(k), .cos_o(co), .sin_o(si));
  function automatic real fabs(real v); return v < 0.0 ? -v : v; endfunction
  initial begin
    init_ref();
    for (int c = 0; c < 4; c++)
      for (int i = 0; i < 600; i++) begin
        int nn, kk;
        real a, ec, es;
        nn = (i < 64) ? i * 8 : int'($urandom_range(511));
        kk = (i < 64) ? i : int'($urandom_range(63));
        cr = cr_e'(c); n = 9'(nn); k = 6'(kk); #1;
        a  = 2.0 * 3.14159265358979 * (real'((32 + 3 * kk) * nn) - tau_phi[c][kk]) / 8192.0;
        ec = 2047.0 * $cos(a);
        es = 2047.0 * $sin(a);
        checks += 2;
        if (fabs(real'(co) - ec) > 12.0 || fabs(real'(si) - es) > 12.0) begin
          failures++;
          if (failures < 10) $display("FAIL cr=%0d n=%0d k=%0d cos %0d/%f sin %0d/%f", c, nn, kk, co, ec, si, es);
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
