// tb_ref_pkg: reference models shared by the testbenches.
//
// Rebuilds the sampling-instant masks from their definition (M = 512/CR
// equal segments, one sample per segment at an LFSR-chosen offset), the
// Lomb-Scargle tau phases with real arithmetic, and the bin-to-heart-rate
// mapping, independently of the RTL tables.
package tb_ref_pkg;

  bit  mask [4][512];
  int  msize [4];
  real tau_phi [4][64];   // w_k*tau_k in units of 2*pi/8192

  function automatic int cr_of(int sel);
    return (sel == 0) ? 1 : (sel == 1) ? 8 : (sel == 2) ? 10 : 30;
  endfunction

  function automatic void init_ref();
    int unsigned st = 32'hACE1;
    for (int c = 0; c < 4; c++) begin
      int m = 512 / cr_of(c);
      msize[c] = m;
      for (int n = 0; n < 512; n++) mask[c][n] = (c == 0);
      if (c != 0)
        for (int i = 0; i < m; i++) begin
          int lo = (i * 512) / m;
          int hi = ((i + 1) * 512) / m;
          int b  = ((st >> 0) ^ (st >> 2) ^ (st >> 3) ^ (st >> 5)) & 1;
          st = (st >> 1) | (b << 15);
          mask[c][lo + int'(st % (hi - lo))] = 1;
        end
      for (int k = 0; k < 64; k++) begin
        real s = 0.0, co = 0.0;
        for (int n = 0; n < 512; n++)
          if (mask[c][n]) begin
            real a = 2.0 * 3.14159265358979 * 2.0 * real'((32 + 3 * k) * n) / 8192.0;
            s  += $sin(a);
            co += $cos(a);
          end
        // tau is undefined when both sums vanish; 0 is used then
        if (s < 1e-6 && s > -1e-6 && co < 1e-6 && co > -1e-6) tau_phi[c][k] = 0.0;
        else tau_phi[c][k] = $atan2(s, co) / 2.0 / (2.0 * 3.14159265358979) * 8192.0;
      end
    end
  endfunction

  // Reference LSP value of bin k for samples x (already mean subtracted,
  // zero where not sampled), in the RTL's scale: coefficient amplitude 2047.
  function automatic real lsp_ref(int c, int k, int x[512]);
    real sc = 0.0, ss = 0.0;
    for (int n = 0; n < 512; n++) begin
      real a = 2.0 * 3.14159265358979 * (real'((32 + 3 * k) * n) - tau_phi[c][k]) / 8192.0;
      sc += real'(x[n]) * 2047.0 * $cos(a);
      ss += real'(x[n]) * 2047.0 * $sin(a);
    end
    return ((sc < 0 ? -sc : sc) + (ss < 0 ? -ss : ss));
  endfunction

  function automatic int hr_of_bin(int k);
    real hr = 60.0 * (0.5 + 3.0 * real'(k) / 64.0);
    return int'($floor(hr + 0.5));
  endfunction

endpackage
