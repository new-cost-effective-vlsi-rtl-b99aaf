// tb_fir_cse_sizes: the filter built for fifteen coefficient sets whose
// sizes N (taps) x b (coefficient bits) are 64 ... 720, the range of a
// comparison over randomly designed lowpass, highpass, bandpass and
// bandstop filters.
//
// The coefficient values of such filters are not available, so each set is
// random (a fixed-seed linear congruential generator evaluated at
// elaboration): magnitudes below 2^(b-1), symmetric for the lowpass,
// bandpass and bandstop entries, antisymmetric for the highpass entries
// (which also exercises the non-symmetric path of the elimination). The
// split of each N x b product into N and b is this testbench's choice.
// Each filter is checked by a fir_cse_checker against direct convolution;
// the test also requires that across the fifteen networks both horizontal
// and vertical subexpressions were built.
module tb_fir_cse_sizes;
  import fir_cse_pkg::*;

  // symmetric (sym = 1) or antisymmetric (sym = 0) random coefficients
  function automatic coef_vec_t rnd_coefs(int n, int b, int seed, bit sym);
    coef_vec_t c = '0;
    int        s = seed;
    int        m = (1 << (b - 1)) - 1;
    for (int t = 0; t < (n + 1) / 2; t++) begin
      s = s * 1103515245 + 12345;
      c[t] = coef_t'(((s >>> 8) & 32'h7f_ffff) % (2 * m + 1) - m);
      if (!sym && t == n - 1 - t) c[t] = '0;
      c[n-1-t] = sym ? c[t] : -c[t];
    end
    return c;
  endfunction

  localparam int NF = 15;
  //                            design   N x b
  localparam int N_ [NF] = '{ 8,  9, 15, 26, 15, 29, 24, 25, 28, 31, 55, 45, 40, 59, 45};
  localparam int B_ [NF] = '{ 8, 11, 12,  8, 15,  9, 12, 12, 12, 16, 11, 14, 16, 11, 16};
  localparam bit S_ [NF] = '{ 1,  1,  1,  1,  1,  0,  1,  1,  1,  1,  1,  1,  0,  1,  0};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   chk  [NF];
  int   fail [NF];
  logic done [NF];
  int   n_h = 0, n_v = 0;

  for (genvar f = 0; f < NF; f++) begin : g_f
    localparam coef_vec_t C   = rnd_coefs(N_[f], B_[f], 1000 + 17 * f, S_[f]);
    localparam net_t      NET = build_net(C, N_[f]);
    fir_cse_checker #(.NTAPS(N_[f]), .COEFS(C), .N_RANDOM(200)) u_chk (
      .clk     (clk),
      .checks  (chk[f]),
      .failures(fail[f]),
      .done    (done[f])
    );
    initial begin
      #1;
      if (NET.ok != 1) $display("filter %0d exceeds the network limits", f);
      n_h += NET.n_hsub;
      n_v += NET.n_vsub;
      $display("filter %0d: N=%0d b=%0d hsub=%0d vsub=%0d products=%0d adders=%0d registers=%0d",
               f, N_[f], B_[f], NET.n_hsub, NET.n_vsub, NET.n_prods,
               net_adders(NET, N_[f]), net_registers(NET, N_[f]));
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int f = 0; f < NF; f++) if (!done[f]) all = 0;
    end while (!all);
    for (int f = 0; f < NF; f++) begin
      checks   += chk[f];
      failures += fail[f];
      if (fail[f] != 0) $display("filter %0d: %0d failures", f, fail[f]);
    end
    checks++; if (n_h == 0) begin failures++; $display("no horizontal subexpression built"); end
    checks++; if (n_v == 0) begin failures++; $display("no vertical subexpression built"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
