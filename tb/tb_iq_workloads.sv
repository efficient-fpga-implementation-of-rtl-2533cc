// tb_iq_workloads: Monte-Carlo run of the corrector over random receiver
// imbalances, in the style of a receiver evaluation: for each modulation
// (32-PSK at 26.1 dB SNR, 256-QAM at 30 dB SNR, AWGN) N_EXP experiments
// draw a phase error uniformly in 0..30 degrees and an amplitude imbalance
// uniformly in 1..3 dB, reset the corrector and run N_SAMP samples.
//
// Reported per modulation, averaged over the experiments:
//   * IRR before/after: image rejection K1^2/K2^2 of the whole real 2x2
//     map from the transmitted (u_I,u_Q) to the outputs, where for a map
//     [[a11,a12],[a21,a22]] K1 = ((a11+a22) + j(a21-a12))/2 and
//     K2 = ((a11-a22) + j(a21+a12))/2. Before: the front end alone;
//     after: [[1,-w1],[-w2,1]] (the applied coefficients) times it.
//   * cross-talk rejection: the weaker of b11^2/b12^2 and b22^2/b21^2 for
//     that map, i.e. how much of the other component is left in each output
//     whatever the output gains.
//   * iterations until w1 (w2) last left +-1 LSB of its final value.
// A symbol-error-rate run at phi = 15 deg, beta = 3 dB for each modulation
// compares ideal, uncorrected and corrected decisions (see ser_case).
// Checks: out_valid follows in_valid by one clock, and in every experiment
// whose coefficients ended inside the multiplier's covered range both
// coefficients settled within 2 LSBs of the analytic decorrelation point:
// with w1 = w2 = w, E[c_I c_Q] = P(1 + w^2) - S w = 0 for equal-power
// uncorrelated sources, P = a11 a21 + a12 a22, S = a11^2+a12^2+a21^2+a22^2,
// so w = (S - sqrt(S^2 - 4 P^2)) / (2 P).
module tb_iq_workloads;
  import iqc_pkg::*;

  localparam int N_EXP  = 100;
  localparam int N_SAMP = 150000;
  localparam int N_SER  = 100000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t r_i = '0, r_q = '0, c_i, c_q;
  logic out_valid, w1_covered, w2_covered;
  coef_t w1, w2, w1_eff, w2_eff;

  iq_corrector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat ((2 * N_EXP + 2) * (N_SAMP + 10) + 2 * (N_SER + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint qnt(real v);
    longint q;
    q = longint'($floor(v * 32768.0 + 0.5));
    return (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic real irr_db(real a11, real a12, real a21, real a22);
    real k1, k2;
    k1 = ((a11 + a22) ** 2 + (a21 - a12) ** 2) / 4.0;
    k2 = ((a11 - a22) ** 2 + (a21 + a12) ** 2) / 4.0;
    return 10.0 * $log10(k1 / (k2 + 1e-30));
  endfunction

  function automatic real xt_db(real a11, real a12, real a21, real a22);
    real x1, x2;
    x1 = 10.0 * $log10(a11 * a11 / (a12 * a12 + 1e-30));
    x2 = 10.0 * $log10(a22 * a22 / (a21 * a21 + 1e-30));
    return (x1 < x2) ? x1 : x2;
  endfunction

  function automatic real wopt(real a11, real a12, real a21, real a22);
    real p, q;
    p = a11 * a21 + a12 * a22;
    q = a11 * a11 + a12 * a12 + a21 * a21 + a22 * a22;
    if (p < 1e-9 && p > -1e-9) return 0.0;
    return (q - $sqrt(q * q - 4.0 * p * p)) / (2.0 * p);
  endfunction

  task automatic campaign(bit qam, real snr_db, string name);
    real s_irr_b, s_irr_a, s_xt_b, s_xt_a, s_it1, s_it2;
    int  n_cov;
    s_irr_b = 0; s_irr_a = 0; s_xt_b = 0; s_xt_a = 0; s_it1 = 0; s_it2 = 0; n_cov = 0;
    for (int e = 0; e < N_EXP; e++) begin
      real phi, beta, gr, alpha, g1, g2, ps, sn, amp, cs, sn2;
      real a11, a12, a21, a22, b11, b12, b21, b22, fw1, fw2, ib, ia, xb, xa;
      int  w1h [N_SAMP];
      int  w2h [N_SAMP];
      int  it1, it2;
      phi  = real'($urandom_range(0, 30000)) / 1000.0 * PI / 180.0;
      beta = 1.0 + real'($urandom_range(0, 2000)) / 1000.0;
      gr   = 10.0 ** (beta / 20.0);
      alpha = 2.0 * (gr - 1.0) / (gr + 1.0);
      g1 = 1.0 + 0.5 * alpha;  g2 = 1.0 - 0.5 * alpha;
      amp = 0.72;
      ps  = qam ? 2.0 * (255.0 / 3.0) / 225.0 : 1.0;       // symbol power at unit peak
      sn  = amp * $sqrt(ps / (2.0 * (10.0 ** (snr_db / 10.0))));  // noise std per axis
      cs  = $cos(phi / 2.0);  sn2 = $sin(phi / 2.0);
      a11 = g1 * cs; a12 = g1 * sn2; a21 = g2 * sn2; a22 = g2 * cs;
      @(negedge clk) begin rst_n = 0; in_valid = 0; end
      @(negedge clk) rst_n = 1;
      for (int k = 0; k < N_SAMP; k++) begin
        real ui, uq, ang;
        if (qam) begin
          ui = (2.0 * real'($urandom_range(0, 15)) - 15.0) / 15.0;
          uq = (2.0 * real'($urandom_range(0, 15)) - 15.0) / 15.0;
        end else begin
          ang = 2.0 * PI * real'($urandom_range(0, 31)) / 32.0;
          ui = $cos(ang); uq = $sin(ang);
        end
        ui = amp * ui + sn * gauss();
        uq = amp * uq + sn * gauss();
        @(negedge clk);
        r_i = sample_t'(qnt(a11 * ui + a12 * uq));
        r_q = sample_t'(qnt(a21 * ui + a22 * uq));
        in_valid = 1'b1;
        @(posedge clk); #1;
        if (k == 0) begin
          checks++;
          if (out_valid !== 1'b1) failures++;
        end
        w1h[k] = int'(w1);
        w2h[k] = int'(w2);
      end
      @(negedge clk) in_valid = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== 1'b0) failures++;
      it1 = 0; it2 = 0;
      for (int k = 0; k < N_SAMP; k++) begin
        if (w1h[k] > w1h[N_SAMP-1] + 1 || w1h[k] < w1h[N_SAMP-1] - 1) it1 = k + 1;
        if (w2h[k] > w2h[N_SAMP-1] + 1 || w2h[k] < w2h[N_SAMP-1] - 1) it2 = k + 1;
      end
      fw1 = real'(w1_eff) / 128.0;  fw2 = real'(w2_eff) / 128.0;
      b11 = a11 - fw1 * a21;  b12 = a12 - fw1 * a22;
      b21 = a21 - fw2 * a11;  b22 = a22 - fw2 * a12;
      ib = irr_db(a11, a12, a21, a22);  ia = irr_db(b11, b12, b21, b22);
      xb = xt_db(a11, a12, a21, a22);   xa = xt_db(b11, b12, b21, b22);
      s_irr_b += ib; s_irr_a += ia; s_xt_b += xb; s_xt_a += xa;
      s_it1 += real'(it1); s_it2 += real'(it2);
      if (w1_covered && w2_covered) begin
        n_cov++;
        checks++;
        if (wopt(a11, a12, a21, a22) * 128.0 - real'(w1) > 2.0 ||
            real'(w1) - wopt(a11, a12, a21, a22) * 128.0 > 2.0 ||
            wopt(a11, a12, a21, a22) * 128.0 - real'(w2) > 2.0 ||
            real'(w2) - wopt(a11, a12, a21, a22) * 128.0 > 2.0) begin
          failures++;
          $display("%s exp %0d: phi=%.1f beta=%.2f w1=%0d w2=%0d expected %.2f",
                   name, e, phi * 180.0 / PI, beta, w1, w2, wopt(a11, a12, a21, a22) * 128.0);
        end
      end
    end
    $display("%s: %0d experiments (%0d with covered coefficients)", name, N_EXP, n_cov);
    $display("  mean IRR before %.1f dB, after %.1f dB", s_irr_b / N_EXP, s_irr_a / N_EXP);
    $display("  mean cross-talk rejection before %.1f dB, after %.1f dB", s_xt_b / N_EXP, s_xt_a / N_EXP);
    $display("  mean iterations to settle: w1 %.0f, w2 %.0f", s_it1 / N_EXP, s_it2 / N_EXP);
  endtask

  // Symbol error rate at phi = 15 deg, beta = 3 dB for one modulation: the
  // corrector adapts for N_SAMP samples, then N_SER symbols are sliced (a)
  // from the ideal noisy symbols, (b) from the received pair and (c) from the
  // corrector outputs. (b) and (c) are first divided by their branch gain
  // (a11, a22 resp. b11, b22) so that only the cross-talk is judged.
  task automatic ser_case(bit qam, real snr_db, string name);
    real phi, gr, alpha, g1, g2, ps, sn, amp, a11, a12, a21, a22, b11, b22;
    int  err_i, err_b, err_a;
    phi = 15.0 * PI / 180.0;
    gr  = 10.0 ** (3.0 / 20.0);
    alpha = 2.0 * (gr - 1.0) / (gr + 1.0);
    g1 = 1.0 + 0.5 * alpha;  g2 = 1.0 - 0.5 * alpha;
    amp = 0.72;
    ps  = qam ? 2.0 * (255.0 / 3.0) / 225.0 : 1.0;
    sn  = amp * $sqrt(ps / (2.0 * (10.0 ** (snr_db / 10.0))));
    a11 = g1 * $cos(phi / 2.0); a12 = g1 * $sin(phi / 2.0);
    a21 = g2 * $sin(phi / 2.0); a22 = g2 * $cos(phi / 2.0);
    err_i = 0; err_b = 0; err_a = 0;
    @(negedge clk) begin rst_n = 0; in_valid = 0; end
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < N_SAMP + N_SER; k++) begin
      int  si, sq, sym;
      real ui, uq, ni, nq, ri, rq;
      if (qam) begin
        si = $urandom_range(0, 15); sq = $urandom_range(0, 15); sym = si * 16 + sq;
        ui = (2.0 * real'(si) - 15.0) / 15.0; uq = (2.0 * real'(sq) - 15.0) / 15.0;
      end else begin
        sym = $urandom_range(0, 31);
        ui = $cos(2.0 * PI * real'(sym) / 32.0); uq = $sin(2.0 * PI * real'(sym) / 32.0);
      end
      ni = amp * ui + sn * gauss();
      nq = amp * uq + sn * gauss();
      @(negedge clk);
      r_i = sample_t'(qnt(a11 * ni + a12 * nq));
      r_q = sample_t'(qnt(a21 * ni + a22 * nq));
      in_valid = 1'b1;
      @(posedge clk); #1;
      if (k >= N_SAMP) begin
        real fw1, fw2;
        fw1 = real'(w1_eff) / 128.0;  fw2 = real'(w2_eff) / 128.0;
        b11 = a11 - fw1 * a21;  b22 = a22 - fw2 * a12;
        if (slice(qam, ni / amp, nq / amp) != sym) err_i++;
        if (slice(qam, real'(r_i) / 32768.0 / a11 / amp, real'(r_q) / 32768.0 / a22 / amp) != sym) err_b++;
        if (slice(qam, real'(c_i) / 32768.0 / b11 / amp, real'(c_q) / 32768.0 / b22 / amp) != sym) err_a++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    $display("%s, phi=15 deg, beta=3 dB: symbol error rate ideal %.2e, uncorrected %.2e, corrected %.2e",
             name, real'(err_i) / N_SER, real'(err_b) / N_SER, real'(err_a) / N_SER);
    checks++;
    if (err_a > err_b) begin
      failures++;
      $display("%s: correction increased the symbol error rate", name);
    end
  endtask

  function automatic int slice(bit qam, real yi, real yq);
    int li, lq, p;
    if (qam) begin
      li = int'($floor((yi * 15.0 + 15.0) / 2.0 + 0.5));
      lq = int'($floor((yq * 15.0 + 15.0) / 2.0 + 0.5));
      li = (li < 0) ? 0 : (li > 15) ? 15 : li;
      lq = (lq < 0) ? 0 : (lq > 15) ? 15 : lq;
      return li * 16 + lq;
    end
    p = int'($floor($atan2(yq, yi) / (2.0 * PI) * 32.0 + 0.5));
    return (p % 32 + 32) % 32;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    ser_case(1'b0, 26.1, "32-PSK  SNR=26.1dB");
    ser_case(1'b1, 30.0, "256-QAM SNR=30dB");
    campaign(1'b0, 26.1, "32-PSK  SNR=26.1dB");
    campaign(1'b1, 30.0, "256-QAM SNR=30dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
