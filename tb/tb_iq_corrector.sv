// tb_iq_corrector: end-to-end test of the adaptive IQ-imbalance corrector.
//
// A quadrature receiver with IQ imbalance is modelled here (it is analogue
// and not part of the RTL):
//   r_I = g1 [u_I cos(phi/2) + u_Q sin(phi/2)]
//   r_Q = g2 [u_I sin(phi/2) + u_Q cos(phi/2)]
//   g1 = 1 + alpha/2, g2 = 1 - alpha/2, beta = 20 log10(g1/g2) dB
// fed with random 256-QAM or 32-PSK symbols quantised to 16 bits.
// Every output sample and both coefficients are compared, cycle by cycle,
// with a fixed-point model of the corrector written here. After each
// adaptation run the normalised correlation between c_I and c_Q must have
// dropped well below that of r_I and r_Q, and the correlation rejection
// estimated from the outputs must have improved.
//
// Phases: (1) 256-QAM, phi = 15 deg, beta = 3 dB; (2) after a reset,
// 32-PSK, phi = 10 deg, beta = 1 dB, with gaps in in_valid; (2b) the
// scalar mixture r_I = s_I + h s_Q, r_Q = h s_I + s_Q with h = -0.15, where
// the coefficients must settle at h (negative coefficients) with a
// modelling error |w - h|^2/|h|^2 below 1%; (3) after a
// reset, a strong imbalance (phi = 40 deg) that pushes the coefficients
// past the multiplier's covered range, where only a partial improvement is
// required; (4) fully correlated full-scale
// input that saturates the outputs and then the coefficient accumulator.
// Each mechanism (update, idle hold, uncovered coefficient quantisation,
// output saturation, accumulator saturation, reset) is counted and must
// happen at least once.
module tb_iq_corrector;
  import iqc_pkg::*;

  localparam int N_QAM   = 150000;
  localparam int N_PSK   = 150000;
  localparam int N_BIG   = 60000;
  localparam int N_CORR  = 20000;
  localparam int N_MIX   = 150000;
  localparam int MEAS    = 20000;   // samples at the end of a run used for statistics

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t r_i = '0, r_q = '0, c_i, c_q;
  logic out_valid, w1_covered, w2_covered;
  coef_t w1, w2, w1_eff, w2_eff;

  iq_corrector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_update = 0, n_idle = 0, n_uncov = 0, n_outsat = 0, n_accsat = 0, n_reset = 0;

  // model state
  longint m_acc1, m_acc2, m_ci, m_cq;
  bit     m_ov;

  // statistics over the measured window
  real s_rr, s_ri2, s_rq2, s_cc, s_ci2, s_cq2;
  int  n_stat;

  initial begin
    repeat (N_QAM + N_PSK * 2 + N_BIG + N_CORR + N_MIX + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v, longint hi);
    return (v > hi) ? hi : (v < -hi - 1) ? -hi - 1 : v;
  endfunction

  function automatic longint clampc(longint w);
    return (w < -28) ? -28 : (w > 31) ? 31 : w;
  endfunction

  function automatic longint qnt(real v);
    longint q;
    q = longint'($floor(v * 32768.0 + 0.5));
    return sat(q, 32767);
  endfunction

  task automatic model_reset();
    m_acc1 = 0; m_acc2 = 0; m_ci = 0; m_cq = 0; m_ov = 0;
  endtask

  task automatic stats_clear();
    s_rr = 0; s_ri2 = 0; s_rq2 = 0; s_cc = 0; s_ci2 = 0; s_cq2 = 0; n_stat = 0;
  endtask

  // One clock: apply a sample (or idle), check everything after the edge.
  task automatic step(longint ri, longint rq, bit v, bit measure);
    longint w1i, w2i, w1c, w2c, ci, cq, ci_raw, cq_raw;
    @(negedge clk);
    r_i = sample_t'(ri); r_q = sample_t'(rq); in_valid = v;
    w1i = m_acc1 >>> 16;  w2i = m_acc2 >>> 16;
    w1c = clampc(w1i);    w2c = clampc(w2i);
    ci_raw = ri - ((rq * w1c) >>> 7);
    cq_raw = rq - ((ri * w2c) >>> 7);
    ci = sat(ci_raw, 32767);
    cq = sat(cq_raw, 32767);
    if (v) begin
      n_update++;
      if (w1c != w1i || w2c != w2i) n_uncov++;
      if (ci != ci_raw || cq != cq_raw) n_outsat++;
    end else n_idle++;
    @(posedge clk);
    if (v) begin
      m_acc1 = m_acc1 + ((ci * cq) >>> 20);
      m_acc2 = m_acc2 + ((cq * ci) >>> 20);
      if (m_acc1 > 8388607 || m_acc1 < -8388608) n_accsat++;
      m_acc1 = sat(m_acc1, 8388607);
      m_acc2 = sat(m_acc2, 8388607);
      m_ci = ci; m_cq = cq;
    end
    m_ov = v;
    #1;
    checks++;
    if (longint'(c_i) != m_ci || longint'(c_q) != m_cq || out_valid != m_ov ||
        longint'(w1) != (m_acc1 >>> 16) || longint'(w2) != (m_acc2 >>> 16) ||
        longint'(w1_eff) != clampc(m_acc1 >>> 16) ||
        w1_covered != (clampc(m_acc1 >>> 16) == (m_acc1 >>> 16))) begin
      failures++;
      if (failures < 10)
        $display("mismatch: c_i=%0d/%0d c_q=%0d/%0d w1=%0d/%0d w2=%0d/%0d ov=%0b",
                 c_i, m_ci, c_q, m_cq, w1, m_acc1 >>> 16, w2, m_acc2 >>> 16, out_valid);
    end
    if (v && measure) begin
      real a, b, c, d;
      a = real'(ri); b = real'(rq); c = real'(ci); d = real'(cq);
      s_rr += a * b; s_ri2 += a * a; s_rq2 += b * b;
      s_cc += c * d; s_ci2 += c * c; s_cq2 += d * d;
      n_stat++;
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0; in_valid = 0;
    @(posedge clk); #1;
    model_reset();
    n_reset++;
    checks++;
    if (w1 != 0 || w2 != 0 || out_valid != 0 || c_i != 0 || c_q != 0) begin
      failures++;
      $display("reset did not clear state");
    end
    @(negedge clk) rst_n = 1;
  endtask

  // Random symbol, unit peak amplitude per axis; qam = 1: 256-QAM, 0: 32-PSK.
  task automatic symbol(bit qam, output real ui, output real uq);
    if (qam) begin
      ui = (2.0 * real'($urandom_range(0, 15)) - 15.0) / 15.0;
      uq = (2.0 * real'($urandom_range(0, 15)) - 15.0) / 15.0;
    end else begin
      real ang;
      ang = 2.0 * 3.14159265358979 * real'($urandom_range(0, 31)) / 32.0;
      ui = $cos(ang); uq = $sin(ang);
    end
  endtask

  // Run one adaptation experiment and judge the decorrelation achieved.
  task automatic run(string name, bit qam, real phi_deg, real beta_db, real amp, int n, bit gaps,
                   bit in_range);
    real phi, gr, alpha, g1, g2, ui, uq, rho_in, rho_out, irr_in, irr_out;
    phi = phi_deg * 3.14159265358979 / 180.0;
    gr  = 10.0 ** (beta_db / 20.0);            // g1/g2
    alpha = 2.0 * (gr - 1.0) / (gr + 1.0);
    g1 = 1.0 + 0.5 * alpha;  g2 = 1.0 - 0.5 * alpha;
    stats_clear();
    for (int k = 0; k < n; k++) begin
      symbol(qam, ui, uq);
      ui = ui * amp; uq = uq * amp;
      step(qnt(g1 * (ui * $cos(phi / 2) + uq * $sin(phi / 2))),
           qnt(g2 * (ui * $sin(phi / 2) + uq * $cos(phi / 2))), 1'b1, k >= n - MEAS);
      if (gaps && $urandom_range(0, 9) == 0) step(0, 0, 1'b0, 1'b0);
    end
    rho_in  = s_rr / $sqrt(s_ri2 * s_rq2);
    rho_out = s_cc / $sqrt(s_ci2 * s_cq2);
    // correlation rejection: uncorrelated against correlated power, in dB
    irr_in  = 10.0 * $log10((1.0 + 1e-12) / (rho_in * rho_in + 1e-12));
    irr_out = 10.0 * $log10((1.0 + 1e-12) / (rho_out * rho_out + 1e-12));
    $display("%s: w1=%0d w2=%0d (Q1.7)  corr in=%.4f out=%.4f  correlation rejection in=%.1f dB out=%.1f dB",
             name, w1, w2, rho_in, rho_out, irr_in, irr_out);
    checks++;
    // Within the covered range full decorrelation is expected; beyond it the
    // clamped coefficient can only reduce the correlation.
    if (in_range ? (!(rho_out < 0.03 && rho_out > -0.03) || irr_out < irr_in + 15.0)
                 : (irr_out < irr_in + 3.0)) begin
      failures++;
      $display("%s: outputs not decorrelated", name);
    end
  endtask

  // Run with the scalar mixing model r_I = s_I + h s_Q, r_Q = h s_I + s_Q; the
  // coefficients must settle at w1 = w2 = h (within 2 LSB of Q1.7).
  task automatic run_mix(real h, int n);
    real ui, uq, me;
    stats_clear();
    for (int k = 0; k < n; k++) begin
      symbol(1'b1, ui, uq);
      ui = ui * 0.75; uq = uq * 0.75;
      step(qnt(ui + h * uq), qnt(h * ui + uq), 1'b1, k >= n - MEAS);
    end
    // modelling error: |w - h|^2 / |h|^2 over both coefficients
    me = ((real'(w1) / 128.0 - h) ** 2 + (real'(w2) / 128.0 - h) ** 2) / (2.0 * h * h);
    $display("mixture h=%.3f: w1=%0d w2=%0d (expected %.1f), output correlation %.4f, ME %.2e",
             h, w1, w2, h * 128.0, s_cc / $sqrt(s_ci2 * s_cq2), me);
    checks++;
    if (me > 0.01) begin
      failures++;
      $display("mixture h=%.3f: modelling error too large", h);
    end
    checks++;
    if (real'(w1) - h * 128.0 > 2.0 || h * 128.0 - real'(w1) > 2.0 ||
        real'(w2) - h * 128.0 > 2.0 || h * 128.0 - real'(w2) > 2.0) begin
      failures++;
      $display("mixture h=%.3f: coefficients did not converge to h", h);
    end
  endtask

  initial begin
    model_reset();
    repeat (3) @(posedge clk);
    do_reset();

    run("256-QAM phi=15 beta=3dB", 1'b1, 15.0, 3.0, 0.7, N_QAM, 1'b0, 1'b1);
    do_reset();
    run("32-PSK  phi=10 beta=1dB", 1'b0, 10.0, 1.0, 0.7, N_PSK, 1'b1, 1'b1);
    do_reset();
    run_mix(-0.15, N_MIX);
    do_reset();
    // strong imbalance: the ideal coefficient lies outside the covered range
    run("256-QAM phi=40 beta=0dB", 1'b1, 40.0, 0.0, 0.6, N_BIG, 1'b0, 1'b0);
    checks++;
    if (w1_covered) begin
      failures++;
      $display("coefficient expected beyond the covered range");
    end
    // fully correlated full-scale input: outputs and accumulator saturate
    for (int k = 0; k < N_CORR; k++) begin
      longint v;
      v = ($urandom_range(0, 1) != 0) ? 32767 : -32767;
      step(v, (k % 50 == 0) ? -v : v, 1'b1, 1'b0);
    end

    $display("updates=%0d idle=%0d uncovered=%0d out-saturations=%0d acc-saturations=%0d resets=%0d",
             n_update, n_idle, n_uncov, n_outsat, n_accsat, n_reset);
    checks++;
    if (n_update == 0 || n_idle == 0 || n_uncov == 0 || n_outsat == 0 || n_accsat == 0 || n_reset < 4) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
