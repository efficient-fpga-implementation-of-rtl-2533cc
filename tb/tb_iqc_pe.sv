// tb_iqc_pe: drives one processing element with random (d, x, c_peer)
// triples and compares c_now, the registered c and the coefficient with a
// model written here: c = sat16(d - floor(x*clamp(w,-28,31) / 128)),
// acc += floor(c*c_peer / 2^20) saturated to 24 bits, w = acc[23:16].
// x is large so that the output saturates sometimes; c follows in_valid by
// exactly one clock and holds while in_valid is low.
module tb_iqc_pe;
  import iqc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t d = '0, x = '0, c_peer = '0, c_now, c;
  coef_t w, w_eff;
  logic w_covered;
  int checks = 0, failures = 0, n_sat = 0, n_unc = 0;
  longint m_acc, m_c;

  iqc_pe dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d(d), .x(x), .c_peer(c_peer),
              .c_now(c_now), .c(c), .w(w), .w_eff(w_eff), .w_covered(w_covered));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  task automatic step(int di, int xi, int pi, bit v);
    longint wc, wi, cn;
    @(negedge clk);
    d = sample_t'(di); x = sample_t'(xi); c_peer = sample_t'(pi); in_valid = v;
    wi = m_acc >>> 16;
    wc = (wi < -28) ? -28 : (wi > 31) ? 31 : wi;
    if (wc != wi) n_unc++;
    cn = longint'(di) - ((longint'(xi) * wc) >>> 7);
    if (sat16(cn) != cn) n_sat++;
    cn = sat16(cn);
    #1;
    checks++;
    if (longint'(c_now) != cn || longint'(w) != wi || longint'(w_eff) != wc || w_covered != (wc == wi)) begin
      failures++;
      if (failures < 10) $display("c_now=%0d exp=%0d w=%0d exp=%0d", c_now, cn, w, wi);
    end
    @(posedge clk);
    if (v) begin
      m_acc += (cn * longint'(sample_t'(pi))) >>> 20;
      if (m_acc > 8388607) m_acc = 8388607;
      if (m_acc < -8388608) m_acc = -8388608;
      m_c = cn;
    end
    #1;
    checks++;
    if (longint'(c) != m_c) begin
      failures++;
      if (failures < 10) $display("c=%0d exp=%0d", c, m_c);
    end
  endtask

  initial begin
    m_acc = 0; m_c = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // positive correlation drives w up through the covered range and beyond
    for (int n = 0; n < 12000; n++) begin
      int a;
      a = int'($urandom_range(0, 65535)) - 32768;
      step(a, int'($urandom_range(0, 65535)) - 32768, a,
           $urandom_range(0, 7) != 0);
    end
    // negative correlation drives it back down below the covered range
    for (int n = 0; n < 24000; n++) begin
      int a;
      a = int'($urandom_range(0, 65535)) - 32768;
      step(a, int'($urandom_range(0, 65535)) - 32768, -a, 1);
    end
    checks++;
    if (n_sat == 0 || n_unc == 0) begin
      failures++;
      $display("not exercised: saturation=%0d uncovered=%0d", n_sat, n_unc);
    end
    $display("saturations=%0d uncovered-coefficient cycles=%0d", n_sat, n_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
