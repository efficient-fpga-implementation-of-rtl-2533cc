// tb_lms_coef_update: drives random error/regressor pairs (with en toggling,
// long runs of same-sign products to reach both saturation limits, and a
// mid-run reset) and compares the accumulator and the 8-bit coefficient with
// a model: acc += floor(e*u / 2^20) (mu = 2^-13 on Q1.15 data into a Q1.23
// accumulator), saturated to 24 bits; w = acc[23:16]. Checks that an update
// appears exactly one clock after en.
module tb_lms_coef_update;
  import iqc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sample_t e = '0, u = '0;
  coef_t w;
  logic signed [23:0] acc;
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0;
  longint m_acc;

  lms_coef_update dut (.clk(clk), .rst_n(rst_n), .en(en), .e(e), .u(u), .w(w), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floor_div(longint a, int sh);
    return a >>> sh;  // arithmetic shift = floor division
  endfunction

  task automatic step(int ei, int ui, bit en_i);
    longint d;
    @(negedge clk);
    e  = sample_t'(ei);
    u  = sample_t'(ui);
    en = en_i;
    @(posedge clk);
    if (en_i) begin
      d = floor_div(longint'(ei) * longint'(ui), 20);
      m_acc = m_acc + d;
      if (m_acc > 64'sd8388607)  begin m_acc = 8388607;  n_sat_hi++; end
      if (m_acc < -64'sd8388608) begin m_acc = -8388608; n_sat_lo++; end
    end
    #1;
    checks++;
    if (longint'(acc) != m_acc || w != coef_t'(m_acc >>> 16)) begin
      failures++;
      if (failures < 10) $display("e=%0d u=%0d en=%0b acc=%0d exp=%0d w=%0d", ei, ui, en_i, acc, m_acc, w);
    end
  endtask

  initial begin
    m_acc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++)
      step(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768, $urandom_range(0, 3) != 0);
    // drive to the positive limit, then the negative one
    for (int n = 0; n < 9000; n++) step(32767, 32767, 1);
    for (int n = 0; n < 18000; n++) step(-32768, 32767, 1);
    // reset in the middle of operation
    @(negedge clk) begin rst_n = 0; en = 0; end
    @(posedge clk); #1;
    m_acc = 0;
    checks++;
    if (acc != 0 || w != 0) failures++;
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++)
      step(int'($urandom_range(0, 4095)) - 2048, int'($urandom_range(0, 65535)) - 32768, 1);
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("saturation not exercised: hi=%0d lo=%0d", n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
