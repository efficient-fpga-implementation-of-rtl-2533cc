// tb_rrm: the reduced range multiplier must return x * c' exactly, where c'
// is the coefficient clamped into the covered range -28..31 (Q1.7 LSBs).
// All 256 coefficients are tried with data corner values and random data,
// on the default 16-bit instance and on one with a 10-bit data word.
module tb_rrm;
  import iqc_pkg::*;
  sample_t x;
  coef_t   coef, coef_eff;
  logic signed [WD_RRM-1:0] p;
  logic covered;
  int checks = 0, failures = 0;

  rrm dut (.x(x), .coef(coef), .p(p), .coef_eff(coef_eff), .covered(covered));

  // a second instance with a 10-bit data word
  logic signed [9:0]  x10;
  logic signed [15:0] p10;
  coef_t              eff10;
  logic               cov10;
  rrm #(.WX(10)) dut10 (.x(x10), .coef(coef), .p(p10), .coef_eff(eff10), .covered(cov10));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, xi, exp_c;
    longint exp_p;
    for (int i = -128; i < 128; i++) begin
      for (int n = 0; n < 40; n++) begin
        case (n)
          0: xi = -32768;
          1: xi = 32767;
          2: xi = 0;
          3: xi = 1;
          4: xi = -1;
          default: xi = int'($urandom_range(0, 65535)) - 32768;
        endcase
        c    = i;
        coef = coef_t'(i);
        x    = sample_t'(xi);
        x10  = 10'(xi >>> 6);
        #1;
        exp_c = (c < -28) ? -28 : (c > 31) ? 31 : c;
        exp_p = longint'(xi) * longint'(exp_c);
        checks++;
        if (longint'(p) != exp_p || int'(coef_eff) != exp_c || covered != (c == exp_c)) begin
          failures++;
          if (failures < 10)
            $display("coef=%0d x=%0d: p=%0d exp=%0d eff=%0d", c, xi, p, exp_p, coef_eff);
        end
        checks++;
        if (longint'(p10) != longint'(xi >>> 6) * longint'(exp_c)) begin
          failures++;
          if (failures < 10) $display("10-bit: coef=%0d x=%0d: p=%0d", c, xi >>> 6, p10);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
