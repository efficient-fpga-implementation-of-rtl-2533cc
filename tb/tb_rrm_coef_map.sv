// tb_rrm_coef_map: for all 256 coefficient values, checks that the mapped
// select word really forms the reported coefficient (decoded here from the
// stage operations, x1/x2, x4, x8, x16), that it is the nearest coefficient
// any select word can form, and that the covered flag is right.
module tb_rrm_coef_map;
  import iqc_pkg::*;
  coef_t    coef, coef_eff;
  rrm_sel_t sel;
  logic     covered;
  int checks = 0, failures = 0;
  bit reach [-64:64];

  rrm_coef_map dut (.coef(coef), .sel(sel), .coef_eff(coef_eff), .covered(covered));

  // Independent decode of a select word: (op1,op2,op3,op4) -> multiple of x.
  function automatic int decode(logic [7:0] s);
    int v;
    case (s[1:0]) 0: v = 0; 1: v = 1; 2: v = 2; default: v = 3; endcase
    for (int k = 1; k < 4; k++) begin
      int b;
      b = (k == 1) ? 4 : (k == 2) ? 8 : 16;
      case (s[2*k +: 2]) 0: v = v; 1: v = v + b; 2: v = v - b; default: v = b - v; endcase
    end
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, best, d, bd;
    foreach (reach[i]) reach[i] = 0;
    for (int s = 0; s < 256; s++) reach[decode(8'(s))] = 1;
    for (int i = -128; i < 128; i++) begin
      coef = coef_t'(i);
      #1;
      m  = i;
      bd = 1000;
      best = 0;
      for (int v = -64; v <= 64; v++)
        if (reach[v]) begin
          d = (v > m) ? v - m : m - v;
          if (d < bd) begin bd = d; best = v; end
        end
      checks += 3;
      if (int'(coef_eff) != best) begin
        failures++;
        $display("coef %0d: eff %0d expected %0d", i, coef_eff, best);
      end
      if (decode(sel) != int'(coef_eff)) begin
        failures++;
        $display("coef %0d: sel %h decodes to %0d, eff %0d", i, sel, decode(sel), coef_eff);
      end
      if (covered != (bd == 0)) begin
        failures++;
        $display("coef %0d: covered %0b", i, covered);
      end
    end
    // The covered range is expected to be exactly the integers -28..31.
    for (int v = -64; v <= 64; v++) begin
      checks++;
      if (reach[v] != (v >= -28 && v <= 31)) begin
        failures++;
        $display("coverage mismatch at %0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
