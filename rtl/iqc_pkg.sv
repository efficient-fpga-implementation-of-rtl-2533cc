// iqc_pkg: word lengths, fixed-point formats and shared types of the adaptive
// IQ-imbalance corrector.
//
// Number formats used throughout:
//   * samples (r_I, r_Q, c_I, c_Q): 16-bit two's complement, read as Q1.15
//     fractions (the 16-bit data width is from the design description; the
//     fractional reading is this design's choice).
//   * coefficients (w1, w2): 8-bit two's complement fractions, Q1.7.
//   * LMS step size mu = 2^-13, applied as a hard-wired arithmetic shift.
//   * the coefficient register keeps WD_ACC bits (Q1.23 by default) so that
//     updates much smaller than one coefficient LSB accumulate; its top
//     WD_CF bits are the coefficient seen by the multiplier (own choice).
//
// The reduced range multiplier (RRM) is built from four reconfigurable basic
// structures, each an adder/subtractor whose operation is picked by two
// select lines S1,S0. rrm_op_e names the four operations of each structure.
package iqc_pkg;

  parameter int WD_DP    = 16;  // data word length (wdDP)
  parameter int WD_CF    = 8;   // coefficient word length (wdCF)
  parameter int MU_SHIFT = 13;  // mu = 2^-MU_SHIFT
  parameter int WD_ACC   = 24;  // coefficient accumulator width (assumed)
  parameter int WD_RRM   = 22;  // width of the RRM internal sums and product

  typedef logic signed [WD_DP-1:0] sample_t;
  typedef logic signed [WD_CF-1:0] coef_t;

  // Operation of one basic structure with inputs A (chain) and B (shifted data).
  // First stage:  OP0 -> 0,  OP1 -> A,   OP2 -> B,   OP3 -> A+B
  // Later stages: OP0 -> A,  OP1 -> A+B, OP2 -> A-B, OP3 -> B-A
  typedef enum logic [1:0] {OP0 = 2'd0, OP1 = 2'd1, OP2 = 2'd2, OP3 = 2'd3} rrm_op_e;

  // Select lines of the four RRM stages (stage 1 is the data entry stage).
  typedef struct packed {
    rrm_op_e s4;
    rrm_op_e s3;
    rrm_op_e s2;
    rrm_op_e s1;
  } rrm_sel_t;

  // Left shifts of the data fed to stages 2, 3 and 4 (x4, x8, x16); stage 1
  // combines the data with itself shifted by one bit (x1 and x2).
  parameter int RRM_SH2 = 2;
  parameter int RRM_SH3 = 3;
  parameter int RRM_SH4 = 4;

  // Coefficient multiple produced by one stage, given its chain input a and
  // its data weight b (both as plain integers).
  function automatic int rrm_stage_value(bit first, rrm_op_e op, int a, int b);
    if (first) begin
      case (op)
        OP0:     return 0;
        OP1:     return a;
        OP2:     return b;
        default: return a + b;
      endcase
    end else begin
      case (op)
        OP0:     return a;
        OP1:     return a + b;
        OP2:     return a - b;
        default: return b - a;
      endcase
    end
  endfunction

  // Integer coefficient (in Q1.7 LSBs) that a select word makes the RRM multiply by.
  function automatic int rrm_sel_value(rrm_sel_t sel);
    int v;
    v = rrm_stage_value(1'b1, sel.s1, 1, 2);
    v = rrm_stage_value(1'b0, sel.s2, v, 1 << RRM_SH2);
    v = rrm_stage_value(1'b0, sel.s3, v, 1 << RRM_SH3);
    v = rrm_stage_value(1'b0, sel.s4, v, 1 << RRM_SH4);
    return v;
  endfunction

endpackage
