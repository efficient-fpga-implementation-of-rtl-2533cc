// rrm: reduced range multiplier, 16-bit data times 8-bit coefficient.
//
// Instead of a general purpose multiplier, the product is built by four
// reconfigurable basic structures (rrm_stage) in a chain:
//   stage 1: combines x and 2x           -> {0, x, 2x, 3x}
//   stage 2: chain with x<<2  (x4)       -> {y, y+4x, y-4x, 4x-y}
//   stage 3: chain with x<<3  (x8)       -> {y, y+8x, y-8x, 8x-y}
//   stage 4: chain with x<<4  (x16)      -> {y, y+16x, y-16x, 16x-y}
// rrm_coef_map converts the coefficient into the eight select lines (S1,S0
// per stage), choosing the nearest covered coefficient when the requested one
// cannot be formed. The product is p = x * coef_eff, with coef_eff in Q1.7
// LSBs, so p has 7 fractional bits more than x. Only the data-path depth of
// four add/subtract stages, whatever the data word length, is needed.
//
// Interface: combinational; x (WX bits, 16 by default; the structure works
// for any data word length), coef (WD_CF bits) in; p (WP = WX + 6 bits,
// exact, no rounding), coef_eff and covered out.
// Four stages, 2-bit selects and x4/x8/x16 shifts follow the RRM description;
// the per-stage operation sets and so the covered range (-28..31 LSBs) are
// this design's choice.
module rrm
  import iqc_pkg::*;
#(
  parameter int WX = WD_DP,   // data word length: any width works
  parameter int WP = WX + 6   // product width; covered multiples fit in 6 bits
) (
  input  logic signed [WX-1:0]      x,
  input  coef_t                     coef,
  output logic signed [WP-1:0]      p,
  output coef_t                     coef_eff,
  output logic                      covered
);

  rrm_sel_t sel;
  logic signed [WP-1:0] xw, y1, y2, y3;

  assign xw = WP'(x);

  rrm_coef_map u_map (
    .coef     (coef),
    .sel      (sel),
    .coef_eff (coef_eff),
    .covered  (covered)
  );

  rrm_stage #(.W(WP), .FIRST(1'b1)) u_s1 (.a(xw), .b(xw <<< 1),       .op(sel.s1), .y(y1));
  rrm_stage #(.W(WP), .FIRST(1'b0)) u_s2 (.a(y1), .b(xw <<< RRM_SH2), .op(sel.s2), .y(y2));
  rrm_stage #(.W(WP), .FIRST(1'b0)) u_s3 (.a(y2), .b(xw <<< RRM_SH3), .op(sel.s3), .y(y3));
  rrm_stage #(.W(WP), .FIRST(1'b0)) u_s4 (.a(y3), .b(xw <<< RRM_SH4), .op(sel.s4), .y(p));

endmodule
