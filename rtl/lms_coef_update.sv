// lms_coef_update: coefficient register with the LMS update
//   w(k+1) = w(k) + mu * e(k) * u(k),   mu = 2^-MU_SHIFT
//
// e and u are Q1.15 samples, so their product is a Q2.30 number. mu is not a
// multiplier: it is folded into a fixed arithmetic right shift of the product
// (hard-wired, no logic), aligned to the Q1.(WD_ACC-1) accumulator. The
// accumulator is wider than the coefficient so that the very small updates
// add up; its top WD_CF bits (truncated) are the coefficient w used by the
// multiplier. The accumulator saturates instead of wrapping.
//
// Interface: en = 1 for one cycle per sample applies one update at the
// rising clock edge; w and acc change one cycle after en. Synchronous,
// active-low reset clears the coefficient to 0.
// The update rule, mu = 2^-13, the 16-bit data and 8-bit coefficients follow
// the design description; the accumulator width, truncation, saturation and
// reset value are this design's choices.
module lms_coef_update
  import iqc_pkg::*;
#(
  parameter int WD_A   = WD_ACC,
  parameter int MU_SH  = MU_SHIFT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  sample_t                e,
  input  sample_t                u,
  output coef_t                  w,
  output logic signed [WD_A-1:0] acc
);

  // Product has 2*(WD_DP-1) fractional bits; accumulator has WD_A-1.
  localparam int SHIFT = 2 * (WD_DP - 1) + MU_SH - (WD_A - 1);
  localparam logic signed [WD_A:0] ACC_MAX = (WD_A+1)'({1'b0, {(WD_A-1){1'b1}}});
  localparam logic signed [WD_A:0] ACC_MIN = -ACC_MAX - 1;

  logic signed [2*WD_DP-1:0] prod;
  logic signed [WD_A:0]      delta, sum;

  initial begin
    assert (SHIFT >= 0 && SHIFT < 2 * WD_DP)
      else $error("lms_coef_update: accumulator width and mu give no valid shift");
  end

  always_comb begin
    prod  = e * u;
    delta = (WD_A+1)'(prod >>> SHIFT);
    sum   = (WD_A+1)'(acc) + delta;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      if (sum > ACC_MAX)      acc <= ACC_MAX[WD_A-1:0];
      else if (sum < ACC_MIN) acc <= ACC_MIN[WD_A-1:0];
      else                    acc <= sum[WD_A-1:0];
    end
  end

  assign w = acc[WD_A-1 -: WD_CF];

endmodule
