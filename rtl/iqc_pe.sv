// iqc_pe: basic processing element of the adaptive IQ-imbalance corrector.
//
// One element serves one branch; the corrector uses two, mirror images of
// each other. For the I branch (d = r_I, x = r_Q, w = w1):
//   c(k)     = d(k) - w(k) * x(k)           filter, through the RRM
//   w(k+1)   = w(k) + mu * c(k) * c_peer(k) LMS decorrelation update
// where c_peer is the other element's output of the same sample. The product
// w*x comes from the reduced range multiplier; it is scaled back to Q1.15 by
// an arithmetic shift of WD_CF-1 bits (truncation) and the difference is
// saturated to 16 bits.
//
// Interface: in_valid marks a new sample pair (d, x). c_now is combinational
// (it feeds the peer element's update); c is c_now registered, valid one
// cycle after in_valid, when the coefficient has also taken its update. One
// sample per clock is accepted. Synchronous active-low reset.
// The filter/update structure, the RRM and mu follow the design description;
// using the peer output c_peer as the update's regressor (so the two outputs
// are driven to be uncorrelated), truncation and saturation are this design's
// choices. Because both elements receive the same increment c_I*c_Q, w1 and
// w2 stay equal; the full-precision accumulator (w_acc) is kept internal and
// only its top WD_CF bits leave the element.
module iqc_pe
  import iqc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t d,
  input  sample_t x,
  input  sample_t c_peer,
  output sample_t c_now,
  output sample_t c,
  output coef_t   w,
  output coef_t   w_eff,
  output logic    w_covered
);

  localparam logic signed [WD_RRM-1:0] SMAX = WD_RRM'(2**(WD_DP-1) - 1);
  localparam logic signed [WD_RRM-1:0] SMIN = -SMAX - 1;

  logic signed [WD_RRM-1:0] p, diff;
  logic signed [WD_ACC-1:0] w_acc;  // full-precision coefficient, internal only

  rrm #(.WX(WD_DP), .WP(WD_RRM)) u_rrm (
    .x        (x),
    .coef     (w),
    .p        (p),
    .coef_eff (w_eff),
    .covered  (w_covered)
  );

  always_comb begin
    diff = WD_RRM'(d) - (p >>> (WD_CF - 1));
    if (diff > SMAX)      c_now = SMAX[WD_DP-1:0];
    else if (diff < SMIN) c_now = SMIN[WD_DP-1:0];
    else                  c_now = diff[WD_DP-1:0];
  end

  lms_coef_update u_upd (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (in_valid),
    .e     (c_now),
    .u     (c_peer),
    .w     (w),
    .acc   (w_acc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) c <= '0;
    else if (in_valid) c <= c_now;
  end

endmodule
