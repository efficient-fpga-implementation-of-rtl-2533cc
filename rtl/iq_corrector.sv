// iq_corrector: adaptive blind IQ-imbalance corrector for a quadrature
// receiver.
//
// The received pair (r_I, r_Q) is modelled as an unknown scalar mixture of
// the two uncorrelated baseband components: r_I = s_I + h1 s_Q,
// r_Q = h2 s_I + s_Q. Two mirrored processing elements undo it:
//   c_I = r_I - w1 r_Q,   c_Q = r_Q - w2 r_I
// and adapt w1, w2 by LMS so that c_I and c_Q become uncorrelated, with no
// pilot or test tone. The coefficient multiplications use reduced range
// multipliers. At convergence (w1 = h1, w2 = h2) the outputs are the sources
// scaled by (1 - h1 h2), close to 1.
//
// Interface: one sample pair per clock when in_valid is high; c_i/c_q and
// out_valid follow one cycle later. w1/w2 are the coefficient registers (Q1.7),
// w1_eff/w2_eff the covered coefficients the multipliers actually apply and
// w1_covered/w2_covered flag when the register value is itself covered.
// Synchronous active-low reset clears both coefficients (no correction) and
// the outputs. The structure follows the design description; the one-cycle
// timing and the reset behaviour are this design's choices.
module iq_corrector
  import iqc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t r_i,
  input  sample_t r_q,
  output logic    out_valid,
  output sample_t c_i,
  output sample_t c_q,
  output coef_t   w1,
  output coef_t   w2,
  output coef_t   w1_eff,
  output coef_t   w2_eff,
  output logic    w1_covered,
  output logic    w2_covered
);

  sample_t ci_now, cq_now;

  iqc_pe u_pe_i (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .d         (r_i),
    .x         (r_q),
    .c_peer    (cq_now),
    .c_now     (ci_now),
    .c         (c_i),
    .w         (w1),
    .w_eff     (w1_eff),
    .w_covered (w1_covered)
  );

  iqc_pe u_pe_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .d         (r_q),
    .x         (r_i),
    .c_peer    (ci_now),
    .c_now     (cq_now),
    .c         (c_q),
    .w         (w2),
    .w_eff     (w2_eff),
    .w_covered (w2_covered)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
