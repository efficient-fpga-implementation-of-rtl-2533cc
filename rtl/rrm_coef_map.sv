// rrm_coef_map: turns an 8-bit coefficient into the select lines of the
// reduced range multiplier.
//
// The RRM can only multiply by the coefficients its four stages can form (its
// "covered" range). A coefficient outside that set is replaced by the nearest
// covered one, a non-linear quantisation. The mapping is a 2^WD_CF-entry table
// computed at elaboration: each of the 256 select words is evaluated once to
// find the covered set, then two sweeps over the coefficient range find the
// nearest covered value below and above each coefficient. With the default stage set the
// covered coefficients are the integers -28..31, i.e. w in [-0.21875,
// 0.2421875] in Q1.7, exact in steps of 2^-7; larger magnitudes saturate.
//
// Interface: combinational. coef in, sel (to the four stages), coef_eff (the
// covered coefficient actually applied) and covered (coef is in the set).
// A covered value formed by several select words uses the lowest one; a
// coefficient half-way between two covered values takes the smaller.
// The nearest-covered rule is from the design description; the table form and
// the tie rule are this design's choices.
module rrm_coef_map
  import iqc_pkg::*;
(
  input  coef_t    coef,
  output rrm_sel_t sel,
  output coef_t    coef_eff,
  output logic     covered
);

  localparam int NCOEF = 1 << WD_CF;

  // One table entry: {select word, covered coefficient, covered flag}.
  localparam int ENTRY_W = $bits(rrm_sel_t) + WD_CF + 1;
  typedef logic [NCOEF-1:0][ENTRY_W-1:0] map_table_t;

  // Values any select word can form lie well inside -VR..VR-1.
  localparam int VR = 2 * NCOEF;

  function automatic map_table_t build_table();
    map_table_t t;
    logic [2*VR-1:0] have;         // have[v+VR]: some select word forms v
    logic [2*VR-1:0][$bits(rrm_sel_t)-1:0] sel_of;  // lowest select word forming v
    int              below  [NCOEF];
    int              above  [NCOEF];
    int              v, m, last, best;
    t    = '0;
    have = '0;
    sel_of = '0;
    for (int s = 255; s >= 0; s--) begin
      v = rrm_sel_value(rrm_sel_t'(s));
      have[v + VR]   = 1'b1;
      sel_of[v + VR] = 8'(s);
    end
    // nearest covered value at or below each coefficient (sweep up) ...
    last = -VR;
    for (int k = 0; k < VR - NCOEF / 2; k++) if (have[k]) last = k - VR;
    for (int i = 0; i < NCOEF; i++) begin
      m = i - NCOEF / 2;
      if (have[m + VR]) last = m;
      below[i] = last;
    end
    // ... and at or above it (sweep down)
    last = VR - 1;
    for (int k = 2 * VR - 1; k >= VR + NCOEF / 2; k--) if (have[k]) last = k - VR;
    for (int i = NCOEF - 1; i >= 0; i--) begin
      m = i - NCOEF / 2;
      if (have[m + VR]) last = m;
      above[i] = last;
    end
    for (int i = 0; i < NCOEF; i++) begin
      m    = i - NCOEF / 2;
      best = (m - below[i] <= above[i] - m) ? below[i] : above[i];
      // the table is indexed by the coefficient's two's complement bits
      t[(i + NCOEF / 2) % NCOEF] = {rrm_sel_t'(sel_of[best + VR]), coef_t'(best), best == m};
    end
    return t;
  endfunction

  localparam map_table_t TABLE = build_table();

  always_comb begin
    {sel, coef_eff, covered} = TABLE[unsigned'(coef)];
  end

endmodule
