// rrm_stage: one reconfigurable basic structure of the reduced range
// multiplier (RRM).
//
// The structure is a single adder/subtractor whose operation is chosen by the
// two select lines S1,S0 (the 2-bit op input). On an FPGA each result bit is
// one 4-input LUT (A_i, B_i, S1, S0) feeding the carry chain. Input a is the
// result of the previous stage (or the unshifted data in the first stage) and
// b is the data word shifted left by this stage's amount.
//   FIRST = 1 : op 0 -> 0,  1 -> a,    2 -> b,    3 -> a + b
//   FIRST = 0 : op 0 -> a,  1 -> a + b, 2 -> a - b, 3 -> b - a
// The four-stage chain, the select lines and the shifted data inputs follow
// the RRM description; the exact operation set of each structure is this
// design's choice. Purely combinational; W must be wide enough that no sum
// overflows (the RRM sizes it for that).
module rrm_stage
  import iqc_pkg::*;
#(
  parameter int W     = WD_RRM,
  parameter bit FIRST = 1'b0
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  rrm_op_e             op,
  output logic signed [W-1:0] y
);

  always_comb begin
    if (FIRST) begin
      unique case (op)
        OP0:     y = '0;
        OP1:     y = a;
        OP2:     y = b;
        default: y = a + b;
      endcase
    end else begin
      unique case (op)
        OP0:     y = a;
        OP1:     y = a + b;
        OP2:     y = a - b;
        default: y = b - a;
      endcase
    end
  end

endmodule
