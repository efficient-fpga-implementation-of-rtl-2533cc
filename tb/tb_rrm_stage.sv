// tb_rrm_stage: exhaustive-op, random-data check of both kinds of RRM basic
// structure (first stage and chain stage) against integer arithmetic.
module tb_rrm_stage;
  import iqc_pkg::*;
  localparam int W = 22;
  logic signed [W-1:0] a, b, y_first, y_chain;
  rrm_op_e op;
  int checks = 0, failures = 0;

  rrm_stage #(.W(W), .FIRST(1'b1)) dut_first (.a(a), .b(b), .op(op), .y(y_first));
  rrm_stage #(.W(W), .FIRST(1'b0)) dut_chain (.a(a), .b(b), .op(op), .y(y_chain));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ea, eb, ef, ec;
    for (int n = 0; n < 2000; n++) begin
      ea = longint'($urandom_range(0, 2**20)) - 2**19;
      eb = longint'($urandom_range(0, 2**20)) - 2**19;
      a  = W'(ea);
      b  = W'(eb);
      for (int o = 0; o < 4; o++) begin
        op = rrm_op_e'(o);
        #1;
        case (o)
          0: begin ef = 0;       ec = ea;      end
          1: begin ef = ea;      ec = ea + eb; end
          2: begin ef = eb;      ec = ea - eb; end
          default: begin ef = ea + eb; ec = eb - ea; end
        endcase
        checks += 2;
        if (longint'(y_first) != ef) begin
          failures++;
          if (failures < 10) $display("first: op=%0d a=%0d b=%0d y=%0d exp=%0d", o, ea, eb, y_first, ef);
        end
        if (longint'(y_chain) != ec) begin
          failures++;
          if (failures < 10) $display("chain: op=%0d a=%0d b=%0d y=%0d exp=%0d", o, ea, eb, y_chain, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
