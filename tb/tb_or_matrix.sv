// tb_or_matrix -- self-checking test of the disjunctive matrix.
//
// A 4-term, 3-output personality: one output ORs two terms, one takes a
// single term, one has no crossing point and must stay 0. Every term
// combination is applied and compared with hand-written expressions.
module tb_or_matrix;
  localparam logic [1:3][1:4] CONN = {4'b1010, 4'b0100, 4'b0000};

  logic [1:4] term;
  logic [1:3] out, expect_out;
  int checks = 0, failures = 0;

  or_matrix #(.TERMS(4), .OUT(3), .CONN(CONN)) dut (.term(term), .out(out));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      term = 4'(v);
      #1;
      expect_out = {term[1] | term[3], term[2], 1'b0};
      checks++;
      if (out !== expect_out) begin
        failures++;
        $display("term=%b out=%b expected %b", term, out, expect_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
