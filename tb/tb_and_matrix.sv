// tb_and_matrix -- self-checking test of the conjunctive matrix.
//
// A 3-input, 5-term personality covers the cases a matrix line can take:
// mixed true and complemented literals, a single literal, no literal
// (constant 1), both literals of one input (constant 0) and all inputs
// complemented. Every input combination is applied and each term is
// compared with the Boolean expression written out by hand.
module tb_and_matrix;
  localparam logic [1:5][1:3] TRUE = {3'b100, 3'b001, 3'b000, 3'b100, 3'b000};
  localparam logic [1:5][1:3] COMP = {3'b010, 3'b000, 3'b000, 3'b100, 3'b111};

  logic [1:3] in;
  logic [1:5] term, expect_term;
  int checks = 0, failures = 0;

  and_matrix #(.IN(3), .TERMS(5), .TRUE(TRUE), .COMP(COMP)) dut (.in(in), .term(term));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      in = 3'(v);
      #1;
      expect_term[1] = in[1] & ~in[2];            // a ~b
      expect_term[2] = in[3];                     // c
      expect_term[3] = 1'b1;                      // empty line
      expect_term[4] = 1'b0;                      // a ~a
      expect_term[5] = ~in[1] & ~in[2] & ~in[3];  // ~a ~b ~c
      checks++;
      if (term !== expect_term) begin
        failures++;
        $display("in=%b term=%b expected %b", in, term, expect_term);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
