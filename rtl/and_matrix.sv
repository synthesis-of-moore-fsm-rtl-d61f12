// and_matrix -- conjunctive matrix of a matrix-structured (PLA-style) FSM.
//
// Each of the TERMS horizontal lines forms the AND of the literals selected
// for it. The personality is two masks per term: bit i of TRUE[t] puts the
// uncomplemented input in[i] on term t, bit i of COMP[t] puts its complement
// there. A term with no literal selected is constant 1; a term with both
// literals of one input is constant 0. The personality has 2*IN*TERMS
// crossing points, which is the area figure used for such a matrix.
//
// Interface: in[1:IN] inputs, term[1:TERMS] outputs; purely combinational,
// one AND level. This matrix is used for M5 (terms of the transition
// table), M7 (terms of the microoperations) and M9 (terms of the code
// transformer). The mask-pair representation is this design's own; the
// default personality is M5 of the example algorithm Gamma_1.
module and_matrix #(
  parameter int unsigned IN    = u2_gamma1_pkg::L + u2_gamma1_pkg::R_B,
  parameter int unsigned TERMS = u2_gamma1_pkg::H0,
  parameter logic [1:TERMS][1:IN] TRUE = u2_gamma1_pkg::M5_TRUE,
  parameter logic [1:TERMS][1:IN] COMP = u2_gamma1_pkg::M5_COMP
) (
  input  logic [1:IN]    in,
  output logic [1:TERMS] term
);

  always_comb begin
    for (int unsigned t = 1; t <= TERMS; t++) begin
      // a selected literal that is 0 kills the term
      term[t] = ~|((TRUE[t] & ~in) | (COMP[t] & in));
    end
  end

endmodule
