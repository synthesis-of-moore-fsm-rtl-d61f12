// or_matrix -- disjunctive matrix of a matrix-structured (PLA-style) FSM.
//
// Output o is the OR of the terms whose crossing point CONN[o][t] is set.
// An output with no crossing point is constant 0. The personality has
// TERMS*OUT crossing points, the area figure used for such a matrix.
//
// Interface: term[1:TERMS] inputs, out[1:OUT] outputs; purely
// combinational, one OR level. This matrix is used for M6 (input memory
// functions D1..D5), M8 (microoperations) and M10 (class variables tau).
// The default personality is M6 of the example algorithm Gamma_1.
module or_matrix #(
  parameter int unsigned TERMS = u2_gamma1_pkg::H0,
  parameter int unsigned OUT   = u2_gamma1_pkg::R,
  parameter logic [1:OUT][1:TERMS] CONN = u2_gamma1_pkg::M6_CONN
) (
  input  logic [1:TERMS] term,
  output logic [1:OUT]   out
);

  always_comb begin
    for (int unsigned o = 1; o <= OUT; o++) begin
      out[o] = |(CONN[o] & term);
    end
  end

endmodule
