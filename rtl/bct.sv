// bct -- block of the code transformer (BCT) of the Moore FSM U2.
//
// BCT turns a full state code z1..zR into the code K(B_i) of the class of
// pseudoequivalent states the state belongs to, on the variables tau. The
// conjunctive matrix M9 forms terms over the state code, the disjunctive
// matrix M10 ORs the terms of the states of class B_i into the tau bits
// that are 1 in K(B_i). With the example's codes each class is a single
// literal (B1 = ~z2, B2 = z2 ~z4 ~z5, B3 = z5, B4 = z4), so M9 only passes
// literals:  tau1 = z4 v z5,  tau2 = z4 v ~z2.
//
// Interface: z[1:R] in, tau[1:R_B] out. Combinational; it works in parallel
// with BMO, so both outputs settle after the same two levels.
module bct
#(
  parameter int unsigned RZ    = u2_gamma1_pkg::R,
  parameter int unsigned RB    = u2_gamma1_pkg::R_B,
  parameter int unsigned TERMS = u2_gamma1_pkg::H_P,
  parameter logic [1:TERMS][1:RZ] A_TRUE = u2_gamma1_pkg::M9_TRUE,
  parameter logic [1:TERMS][1:RZ] A_COMP = u2_gamma1_pkg::M9_COMP,
  parameter logic [1:RB][1:TERMS] TAU_CONN = u2_gamma1_pkg::M10_CONN
) (
  input  logic [1:RZ] z,
  output logic [1:RB] tau
);

  logic [1:TERMS] a;

  and_matrix #(.IN(RZ), .TERMS(TERMS), .TRUE(A_TRUE), .COMP(A_COMP))
    m9 (.in(z), .term(a));

  or_matrix #(.TERMS(TERMS), .OUT(RB), .CONN(TAU_CONN))
    m10 (.term(a), .out(tau));

endmodule
