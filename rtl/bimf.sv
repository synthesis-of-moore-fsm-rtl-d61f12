// bimf -- block of input memory functions (BIMF) of the Moore FSM U2.
//
// BIMF is the transformed transition table in matrix form. The conjunctive
// matrix M5 forms one term F_h per table row, the AND of the row's class
// code K(B_i) on tau and its condition X_h on the logic conditions x. The
// disjunctive matrix M6 ORs the terms into the input memory functions
// D1..DR: D_r collects every row whose next-state code has bit r set.
// Because the table is indexed by classes of pseudoequivalent states rather
// than by states, it has as many rows as the equivalent Mealy machine.
//
// Interface: x[1:L], tau[1:R_B] in; d[1:R_Y+R_ALPHA] out, the code to be
// loaded into RG; f[1:H0] exposes the row terms. Combinational, two levels.
// Default sizes and personalities are those of the example algorithm
// Gamma_1 (9 rows, 5 functions).
module bimf
#(
  parameter int unsigned L_X  = u2_gamma1_pkg::L,
  parameter int unsigned RB   = u2_gamma1_pkg::R_B,
  parameter int unsigned RD   = u2_gamma1_pkg::R,
  parameter int unsigned ROWS = u2_gamma1_pkg::H0,
  parameter logic [1:ROWS][1:L_X+RB] F_TRUE = u2_gamma1_pkg::M5_TRUE,
  parameter logic [1:ROWS][1:L_X+RB] F_COMP = u2_gamma1_pkg::M5_COMP,
  parameter logic [1:RD][1:ROWS]     D_CONN = u2_gamma1_pkg::M6_CONN
) (
  input  logic [1:L_X]  x,
  input  logic [1:RB]   tau,
  output logic [1:ROWS] f,
  output logic [1:RD]   d
);

  and_matrix #(.IN(L_X + RB), .TERMS(ROWS), .TRUE(F_TRUE), .COMP(F_COMP))
    m5 (.in({x, tau}), .term(f));

  or_matrix #(.TERMS(ROWS), .OUT(RD), .CONN(D_CONN))
    m6 (.term(f), .out(d));

endmodule
