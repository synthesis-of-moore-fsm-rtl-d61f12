// bmo -- block of microoperations (BMO) of the Moore FSM U2.
//
// BMO decodes the microoperations from the collection field z1..zR_Y of the
// state code only; the vertex field does not enter it. The conjunctive
// matrix M7 forms the terms Delta_q, the disjunctive matrix M8 ORs them into
// y1..yN. Since the collection codes are chosen freely (they do not depend
// on the state codes), unused codes act as don't-cares and, in the example,
// each microoperation shrinks to a single term, so M8 reduces to wiring:
//   y1 = z2 ~z3   y2 = ~z1 z2 ~z3   y3 = z1   y4 = ~z1 z3
//
// Interface: zy[1:R_Y] in, y[1:N] out. Combinational; this is a Moore
// output, so y is stable for the whole clock period that the state lasts.
module bmo
#(
  parameter int unsigned RY    = u2_gamma1_pkg::R_Y,
  parameter int unsigned NY    = u2_gamma1_pkg::N,
  parameter int unsigned TERMS = u2_gamma1_pkg::T_Y,
  parameter logic [1:TERMS][1:RY] T_TRUE = u2_gamma1_pkg::M7_TRUE,
  parameter logic [1:TERMS][1:RY] T_COMP = u2_gamma1_pkg::M7_COMP,
  parameter logic [1:NY][1:TERMS] Y_CONN = u2_gamma1_pkg::M8_CONN
) (
  input  logic [1:RY] zy,
  output logic [1:NY] y
);

  logic [1:TERMS] delta;

  and_matrix #(.IN(RY), .TERMS(TERMS), .TRUE(T_TRUE), .COMP(T_COMP))
    m7 (.in(zy), .term(delta));

  or_matrix #(.TERMS(TERMS), .OUT(NY), .CONN(Y_CONN))
    m8 (.term(delta), .out(y));

endmodule
