// moore_fsm_u2 -- Moore FSM U2 with encoded collections of microoperations,
// built from conjunctive/disjunctive matrices.
//
// The state code is split into two fields, K(a_m) = K(Y_q) * K(b_q): the
// code of the collection of microoperations the state produces (z1..zR_Y)
// and a vertex code (the last R_ALPHA bits) that tells apart states with the
// same collection. Three matrix blocks surround the register RG:
//   BMO  (M7, M8)  y   = Y(z1..zR_Y)        microoperations, from the
//                                            collection field alone
//   BCT  (M9, M10) tau = tau(z)             class of pseudoequivalent states
//   BIMF (M5, M6)  D   = D(tau, x)          next state code
// BIMF sees classes, not states, so its table has as many rows as the
// equivalent Mealy FSM. BMO and BCT work side by side on the register
// output, so the path from RG back to RG is BCT then BIMF.
//
// Interface: clk, start (synchronous clear to the code of a1, all zeros),
// x[1:L] logic conditions; y[1:N] microoperations of the present state,
// z the present state code and tau its class code, both for observation.
// One state transition per clock edge; y changes only after a clock edge.
// The defaults implement the example algorithm Gamma_1 (8 states, 5 state
// flip-flops, 9 table rows).
module moore_fsm_u2
#(
  parameter int unsigned L       = u2_gamma1_pkg::L,
  parameter int unsigned N       = u2_gamma1_pkg::N,
  parameter int unsigned R_B     = u2_gamma1_pkg::R_B,
  parameter int unsigned R_Y     = u2_gamma1_pkg::R_Y,
  parameter int unsigned R_ALPHA = u2_gamma1_pkg::R_ALPHA,
  parameter int unsigned H0      = u2_gamma1_pkg::H0,
  parameter int unsigned T_Y     = u2_gamma1_pkg::T_Y,
  parameter int unsigned H_P     = u2_gamma1_pkg::H_P,
  parameter logic [1:H0][1:L+R_B]          M5_TRUE  = u2_gamma1_pkg::M5_TRUE,
  parameter logic [1:H0][1:L+R_B]          M5_COMP  = u2_gamma1_pkg::M5_COMP,
  parameter logic [1:R_Y+R_ALPHA][1:H0]    M6_CONN  = u2_gamma1_pkg::M6_CONN,
  parameter logic [1:T_Y][1:R_Y]           M7_TRUE  = u2_gamma1_pkg::M7_TRUE,
  parameter logic [1:T_Y][1:R_Y]           M7_COMP  = u2_gamma1_pkg::M7_COMP,
  parameter logic [1:N][1:T_Y]             M8_CONN  = u2_gamma1_pkg::M8_CONN,
  parameter logic [1:H_P][1:R_Y+R_ALPHA]   M9_TRUE  = u2_gamma1_pkg::M9_TRUE,
  parameter logic [1:H_P][1:R_Y+R_ALPHA]   M9_COMP  = u2_gamma1_pkg::M9_COMP,
  parameter logic [1:R_B][1:H_P]           M10_CONN = u2_gamma1_pkg::M10_CONN
) (
  input  logic                   clk,
  input  logic                   start,
  input  logic [1:L]             x,
  output logic [1:N]             y,
  output logic [1:R_Y+R_ALPHA]   z,
  output logic [1:R_B]           tau
);

  localparam int unsigned R = R_Y + R_ALPHA;

  logic [1:R]  d;
  logic [1:H0] f;

  bimf #(
    .L_X(L), .RB(R_B), .RD(R), .ROWS(H0),
    .F_TRUE(M5_TRUE), .F_COMP(M5_COMP), .D_CONN(M6_CONN)
  ) u_bimf (.x(x), .tau(tau), .f(f), .d(d));

  state_register #(.R(R)) u_rg (.clk(clk), .start(start), .d(d), .z(z));

  bmo #(
    .RY(R_Y), .NY(N), .TERMS(T_Y),
    .T_TRUE(M7_TRUE), .T_COMP(M7_COMP), .Y_CONN(M8_CONN)
  ) u_bmo (.zy(z[1:R_Y]), .y(y));

  bct #(
    .RZ(R), .RB(R_B), .TERMS(H_P),
    .A_TRUE(M9_TRUE), .A_COMP(M9_COMP), .TAU_CONN(M10_CONN)
  ) u_bct (.z(z), .tau(tau));

  // In a well-formed table exactly one row fires in every class, whatever
  // the logic conditions are: the rows of a class are an orthogonal and
  // complete set of conditions.
  assert property (@(posedge clk) disable iff (start) $onehot(f))
    else $error("moore_fsm_u2: %0d transition rows active for tau=%b x=%b",
                $countones(f), tau, x);

endmodule
