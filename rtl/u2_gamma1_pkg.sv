// u2_gamma1_pkg -- sizes and matrix personalities of the Moore FSM U2 that
// interprets the example graph-scheme of algorithm Gamma_1.
//
// Gamma_1 has eight states a1..a8, logic conditions x1..x4 and
// microoperations y1..y4. Its operator vertices carry five different
// collections of microoperations (CMO):
//   Y1 = {}, Y2 = {y1,y2}, Y3 = {y3}, Y4 = {y4}, Y5 = {y1,y3}
// coded on z1 z2 z3 as  Y1=000  Y2=010  Y3=111  Y4=011  Y5=110.
// A state code is the concatenation  K(a_m) = K(Y_q) * K(b_q), where the
// vertex code K(b_q) (z4 z5) only has to tell apart vertices with the same
// collection:
//   a1=000.00  a2=010.00  a3=111.00  a4=011.00
//   a5=010.01  a6=110.01  a7=011.10  a8=010.10
// The pseudoequivalent classes are coded on tau1 tau2:
//   B1={a1}=01  B2={a2,a3,a4}=00  B3={a5,a6}=10  B4={a7,a8}=11
//
// A conjunctive (AND) matrix personality is two masks per term: TRUE marks
// the inputs that enter the term uncomplemented, COMP those that enter it
// complemented. A disjunctive (OR) matrix personality holds, per output,
// one bit per term. All vectors use ascending ranges so that bit [1] is
// variable number 1 and a literal such as 6'b1000_01 reads x1 x2 x3 x4 tau1 tau2.
//
// The class codes, the CMO codes, the vertex codes and the transition table
// follow the published example; the codes of a7 and a8 are those that the
// concatenation rule gives for the vertices the algorithm places in them
// (a7: vertex b6 with {y4}, a8: vertex b7 with {y1,y2}).
package u2_gamma1_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int unsigned L       = 4;  // logic conditions x1..x4
  localparam int unsigned N       = 4;  // microoperations y1..y4
  localparam int unsigned R_B     = 2;  // class code width, tau1 tau2
  localparam int unsigned R_Y     = 3;  // CMO code width, z1..z3
  localparam int unsigned R_ALPHA = 2;  // vertex code width, z4 z5
  localparam int unsigned R       = R_Y + R_ALPHA;  // flip-flops in RG
  localparam int unsigned H0      = 9;  // rows of the transformed table
  localparam int unsigned T_Y     = 4;  // terms Delta_1..Delta_4 of BMO
  localparam int unsigned H_P     = 3;  // terms of the code transformer

  // ---- state codes (z1..z5) -----------------------------------------------
  typedef logic [1:R] code_t;
  localparam code_t K_A1 = 5'b000_00;
  localparam code_t K_A2 = 5'b010_00;
  localparam code_t K_A3 = 5'b111_00;
  localparam code_t K_A4 = 5'b011_00;
  localparam code_t K_A5 = 5'b010_01;
  localparam code_t K_A6 = 5'b110_01;
  localparam code_t K_A7 = 5'b011_10;
  localparam code_t K_A8 = 5'b010_10;

  // ---- BIMF: matrix M5 (terms F1..F9 over x1 x2 x3 x4 tau1 tau2) -----------
  //  h  class  K(B)  condition       next  K(a_s)
  //  1  B1     01    x1              a2    010.00
  //  2  B1     01    ~x1 x2          a3    111.00
  //  3  B1     01    ~x1 ~x2         a4    011.00
  //  4  B2     00    x3 x2           a5    010.01
  //  5  B2     00    x3 ~x2          a6    110.01
  //  6  B2     00    ~x3 x4          a7    011.10
  //  7  B2     00    ~x3 ~x4         a8    010.10
  //  8  B3     10    1               a2    010.00
  //  9  B4     11    1               a1    000.00
  localparam logic [1:H0][1:L+R_B] M5_TRUE = {
    6'b1000_01,  // F1
    6'b0100_01,  // F2
    6'b0000_01,  // F3
    6'b0110_00,  // F4
    6'b0010_00,  // F5
    6'b0001_00,  // F6
    6'b0000_00,  // F7
    6'b0000_10,  // F8
    6'b0000_11   // F9
  };
  localparam logic [1:H0][1:L+R_B] M5_COMP = {
    6'b0000_10,  // F1
    6'b1000_10,  // F2
    6'b1100_10,  // F3
    6'b0000_11,  // F4
    6'b0100_11,  // F5
    6'b0010_11,  // F6
    6'b0011_11,  // F7
    6'b0000_01,  // F8
    6'b0000_00   // F9
  };
  // ---- BIMF: matrix M6 (D1..D5 over F1..F9) -------------------------------
  // Column h of the matrix is the code K(a_s) of row h of the table above.
  localparam logic [1:R][1:H0] M6_CONN = {
    9'b010_010_000,  // D1 = F2 v F5
    9'b111_111_110,  // D2 = F1 v ... v F8
    9'b011_001_000,  // D3 = F2 v F3 v F6
    9'b000_001_100,  // D4 = F6 v F7
    9'b000_110_000   // D5 = F4 v F5
  };

  // ---- BMO: matrix M7 (terms Delta_1..Delta_4 over z1 z2 z3) --------------
  //  Delta_1 = z2 ~z3       Delta_2 = ~z1 z2 ~z3
  //  Delta_3 = z1           Delta_4 = ~z1 z3
  localparam logic [1:T_Y][1:R_Y] M7_TRUE = {3'b010, 3'b010, 3'b100, 3'b001};
  localparam logic [1:T_Y][1:R_Y] M7_COMP = {3'b001, 3'b101, 3'b000, 3'b100};
  // ---- BMO: matrix M8 (y1..y4 over Delta_1..Delta_4) ----------------------
  // Every microoperation is a single term here, so M8 is a one-to-one wiring.
  localparam logic [1:N][1:T_Y] M8_CONN = {4'b1000, 4'b0100, 4'b0010, 4'b0001};

  // ---- BCT: matrix M9 (terms over z1..z5) ---------------------------------
  //  t1 = z4   t2 = z5   t3 = ~z2
  localparam logic [1:H_P][1:R] M9_TRUE = {5'b000_10, 5'b000_01, 5'b000_00};
  localparam logic [1:H_P][1:R] M9_COMP = {5'b000_00, 5'b000_00, 5'b010_00};
  // ---- BCT: matrix M10 (tau1 tau2 over t1..t3) ----------------------------
  //  tau1 = z4 v z5 (B3 v B4)     tau2 = z4 v ~z2 (B1 v B4)
  localparam logic [1:R_B][1:H_P] M10_CONN = {3'b110, 3'b101};

endpackage
