// gamma1_ref_pkg -- behavioural reference of the control algorithm Gamma_1,
// written from the graph-scheme of the algorithm, not from the matrices.
//
// Gamma_1 (states a1..a8, conditions x1..x4, microoperations y1..y4):
//   a1 (start/end, no microoperation): x1 -> a2; ~x1 x2 -> a3; ~x1 ~x2 -> a4
//   a2 {y1 y2}, a3 {y3}, a4 {y4}:      x3 x2 -> a5; x3 ~x2 -> a6;
//                                      ~x3 x4 -> a7; ~x3 ~x4 -> a8
//   a5 {y1 y2}, a6 {y1 y3}:            -> a2
//   a7 {y4},    a8 {y1 y2}:            -> a1 (end of the algorithm)
// The functions also give, for each state, the class of pseudoequivalent
// states, its class code, its state code and the transition-table row
// taken, so that testbenches can check every level of the FSM.
package gamma1_ref_pkg;
  typedef enum logic [2:0] {A1, A2, A3, A4, A5, A6, A7, A8} state_t;

  function automatic state_t next_state(state_t s, logic [1:4] x);
    case (s)
      A1:             return x[1] ? A2 : (x[2] ? A3 : A4);
      A2, A3, A4:     return x[3] ? (x[2] ? A5 : A6) : (x[4] ? A7 : A8);
      A5, A6:         return A2;
      default:        return A1;  // A7, A8
    endcase
  endfunction

  // transition-table row (1..9) that the move out of s under x uses
  function automatic int row_of(state_t s, logic [1:4] x);
    case (s)
      A1:         return x[1] ? 1 : (x[2] ? 2 : 3);
      A2, A3, A4: return x[3] ? (x[2] ? 4 : 5) : (x[4] ? 6 : 7);
      A5, A6:     return 8;
      default:    return 9;
    endcase
  endfunction

  // microoperations y1..y4 produced in state s
  function automatic logic [1:4] outputs(state_t s);
    case (s)
      A1:      return 4'b0000;
      A2, A5:  return 4'b1100;
      A3:      return 4'b0010;
      A4, A7:  return 4'b0001;
      A6:      return 4'b1010;
      default: return 4'b1100;  // A8
    endcase
  endfunction

  // class code K(B_i), tau1 tau2: B1=01, B2=00, B3=10, B4=11
  function automatic logic [1:2] class_code(state_t s);
    case (s)
      A1:         return 2'b01;
      A2, A3, A4: return 2'b00;
      A5, A6:     return 2'b10;
      default:    return 2'b11;
    endcase
  endfunction

  // state code z1..z5 = K(Y_q) * K(b_q)
  function automatic logic [1:5] state_code(state_t s);
    case (s)
      A1:      return 5'b000_00;
      A2:      return 5'b010_00;
      A3:      return 5'b111_00;
      A4:      return 5'b011_00;
      A5:      return 5'b010_01;
      A6:      return 5'b110_01;
      A7:      return 5'b011_10;
      default: return 5'b010_10;  // A8
    endcase
  endfunction
endpackage
