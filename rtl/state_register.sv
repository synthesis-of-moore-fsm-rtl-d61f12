// state_register -- the state register RG of the Moore FSM.
//
// R D flip-flops hold the state code z1..zR. On every rising clock edge RG
// loads the input memory functions d (D1..DR) produced by BIMF; while
// start is high it loads the all-zero code instead, which is the code of
// the initial state a1. The register is controlled only by Start (clearing)
// and Clock, as in the matrix FSM structures; making the clear synchronous
// and giving it priority over d are this design's choices.
//
// Interface: clk, start, d[1:R] in; z[1:R] out, valid one clock after the
// edge that loaded it.
module state_register #(
  parameter int unsigned R = 5
) (
  input  logic        clk,
  input  logic        start,
  input  logic [1:R]  d,
  output logic [1:R]  z
);

  always_ff @(posedge clk) begin
    if (start) z <= '0;
    else       z <= d;
  end

endmodule
