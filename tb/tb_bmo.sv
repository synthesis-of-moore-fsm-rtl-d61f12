// tb_bmo -- self-checking test of the block of microoperations.
//
// The collection field z1..z3 of each of the eight state codes of Gamma_1
// is applied; the block must produce the microoperations of that state.
module tb_bmo;
  import gamma1_ref_pkg::*;

  logic [1:3] zy;
  logic [1:4] y;
  logic [1:5] code;
  int checks = 0, failures = 0;

  bmo dut (.zy(zy), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      code = state_code(state_t'(s));
      zy = code[1:3];
      #1;
      checks++;
      if (y !== outputs(state_t'(s))) begin
        failures++;
        $display("state a%0d z=%b: y=%b expected %b", s + 1, code, y, outputs(state_t'(s)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
