// tb_bct -- self-checking test of the code transformer.
//
// Each of the eight state codes of Gamma_1 is applied; the block must
// return the code of the class of pseudoequivalent states of that state.
module tb_bct;
  import gamma1_ref_pkg::*;

  logic [1:5] z;
  logic [1:2] tau;
  int checks = 0, failures = 0;

  bct dut (.z(z), .tau(tau));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      z = state_code(state_t'(s));
      #1;
      checks++;
      if (tau !== class_code(state_t'(s))) begin
        failures++;
        $display("state a%0d z=%b: tau=%b expected %b", s + 1, z, tau, class_code(state_t'(s)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
