// tb_bimf -- self-checking test of the block of input memory functions.
//
// For every class code tau and every combination of x1..x4 the block must
// produce the code of the state that Gamma_1 moves to, and exactly one
// transition-table row term must be active (the one the reference names).
module tb_bimf;
  import gamma1_ref_pkg::*;

  logic [1:4] x;
  logic [1:2] tau;
  logic [1:9] f;
  logic [1:5] d;
  int checks = 0, failures = 0;
  state_t rep;
  state_t rep_list[4] = '{A1, A2, A5, A7};

  bimf dut (.x(x), .tau(tau), .f(f), .d(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // one representative state per class: a1 (B1), a2 (B2), a5 (B3), a7 (B4)
    foreach (rep_list[i]) begin
      rep = rep_list[i];
      for (int v = 0; v < 16; v++) begin
        tau = class_code(rep);
        x = 4'(v);
        #1;
        checks++;
        if (d !== state_code(next_state(rep, x))) begin
          failures++;
          $display("tau=%b x=%b: d=%b expected %b", tau, x, d, state_code(next_state(rep, x)));
        end
        checks++;
        if (f !== (9'b1_0000_0000 >> (row_of(rep, x) - 1))) begin
          failures++;
          $display("tau=%b x=%b: rows %b, expected only row %0d", tau, x, f, row_of(rep, x));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
