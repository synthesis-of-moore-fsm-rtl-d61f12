// tb_moore_fsm_u2 -- end-to-end test of the Moore FSM U2 interpreting Gamma_1.
//
// The FSM runs with its default parameters. Start is pulsed, then random
// logic conditions are applied for several hundred clock cycles, with a few
// more Start pulses in the middle of a run. A behavioural model of the
// algorithm is stepped alongside; after every clock edge the test compares
// the microoperations y, the state code z and the class code tau with the
// model. Each transition takes exactly one clock, so y is checked on the
// cycle right after the edge.
// Counted mechanisms: clears by Start, each of the nine rows of the
// transformed transition table, each of the four classes of
// pseudoequivalent states, and complete runs of the algorithm (a1 back to
// a1). A mechanism that never happened counts as a failure.
module tb_moore_fsm_u2;
  import gamma1_ref_pkg::*;

  logic clk = 0, start;
  logic [1:4] x, y;
  logic [1:5] z;
  logic [1:2] tau;
  state_t model;
  int checks = 0, failures = 0;
  int clears = 0, runs = 0;
  int row_hits[1:9];
  int class_hits[0:3];

  moore_fsm_u2 dut (.clk(clk), .start(start), .x(x), .y(y), .z(z), .tau(tau));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string where);
    checks++;
    if (y !== outputs(model) || z !== state_code(model) || tau !== class_code(model)) begin
      failures++;
      $display("%s: state a%0d: y=%b z=%b tau=%b, expected y=%b z=%b tau=%b", where,
               int'(model) + 1, y, z, tau, outputs(model), state_code(model), class_code(model));
    end
  endtask

  initial begin
    foreach (row_hits[i]) row_hits[i] = 0;
    foreach (class_hits[i]) class_hits[i] = 0;
    start = 1;
    x = '0;
    @(posedge clk);
    model = A1;
    clears++;
    @(negedge clk);
    compare("after start");
    for (int cyc = 0; cyc < 800; cyc++) begin
      start = (cyc % 97 == 50);
      x = 4'($urandom);
      @(posedge clk);
      if (start) begin
        model = A1;
        clears++;
      end else begin
        row_hits[row_of(model, x)]++;
        class_hits[class_code(model)]++;
        if (model inside {A7, A8}) runs++;
        model = next_state(model, x);
      end
      @(negedge clk);
      compare($sformatf("cycle %0d", cyc));
    end
    start = 0;

    if (clears < 2) begin
      failures++;
      $display("Start cleared the register only %0d times", clears);
    end
    foreach (row_hits[i]) begin
      $display("table row %0d taken %0d times", i, row_hits[i]);
      if (row_hits[i] == 0) begin
        failures++;
        $display("table row %0d never taken", i);
      end
    end
    foreach (class_hits[i]) begin
      $display("class code %b seen %0d times", 2'(i), class_hits[i]);
      if (class_hits[i] == 0) begin
        failures++;
        $display("class code %b never seen", 2'(i));
      end
    end
    $display("clears %0d, complete runs of the algorithm %0d", clears, runs);
    if (runs == 0) begin
      failures++;
      $display("no run of the algorithm completed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
