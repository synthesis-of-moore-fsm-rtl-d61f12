// tb_state_register -- self-checking test of the state register RG.
//
// Random codes are presented on d with start mostly low; after every clock
// edge the register must hold the code presented before the edge, or all
// zeros when start was high. The first cycles hold start high so that the
// register leaves its random power-up value.
module tb_state_register;
  localparam int unsigned R = 5;
  logic clk = 0, start;
  logic [1:R] d, z, model;
  int checks = 0, failures = 0, clears = 0;

  state_register dut (.clk(clk), .start(start), .d(d), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1;
    d = '1;
    model = '0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      start = (i < 2) || ($urandom_range(0, 7) == 0);
      d = R'($urandom);
      @(posedge clk);
      model = start ? '0 : d;
      if (start && d != '0) clears++;
      @(negedge clk);
      checks++;
      if (z !== model) begin
        failures++;
        $display("cycle %0d: z=%b expected %b", i, z, model);
      end
    end
    if (clears == 0) begin
      failures++;
      $display("start never cleared a non-zero code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
