// Self-checking testbench for walk_register: random presses and clears
// against a one-bit reference model (set has priority over clear, reset
// clears), plus a directed hold-until-cleared sequence.
module tb_walk_register;
  logic clk = 1'b0, reset, wr_sync, wr_reset, wr;
  logic model;
  int checks = 0, failures = 0;

  walk_register dut (.clk, .reset, .wr_sync, .wr_reset, .wr);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic s, input logic c);
    @(negedge clk);
    reset = r; wr_sync = s; wr_reset = c;
    @(posedge clk);
    if (r) model = 1'b0;
    else if (s) model = 1'b1;
    else if (c) model = 1'b0;
    #1;
    checks++;
    if (wr !== model) begin
      failures++;
      $display("mismatch r=%b s=%b c=%b: wr=%b expected %b", r, s, c, wr, model);
    end
  endtask

  initial begin
    model = 1'b0;
    step(1, 0, 0);
    step(0, 0, 0);
    // a short press is held for many cycles until cleared
    step(0, 1, 0);
    repeat (20) step(0, 0, 0);
    step(0, 0, 1);
    step(0, 0, 0);
    // press coincident with clear survives
    step(0, 1, 0);
    step(0, 1, 1);
    step(0, 0, 0);
    for (int n = 0; n < 400; n++)
      step(($urandom % 50) == 0, ($urandom % 6) == 0, ($urandom % 5) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
