// Self-checking testbench for time_parameters: the reset defaults 6, 3, 2,
// then random reprogramming (including writes to the unused address 3)
// compared with an array model, reading every address after every step.
module tb_time_parameters;
  import tlc_pkg::*;
  logic clk = 1'b0, reset, prog;
  logic [1:0] selector;
  logic [3:0] time_value, value;
  interval_e interval;
  logic [3:0] model [3];
  int checks = 0, failures = 0;

  time_parameters dut (.clk, .reset, .prog, .selector, .time_value, .interval, .value);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 4; a++) begin
      interval = interval_e'(a);
      #1;
      checks++;
      if (value !== ((a < 3) ? model[a] : 4'd0)) begin
        failures++;
        $display("addr %0d: got %0d expected %0d", a, value, (a < 3) ? model[a] : 4'd0);
      end
    end
  endtask

  initial begin
    prog = 1'b0; selector = '0; time_value = '0; interval = INT_BASE;
    @(negedge clk); reset = 1'b1;
    @(negedge clk); reset = 1'b0;
    model[0] = 4'd6; model[1] = 4'd3; model[2] = 4'd2;
    check_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      reset = ($urandom % 97) == 0;
      prog = ($urandom % 3) == 0;
      selector = 2'($urandom);
      time_value = 4'($urandom);
      @(posedge clk);
      if (reset) begin
        model[0] = 4'd6; model[1] = 4'd3; model[2] = 4'd2;
      end else if (prog && selector != 2'd3) model[selector] = time_value;
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
