// Self-checking testbench for divider at CLK_HZ = 7: the enable must be one
// clock wide, the first pulse must come 7 clocks after reset, and every
// later pulse exactly 7 clocks after the previous one.
module tb_divider;
  localparam int HZ = 7;
  logic clk = 1'b0, reset, one_hz_enable;
  int checks = 0, failures = 0;
  int cyc, last;

  divider #(.CLK_HZ(HZ)) dut (.clk, .reset, .one_hz_enable);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    cyc = 0; last = 0;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk);
      cyc++;
      #1;
      if (one_hz_enable) begin
        checks++;
        if (cyc - last != HZ) begin
          failures++;
          $display("pulse at %0d, previous at %0d: period %0d expected %0d", cyc, last, cyc - last, HZ);
        end
        last = cyc;
      end
    end
    checks++;
    if (last == 0) begin
      failures++;
      $display("no enable pulse seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
