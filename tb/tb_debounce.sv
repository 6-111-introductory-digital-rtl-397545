// Self-checking testbench for debounce at STABLE_CYCLES = 10. After reset
// the output takes the input. Bursts of bounce whose pieces are each
// shorter than the stability time must never reach the output; a level
// that then holds must reach it exactly STABLE_CYCLES + 2 clock edges after
// it appears (two synchronizer flops, then STABLE_CYCLES of counting).
module tb_debounce;
  localparam int N = 10;
  logic clk = 1'b0, reset, noisy_in, clean_out;
  int checks = 0, failures = 0;
  logic expect_out;

  debounce #(.STABLE_CYCLES(N)) dut (.clk, .reset, .noisy_in, .clean_out);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hold noisy_in at lvl for len edges, checking the output stays put
  task automatic hold_and_check(input logic lvl, input int len);
    @(negedge clk) noisy_in = lvl;
    for (int k = 0; k < len; k++) begin
      @(posedge clk); #1;
      checks++;
      if (clean_out !== expect_out) begin
        failures++; $display("bounce leaked: out=%b expected %b", clean_out, expect_out);
      end
      if (k < len - 1) @(negedge clk);
    end
  endtask

  task automatic settle_to(input logic lvl);
    int k;
    @(negedge clk) noisy_in = lvl;
    k = 0;
    do begin
      @(posedge clk); #1; k++;
    end while (clean_out !== lvl && k < 4 * N);
    checks++;
    if (k != N + 2) begin
      failures++; $display("transition to %b took %0d edges, expected %0d", lvl, k, N + 2);
    end
    expect_out = lvl;
  endtask

  initial begin
    noisy_in = 1'b0;
    reset = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    expect_out = 1'b0;
    #1 checks++;
    if (clean_out !== 1'b0) begin failures++; $display("output not 0 after reset"); end
    for (int rep = 0; rep < 20; rep++) begin
      // bounce: alternating pieces of 1..N-3 edges (plus the 2-flop delay
      // they stay under N) starting away from the current output
      for (int b = 0; b < 6; b++) begin
        hold_and_check(~expect_out, 1 + $urandom % (N - 3));
        hold_and_check(expect_out, 1 + $urandom % (N - 3));
      end
      settle_to(~expect_out);
      hold_and_check(expect_out, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
