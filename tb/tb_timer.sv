// Self-checking testbench for timer. The 1 Hz enable is a one-clock pulse
// every P = 5 clocks, driven here. For every interval value 0..15 (and
// random repeats) the timer is started at a random phase; expired must rise
// right after the clock edge that samples the value-th enable after the
// start (right after the start edge for value 0), stay high one clock, and
// be low at every other edge. A start in the middle of a long interval must
// abandon it.
module tb_timer;
  localparam int P = 5;
  logic clk = 1'b0, reset, start_timer, one_hz_enable;
  logic [3:0] value;
  logic expired;
  int checks = 0, failures = 0;
  int phase = 0;

  timer dut (.clk, .reset, .start_timer, .one_hz_enable, .value, .expired);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive the enable for the coming edge
  task automatic drive_enable();
    one_hz_enable = (phase == P - 1);
    phase = (phase + 1) % P;
  endtask

  // start with v, then check edges until the expiry and a few after
  // abandon_after > 0: restart with 4'd2 after that many edges
  task automatic run_interval(input logic [3:0] v, input int abandon_after);
    int seen, edges;
    bit done;
    logic [3:0] cur;
    cur = v;
    @(negedge clk);
    start_timer = 1'b1; value = v; drive_enable();
    @(posedge clk);
    #1;
    seen = 0; edges = 0; done = (cur == 0);
    checks++;
    if (expired !== (cur == 0)) begin
      failures++; $display("v=%0d: expired=%b right after start", cur, expired);
    end
    forever begin
      @(negedge clk);
      start_timer = 1'b0; value = 4'($urandom); drive_enable();
      if (abandon_after > 0 && edges == abandon_after) begin
        start_timer = 1'b1; value = 4'd2; cur = 4'd2; seen = 0; done = 0;
      end
      @(posedge clk);
      edges++;
      if (start_timer) begin
        #1; checks++;
        if (expired !== 1'b0) begin failures++; $display("expired at restart"); end
        continue;
      end
      if (!done && one_hz_enable) seen++;
      #1;
      checks++;
      if (!done && seen == int'(cur)) begin
        if (expired !== 1'b1) begin
          failures++; $display("v=%0d: no expired after enable %0d", cur, seen);
        end
        done = 1;
        repeat (3) begin
          @(negedge clk); start_timer = 1'b0; drive_enable();
          @(posedge clk); #1; checks++;
          if (expired !== 1'b0) begin failures++; $display("v=%0d: expired longer than one clock", cur); end
        end
        break;
      end else if (expired !== 1'b0) begin
        failures++; $display("v=%0d: early or late expired (seen %0d)", cur, seen);
      end
      if (done && edges > 3) break;
    end
  endtask

  initial begin
    start_timer = 1'b0; value = '0; one_hz_enable = 1'b0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int v = 0; v < 16; v++) begin
      repeat ($urandom % P) begin @(negedge clk); drive_enable(); end
      run_interval(4'(v), 0);
    end
    for (int n = 0; n < 20; n++) run_interval(4'($urandom), 0);
    run_interval(4'd15, 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
