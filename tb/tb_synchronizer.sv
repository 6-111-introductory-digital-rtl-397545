// Self-checking testbench for synchronizer: random 4-bit input patterns,
// changed on the falling edge, must appear at the output exactly STAGES
// rising edges later.
module tb_synchronizer;
  localparam int W = 4;
  localparam int STAGES = 2;
  logic clk = 1'b0;
  logic [W-1:0] async_in, sync_out;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  synchronizer #(.WIDTH(W), .STAGES(STAGES)) dut (.clk, .async_in, .sync_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    async_in = '0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // history holds the input present at each rising edge
      if (hist.size() >= STAGES) begin
        checks++;
        if (sync_out !== hist[hist.size()-STAGES]) begin
          failures++;
          $display("mismatch at %0d: got %h expected %h", n, sync_out, hist[hist.size()-STAGES]);
        end
      end
      async_in = W'($urandom);
      @(posedge clk);
      hist.push_back(async_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
