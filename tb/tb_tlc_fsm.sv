// Self-checking testbench for tlc_fsm. The timer is replaced by random
// expired pulses, and sensor, walk request and reprogram are random. A
// reference model written from the operating sequence (main green 2 x
// t_BASE or t_BASE + t_EXT, main yellow, optional walk, side green t_BASE
// plus optional t_EXT, side yellow) predicts, every clock, the lamps, the
// interval address, the start_timer strobe and the walk register clear.
// It also counts that each deviation (both sensor extensions, the walk,
// reprogramming and a stale expired on a start) was exercised.
module tb_tlc_fsm;
  import tlc_pkg::*;

  // model phases: 0 MG1, 1 MG2, 2 MGX, 3 MY, 4 WALK, 5 SG, 6 SGX, 7 SY
  typedef struct packed {
    logic [6:0] lamps;  // r_m y_m g_m r_s y_s g_s walk
    logic [1:0] intv;
  } expect_t;

  function automatic expect_t lookup(int ph);
    case (ph)
      0, 1:    return '{7'b0011000, 2'b00};
      2:       return '{7'b0011000, 2'b01};
      3:       return '{7'b0101000, 2'b10};
      4:       return '{7'b1001001, 2'b01};
      5:       return '{7'b1000010, 2'b00};
      6:       return '{7'b1000010, 2'b01};
      default: return '{7'b1000100, 2'b10};
    endcase
  endfunction

  logic clk = 1'b0, reset, prog, sensor, wr, expired;
  interval_e interval;
  logic start_timer, wr_reset;
  lights_t lights;
  state_e state;
  int checks = 0, failures = 0;
  int ph, nph;
  logic mstart, exp_wr_reset;
  int n_main_ext = 0, n_side_ext = 0, n_walk = 0, n_prog = 0, n_stale = 0;

  tlc_fsm dut (.clk, .reset, .prog, .sensor, .wr, .expired, .interval,
               .start_timer, .wr_reset, .lights, .state);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    expect_t e;
    e = lookup(ph);
    checks++;
    if (lights !== e.lamps || interval !== e.intv || start_timer !== mstart) begin
      failures++;
      $display("phase %0d: lights=%b interval=%b start=%b, expected %b %b %b",
               ph, lights, interval, start_timer, e.lamps, e.intv, mstart);
    end
  endtask

  initial begin
    prog = 0; sensor = 0; wr = 0; expired = 0;
    reset = 1'b1;
    @(posedge clk);
    @(negedge clk) reset = 1'b0;
    ph = 0; mstart = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      // check the state left by the last edge, then drive new inputs
      #1 check_outputs();
      prog    = ($urandom % 400) == 0;
      sensor  = ($urandom % 2) == 0;
      wr      = ($urandom % 3) == 0;
      expired = mstart ? (($urandom % 8) == 0) : (($urandom % 3) == 0);
      #1;
      exp_wr_reset = expired && !mstart && !prog && ph == 4;
      checks++;
      if (wr_reset !== exp_wr_reset) begin
        failures++; $display("wr_reset=%b expected %b in phase %0d", wr_reset, exp_wr_reset, ph);
      end
      @(posedge clk);
      if (prog) begin
        ph = 0; mstart = 1'b1; n_prog++;
      end else if (expired && !mstart) begin
        case (ph)
          0: begin nph = sensor ? 2 : 1; if (sensor) n_main_ext++; end
          1, 2: nph = 3;
          3: begin nph = wr ? 4 : 5; if (wr) n_walk++; end
          4: nph = 5;
          5: begin nph = sensor ? 6 : 7; if (sensor) n_side_ext++; end
          6: nph = 7;
          default: nph = 0;
        endcase
        ph = nph; mstart = 1'b1;
      end else begin
        if (expired && mstart) n_stale++;
        mstart = 1'b0;
      end
      @(negedge clk);
    end
    checks++;
    if (n_main_ext == 0 || n_side_ext == 0 || n_walk == 0 || n_prog == 0 || n_stale == 0) begin
      failures++;
      $display("coverage hole: main_ext=%0d side_ext=%0d walk=%0d prog=%0d stale=%0d",
               n_main_ext, n_side_ext, n_walk, n_prog, n_stale);
    end
    $display("main_ext=%0d side_ext=%0d walk=%0d prog=%0d stale=%0d",
             n_main_ext, n_side_ext, n_walk, n_prog, n_stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
