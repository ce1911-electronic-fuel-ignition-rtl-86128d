// engine_tb: self-checking end-to-end testbench of the ignition sequencer.
//
// It runs the design at its default (and only) configuration with the
// specified 20 ns clock. RST is driven low for two clock periods and always
// changes halfway between rising edges, never on one. A reference model,
// written as a free-running phase counter rather than a state machine,
// predicts Y after every rising edge: 0 while reset is sampled low, then
// one-hot with Y3 during phases 0..4, Y2 in 5..9, Y1 in 10..14 and Y0 in
// 15..19 of each 20-clock period. Besides the cycle-by-cycle compare it
// measures, in simulation time, the width of every pulse (100 ns), the time
// between two pulses of one output (400 ns) and between pulses of
// neighbouring outputs (100 ns), and checks that Y3 rises on the first edge
// after reset is released. It then applies a reset in the middle of the
// pulse train and a stretch of randomly timed resets.
//
// Mechanisms counted, each must happen at least once: reset event (outputs
// cleared), reset held for several clocks, start from reset into S1, wrap
// from the last waveform state back to the first, reset in mid-train, and a
// rising edge (spark) on each of the four outputs.
`timescale 1ns / 1ps
module engine_tb;
  import engine_pkg::*;

  localparam time TCLK = 20ns;

  logic   CLK = 1'b0;
  logic   RST;
  spark_t Y;

  int checks;
  int failures;

  engine dut (.CLK(CLK), .RST(RST), .Y(Y));

  always #(TCLK / 2) CLK = ~CLK;

  // ---------------------------------------------------------------- model
  bit  run;             // model has left reset
  int  phase;           // position in the 20-clock pulse train
  int  n_reset_events, n_reset_held, n_start, n_wrap, n_mid_reset;
  bit  rst_prev_low;

  function automatic spark_t expect_y(bit r, int ph);
    if (!r) return '0;
    case (ph / 5)
      0: return 4'b1000;
      1: return 4'b0100;
      2: return 4'b0010;
      default: return 4'b0001;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial forever begin
    @(posedge CLK);
    if (!RST) begin
      if (run) n_mid_reset++;
      if (rst_prev_low) n_reset_held++;
      n_reset_events++;
      run   = 1'b0;
      phase = 0;
      rst_prev_low = 1'b1;
    end else begin
      rst_prev_low = 1'b0;
      if (!run) begin
        run   = 1'b1;
        phase = 0;
        n_start++;
      end else if (phase == 19) begin
        phase = 0;
        n_wrap++;
      end else begin
        phase++;
      end
    end
    #1;
    check(Y === expect_y(run, phase),
          $sformatf("Y=%b expected %b (run=%0d phase=%0d)", Y, expect_y(run, phase), run, phase));
  end

  // ------------------------------------------------------- pulse timing
  time rise_t[4], fall_t[4];
  bit  seen_rise[4];
  int  n_spark[4];
  time last_rise_any;
  int  last_rise_bit;
  bit  timing_on;  // only while no reset cuts a pulse short

  for (genvar i = 0; i < 4; i++) begin : g_mon
    initial forever begin
      @(posedge Y[i]);
      n_spark[i]++;
      if (timing_on && seen_rise[i])
        check($time - rise_t[i] == 20 * TCLK,
              $sformatf("Y[%0d] period %0t expected %0t", i, $time - rise_t[i], 20 * TCLK));
      if (timing_on && last_rise_bit >= 0)
        check(last_rise_bit == (i + 1) % 4 && $time - last_rise_any == 5 * TCLK,
              $sformatf("Y[%0d] rose %0t after Y[%0d]", i, $time - last_rise_any, last_rise_bit));
      rise_t[i]     = $time;
      seen_rise[i]  = 1'b1;
      last_rise_any = $time;
      last_rise_bit = i;
    end
    initial forever begin
      @(negedge Y[i]);
      fall_t[i] = $time;
      if (timing_on && seen_rise[i])
        check(fall_t[i] - rise_t[i] == 5 * TCLK,
              $sformatf("Y[%0d] pulse width %0t expected %0t", i, fall_t[i] - rise_t[i], 5 * TCLK));
    end
  end

  // --------------------------------------------------------- stimulus
  task automatic release_reset_and_check_latency();
    // RST rises halfway between rising edges.
    @(negedge CLK);
    RST = 1'b1;
    @(posedge CLK);
    #1;
    check(Y == 4'b1000, $sformatf("Y3 must fire on first edge after reset, Y=%b", Y));
  endtask

  // Start the pulse-timing checks afresh while the outputs are held at 0.
  task automatic arm_timing();
    foreach (seen_rise[i]) seen_rise[i] = 1'b0;
    last_rise_bit = -1;
    timing_on = 1'b1;
  endtask

  initial begin
    checks = 0; failures = 0; timing_on = 1'b0; last_rise_bit = -1; last_rise_any = 0;
    run = 1'b0; phase = 0; rst_prev_low = 1'b0;
    n_reset_events = 0; n_reset_held = 0; n_start = 0; n_wrap = 0; n_mid_reset = 0;
    foreach (n_spark[i]) n_spark[i] = 0;
    // Reset event: RST low for two clock periods from time zero.
    RST = 1'b0;
    repeat (2) @(posedge CLK);
    #1 check(Y == '0, "outputs not cleared by reset");
    arm_timing();
    release_reset_and_check_latency();

    // Four full pulse trains.
    repeat (4 * 20 + 3) @(posedge CLK);

    // Reset in the middle of the train, held for three clocks.
    timing_on = 1'b0;
    @(negedge CLK) RST = 1'b0;
    repeat (3) begin
      @(posedge CLK);
      #1 check(Y == '0, "outputs not cleared by mid-train reset");
    end
    arm_timing();
    release_reset_and_check_latency();
    repeat (2 * 20) @(posedge CLK);

    // Randomly timed resets; the cycle model checks every edge.
    timing_on = 1'b0;
    repeat (400) begin
      @(negedge CLK);
      RST = ($urandom_range(0, 29) != 0);
    end
    @(negedge CLK) RST = 1'b1;
    repeat (25) @(posedge CLK);

    check(n_reset_events > 0, "no reset event");
    check(n_reset_held > 0,   "reset never held over several clocks");
    check(n_start > 1,        "never started from reset");
    check(n_wrap > 0,         "never wrapped from S20 to S1");
    check(n_mid_reset > 0,    "no reset in mid-train");
    foreach (n_spark[i]) check(n_spark[i] > 0, $sformatf("Y[%0d] never fired", i));
    $display("events: reset=%0d held=%0d start=%0d wrap=%0d mid_reset=%0d sparks=%0d/%0d/%0d/%0d",
             n_reset_events, n_reset_held, n_start, n_wrap, n_mid_reset,
             n_spark[3], n_spark[2], n_spark[1], n_spark[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (2000) @(posedge CLK);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
