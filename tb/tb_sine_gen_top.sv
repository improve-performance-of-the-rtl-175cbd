// tb_sine_gen_top: end-to-end test of the sine generator at full size.
//
// A 50 MHz board clock drives the PLL model, whose 100 MHz output clocks the
// generator. The step is set in turn to 1 (1 kHz, the lowest frequency), to
// the four test frequencies 125, 667, 2000 and 7500 kHz, to 10000 (10 MHz,
// the highest) and to 20000, which the generator must limit to 10000.
//
// Checks:
//  * every output sample against round(3276*sin(2*pi*p/99996)), where p is a
//    phase accumulator that restarts at 0 after each step change and the
//    sample is expected two clocks after its address (within one LSB);
//  * the period, measured as in a logic analyser from rising zero crossings
//    over several periods, against 99996/step sampling cycles; the measured
//    frequency is printed;
//  * the restart after each change: one UPDATE cycle, then exactly five
//    RESET cycles (50 ns);
//  * that every mechanism happened: each of the four region transitions,
//    the restart, the step limit and negative output samples.
// A watchdog ends the run.
module tb_sine_gen_top;
  import sine_gen_pkg::*;

  localparam int unsigned M = 24999;
  localparam int unsigned PER = 4 * M;   // phase units per period
  localparam real TWO_PI = 6.283185307179586;

  logic sys_clk = 1'b0;
  logic sys_reset;
  logic clk_100MHz;
  int   checks = 0, failures = 0;

  always #10ns sys_clk = ~sys_clk;

  pll_model u_pll (.sys_clk(sys_clk), .sys_reset(sys_reset), .clk_100MHz(clk_100MHz));

  logic [14:0]        step, address, step_used;
  logic signed [15:0] data_out;
  region_t            region;
  upd_state_t         upd_state;

  sine_gen_top dut (
    .clk_100MHz(clk_100MHz), .sys_reset(sys_reset), .step(step),
    .data_out(data_out), .address(address), .region(region),
    .upd_state(upd_state), .step_used(step_used));

  // ---------------------------------------------------------------- model
  int unsigned ref_state = 0;   // 0 count, 1 update, 2..6 reset
  int unsigned ref_step  = 0;
  int unsigned ph        = 0;
  int unsigned ph_d1 = 0, ph_d2 = 0;   // phase of the sample on data_out
  bit          valid_d1 = 0, valid_d2 = 0;

  function automatic int expected(int unsigned p);
    return int'($floor(3276.0 * $sin(TWO_PI * real'(p) / real'(PER)) + 0.5));
  endfunction

  // Mechanism counters.
  int unsigned n_trans [4];
  int unsigned n_restart = 0, n_limited = 0, n_negative = 0;

  // Period measurement.
  int signed   prev_out = 0;
  longint      cyc = 0;
  longint      first_cross = -1, last_cross = -1;
  int unsigned n_cross = 0;
  bit          measuring = 0;

  region_t prev_region = REG_ONE;
  int unsigned reset_len = 0;

  always @(posedge clk_100MHz) begin
    if (!sys_reset) begin
      // Step the reference model for this edge.
      ph_d2    <= ph_d1;    valid_d2 <= valid_d1;
      ph_d1    <= ph;       valid_d1 <= 1'b1;
      if (ref_state == 0) ph <= (ph + ref_step) % PER;
      else                ph <= 0;
      unique case (ref_state)
        0: if (((step > 10000) ? 10000 : int'(step)) != ref_step) ref_state <= 1;
        1: begin
             ref_step  <= (step > 10000) ? 10000 : int'(step);
             ref_state <= 2;
           end
        6: ref_state <= 0;
        default: ref_state <= ref_state + 1;
      endcase
    end
  end

  // Compare just after each edge, when the model and the design have settled.
  always @(posedge clk_100MHz) begin
    if (!sys_reset) begin
      #1ns;
      cyc++;
      if (valid_d2) begin
        int e;
        e = expected(ph_d2);
        checks++;
        if (int'(data_out) > e + 1 || int'(data_out) < e - 1) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0t data_out=%0d exp=%0d (phase %0d)", $time, data_out, e, ph_d2);
        end
      end
      // Mechanisms.
      if (upd_state == ST_COUNT && region == region_t'(2'(int'(prev_region) + 1)))
        n_trans[int'(prev_region)]++;
      prev_region = region;
      if (data_out < 0) n_negative++;
      if (upd_state == ST_UPDATE) begin
        n_restart++;
        if (step > 10000 && step_used != 10000) n_limited++;
      end
      if (upd_state == ST_COUNT && step > 10000 && step_used == 10000) n_limited++;
      // Restart length.
      if (upd_state == ST_RESET) reset_len++;
      else if (reset_len != 0) begin
        checks++;
        if (reset_len != RESET_CYCLES) begin
          failures++;
          $display("FAIL RESET lasted %0d cycles", reset_len);
        end
        reset_len = 0;
      end
      // Rising zero crossings.
      if (measuring && prev_out < 0 && int'(data_out) >= 0) begin
        if (first_cross < 0) first_cross = cyc;
        last_cross = cyc;
        n_cross++;
      end
      prev_out = int'(data_out);
    end
  end

  // -------------------------------------------------------------- stimulus
  task automatic run_freq(int unsigned s, int unsigned periods);
    int unsigned eff;
    real exp_cycles, got_cycles, f_khz;
    eff = (s > 10000) ? 10000 : s;
    @(negedge clk_100MHz) step = 15'(s);
    // Let the restart pass and a first crossing go by.
    repeat (20) @(posedge clk_100MHz);
    @(negedge clk_100MHz);
    measuring = 1; n_cross = 0; first_cross = -1; last_cross = -1;
    repeat (int'((longint'(periods + 1) * PER) / eff) + 4) @(posedge clk_100MHz);
    @(negedge clk_100MHz);
    measuring = 0;
    checks++;
    if (n_cross < periods) begin
      failures++;
      $display("FAIL step %0d: only %0d zero crossings", s, n_cross);
    end else begin
      exp_cycles = real'(n_cross - 1) * real'(PER) / real'(eff);
      got_cycles = real'(last_cross - first_cross);
      f_khz      = real'(n_cross - 1) / (got_cycles * 10.0e-9) / 1000.0;
      $display("step %5d: %0d periods in %0.0f cycles (expected %0.1f), period %0.2f ns, frequency %0.1f kHz",
               s, n_cross - 1, got_cycles, exp_cycles, got_cycles * 10.0 / real'(n_cross - 1), f_khz);
      if (got_cycles > exp_cycles + 1.5 || got_cycles < exp_cycles - 1.5) begin
        failures++;
        $display("FAIL step %0d: period off", s);
      end
    end
  endtask

  initial begin
    // A rising reset edge resets the design asynchronously; the PLL gives no
    // clock while reset is high.
    sys_reset = 1'b0;
    step      = 15'd0;
    #1ns sys_reset = 1'b1;
    repeat (4) @(posedge sys_clk);
    sys_reset = 1'b0;
    run_freq(1, 2);
    run_freq(125, 10);
    run_freq(667, 20);
    run_freq(2000, 40);
    run_freq(7500, 100);
    run_freq(10000, 100);
    run_freq(20000, 100);
    checks++;
    if (n_restart < 6) begin
      failures++;
      $display("FAIL only %0d restarts", n_restart);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_trans[k] == 0) begin
        failures++;
        $display("FAIL no transition out of region %0d", k);
      end
    end
    checks++;
    if (n_limited == 0 || n_negative == 0) begin
      failures++;
      $display("FAIL step limit or negative half never seen");
    end
    $display("mechanisms: transitions %0d/%0d/%0d/%0d restarts %0d limited %0d negative samples %0d",
             n_trans[0], n_trans[1], n_trans[2], n_trans[3], n_restart, n_limited, n_negative);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
