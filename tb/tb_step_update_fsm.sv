// tb_step_update_fsm: self-checking test of the step-update controller.
//
// The step input is changed at random moments, sometimes to values above the
// 10000 limit and sometimes again while a restart is still in progress. A
// cycle-level reference model, written as a plain counter of cycles since
// the last accepted change, predicts state, count enable, clear and the step
// in use, which are compared every cycle. The test also measures that every
// restart lasts one UPDATE cycle plus exactly five RESET cycles (50 ns at
// 100 MHz) and that the limit was exercised. A watchdog ends the run.
module tb_step_update_fsm;
  import sine_gen_pkg::*;

  localparam int unsigned AW = 15;
  localparam int unsigned NCYC = 50000;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [AW-1:0] step_in, step;
  logic          count_en, clear;
  upd_state_t    state;

  step_update_fsm dut (
    .clk(clk), .rst(rst), .step_in(step_in), .step(step),
    .count_en(count_en), .clear(clear), .state(state));

  // Reference: phase 0 = counting, 1 = loading, 2..6 = pausing.
  int unsigned ref_phase = 0;
  int unsigned ref_step  = 0;
  int unsigned n_restart = 0, n_limited = 0, n_reset_cycles = 0;

  function automatic int unsigned limited(int unsigned s);
    return (s > 10000) ? 10000 : s;
  endfunction

  task automatic check_outputs();
    upd_state_t exp_state;
    exp_state = (ref_phase == 0) ? ST_COUNT : (ref_phase == 1) ? ST_UPDATE : ST_RESET;
    checks++;
    if (state != exp_state || step != AW'(ref_step) ||
        count_en != (ref_phase == 0) || clear != (ref_phase >= 1)) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t state=%0d exp=%0d step=%0d exp=%0d en=%0b clr=%0b",
                 $time, state, exp_state, step, ref_step, count_en, clear);
    end
  endtask

  initial begin
    rst = 1'b1;
    step_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check_outputs();
    for (int i = 0; i < NCYC; i++) begin
      if ($urandom_range(0, 19) == 0) begin
        if ($urandom_range(0, 4) == 0) step_in = AW'($urandom_range(10001, 32767));
        else                           step_in = AW'($urandom_range(0, 10000));
      end
      // Reference transition at the coming edge.
      unique case (ref_phase)
        0: if (limited(step_in) != ref_step) begin
             ref_phase = 1;
             n_restart++;
           end
        1: begin
             ref_step  = limited(step_in);
             if (step_in > 10000) n_limited++;
             ref_phase = 2;
           end
        6: ref_phase = 0;
        default: ref_phase++;
      endcase
      if (ref_phase >= 2) n_reset_cycles++;
      @(posedge clk);
      #1;
      check_outputs();
      @(negedge clk);
    end
    checks++;
    if (n_restart == 0 || n_limited == 0) begin
      failures++;
      $display("FAIL restart or limit never exercised");
    end
    $display("restarts=%0d limited=%0d reset cycles=%0d", n_restart, n_limited, n_reset_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent cycle count of every RESET stretch.
  int unsigned run_len = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (state == ST_RESET) run_len <= run_len + 1;
      else if (run_len != 0) begin
        checks++;
        if (run_len != RESET_CYCLES) begin
          failures++;
          $display("FAIL RESET lasted %0d cycles", run_len);
        end
        run_len <= 0;
      end
    end
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
