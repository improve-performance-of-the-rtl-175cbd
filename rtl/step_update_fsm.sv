// step_update_fsm: the step-update state machine of the address counter.
//
// States COUNT, UPDATE and RESET. In COUNT the region FSM runs with the
// current step (`count_en` high). When the step input differs from the step
// in use (`update_request`) the controller goes to UPDATE for one cycle and
// loads the new step, then to RESET for RESET_CYCLES cycles (50 ns at
// 100 MHz), and returns to COUNT (`end_50ns`). `clear` is high in UPDATE and
// RESET, so the address reads 0 in region ONE throughout RESET and on the
// first COUNT cycle, from which counting resumes with the new step. The generator so always restarts a new
// frequency from phase zero.
//
// The states, the 50 ns pause and the transition names follow the
// description of the generator. The comparison that raises update_request,
// the one-cycle UPDATE state, and the limit of the loaded step to STEP_MAX
// (the top of the 1 kHz - 10 MHz range) are this design's own choices.
//
// Interface: `step_in` may change at any time and is sampled by the clock.
// `step` is the registered step in use; `state` is exported for observation.
// Reset is asynchronous and active high: COUNT with step 0, so a nonzero
// step_in after reset passes through UPDATE and RESET before counting.
module step_update_fsm
  import sine_gen_pkg::*;
#(
  parameter int unsigned AW        = ADDR_W,
  parameter int unsigned SMAX      = STEP_MAX,
  parameter int unsigned RST_CYC   = RESET_CYCLES
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] step_in,
  output logic [AW-1:0] step,
  output logic          count_en,
  output logic          clear,
  output upd_state_t    state
);

  localparam int unsigned CW = (RST_CYC > 1) ? $clog2(RST_CYC) : 1;

  logic [AW-1:0] step_lim;
  logic          update_request;
  logic          end_50ns;
  logic [CW-1:0] rst_cnt;

  assign step_lim       = (step_in > AW'(SMAX)) ? AW'(SMAX) : step_in;
  assign update_request = (step_lim != step);
  assign end_50ns       = (rst_cnt == CW'(RST_CYC - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= ST_COUNT;
      step    <= '0;
      rst_cnt <= '0;
    end else begin
      unique case (state)
        ST_COUNT: begin
          if (update_request) state <= ST_UPDATE;
        end
        ST_UPDATE: begin
          step    <= step_lim;
          rst_cnt <= '0;
          state   <= ST_RESET;
        end
        ST_RESET: begin
          if (end_50ns) state <= ST_COUNT;
          else          rst_cnt <= rst_cnt + 1'b1;
        end
        default: state <= ST_COUNT;
      endcase
    end
  end

  assign count_en = (state == ST_COUNT);
  assign clear    = (state == ST_UPDATE) || (state == ST_RESET);

  // The step in use never exceeds the supported range.
  a_step_limit: assert property (@(posedge clk) disable iff (rst) step <= AW'(SMAX));
  // UPDATE lasts one cycle and is always followed by RESET.
  a_update_then_reset: assert property (@(posedge clk) disable iff (rst)
    (state == ST_UPDATE) |=> (state == ST_RESET));

endmodule
