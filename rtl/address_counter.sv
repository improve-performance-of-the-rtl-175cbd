// address_counter: the ROM address generator of the sine generator.
//
// It combines the two state machines that control the counter. The
// step-update controller (step_update_fsm) registers the step input, and on
// every change it restarts the waveform: one UPDATE cycle that loads the new
// step, then RESET_CYCLES cycles with the address held at 0 in region ONE.
// The region FSM (region_fsm) moves the address up and down through the
// quarter-wave ROM by the registered step once per clock and reports, as
// `negative`, whether the current sample lies in the negative half period.
//
// Interface: `step` is the wanted frequency in kHz (1..10000; larger values
// are limited to 10000, 0 stops the counter). `address` and `negative` are
// registered and change on every rising clock edge while counting; `region`
// and `upd_state` are brought out for observation. Reset is asynchronous,
// active high. Splitting the two machines into sub-modules and the ports
// beyond `address` are this design's own choice.
module address_counter
  import sine_gen_pkg::*;
#(
  parameter int unsigned AW      = ADDR_W,
  parameter int unsigned MAX_A   = MAX_ADDR,
  parameter int unsigned SMAX    = STEP_MAX,
  parameter int unsigned RST_CYC = RESET_CYCLES
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] step,
  output logic [AW-1:0] address,
  output logic          negative,
  output region_t       region,
  output upd_state_t    upd_state,
  output logic [AW-1:0] step_used
);

  logic count_en, clear;

  step_update_fsm #(.AW(AW), .SMAX(SMAX), .RST_CYC(RST_CYC)) u_upd (
    .clk      (clk),
    .rst      (rst),
    .step_in  (step),
    .step     (step_used),
    .count_en (count_en),
    .clear    (clear),
    .state    (upd_state)
  );

  region_fsm #(.AW(AW), .MAX_A(MAX_A)) u_region (
    .clk      (clk),
    .rst      (rst),
    .clear    (clear),
    .enable   (count_en),
    .step     (step_used),
    .address  (address),
    .region   (region),
    .negative (negative)
  );

endmodule
