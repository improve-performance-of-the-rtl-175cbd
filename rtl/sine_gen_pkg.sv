// sine_gen_pkg: shared types and constants of the quarter-wave sine generator.
//
// The generator reads one quarter of a sine period from a 25000-word ROM and
// rebuilds the other three quarters by counting the ROM address down again and
// by negating the read value. The constants below are the sizes the generator
// is built around: a 100 MHz sampling clock, 25000 ROM words of 13 bits, a
// 15-bit address and step, and a step range of 1..10000 (1 kHz to 10 MHz in
// 1 kHz steps). The peak value 3276 and the 5-cycle (50 ns) restart pause
// also come from the description of the generator; the 16-bit signed output
// width is the one it names as sufficient for the output.
package sine_gen_pkg;

  // Number of ROM words holding the first quarter of a sine period.
  localparam int unsigned ROM_DEPTH    = 25000;
  // Highest ROM address; the region FSM turns around here.
  localparam int unsigned MAX_ADDR     = ROM_DEPTH - 1;
  // Width of a ROM address and of the step input.
  localparam int unsigned ADDR_W       = 15;
  // Width of a stored (unsigned) sample.
  localparam int unsigned ROM_W        = 13;
  // Width of the signed output sample.
  localparam int unsigned OUT_W        = 16;
  // Value stored at the top of the quarter wave.
  localparam int unsigned AMPLITUDE    = 3276;
  // Largest step accepted (10 MHz at a 100 MHz sampling clock).
  localparam int unsigned STEP_MAX     = 10000;
  // Length of the RESET state after a step change, in sampling clock cycles.
  localparam int unsigned RESET_CYCLES = 5;

  // The four quarters ("regions") of a sine period: 1 rising from
  // zero, 2 falling to zero, 3 falling to the minimum, 4 rising back to zero.
  typedef enum logic [1:0] {
    REG_ONE   = 2'd0,
    REG_TWO   = 2'd1,
    REG_THREE = 2'd2,
    REG_FOUR  = 2'd3
  } region_t;

  // States of the step-update controller.
  typedef enum logic [1:0] {
    ST_COUNT  = 2'd0,
    ST_UPDATE = 2'd1,
    ST_RESET  = 2'd2
  } upd_state_t;

endpackage
