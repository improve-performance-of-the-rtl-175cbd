// sine_gen_top: digital sine wave generator, 1 kHz to 10 MHz in 1 kHz steps.
//
// A 100 MHz sampling clock steps an address through a ROM that holds one
// quarter of a sine period in 25000 samples. The address counter moves the
// address up and down by `step` per clock, and the sine table negates the
// read value in the second half period, so one period takes 100000/step
// samples (precisely 99996/step) and the output frequency is `step` kHz.
//
// Interface: `clk_100MHz` is the sampling clock, made from the 50 MHz board
// clock by a PLL outside this module. `sys_reset` is an asynchronous
// active-high reset. `step[14:0]` selects the frequency in kHz; a change
// restarts the waveform from zero after a 60 ns pause (one UPDATE cycle and
// 50 ns of RESET). `data_out` is the signed sample (peak +/-3276), two clock
// cycles behind the address; `address`, `region`, `upd_state` and the
// limited step in use (`step_used`) are brought out for observation.
// The block structure and the signal names follow the block diagram of the
// original generator. The 16-bit output width follows its written
// description; the diagram labels the output 12 bits wide, which cannot
// hold the signed range +/-3276. The PLL is left outside so this module stays synthesizable.
module sine_gen_top
  import sine_gen_pkg::*;
#(
  parameter int unsigned AW      = ADDR_W,
  parameter int unsigned DEPTH   = ROM_DEPTH,
  parameter int unsigned DW      = ROM_W,
  parameter int unsigned OW      = OUT_W,
  parameter int unsigned AMP     = AMPLITUDE,
  parameter int unsigned SMAX    = STEP_MAX,
  parameter int unsigned RST_CYC = RESET_CYCLES
) (
  input  logic                 clk_100MHz,
  input  logic                 sys_reset,
  input  logic [AW-1:0]        step,
  output logic signed [OW-1:0] data_out,
  output logic [AW-1:0]        address,
  output region_t              region,
  output upd_state_t           upd_state,
  output logic [AW-1:0]        step_used
);

  logic negative;

  address_counter #(
    .AW(AW), .MAX_A(DEPTH - 1), .SMAX(SMAX), .RST_CYC(RST_CYC)
  ) u_address_counter (
    .clk       (clk_100MHz),
    .rst       (sys_reset),
    .step      (step),
    .address   (address),
    .negative  (negative),
    .region    (region),
    .upd_state (upd_state),
    .step_used (step_used)
  );

  sine_table #(
    .DEPTH(DEPTH), .AW(AW), .DW(DW), .OW(OW), .AMP(AMP)
  ) u_sine_table (
    .clk      (clk_100MHz),
    .address  (address),
    .negative (negative),
    .data_out (data_out)
  );

endmodule
