// pll_model: behavioural (simulation-only) model of the clock-doubling PLL.
//
// On the board the generator's 100 MHz sampling clock comes from a vendor
// PLL that multiplies the 50 MHz oscillator by two. This model reproduces
// only that function for simulation: while `sys_reset` is low it emits two
// clock pulses of IN_PERIOD/4 high and IN_PERIOD/4 low per input period,
// phase-aligned to the rising edge of `sys_clk`; while `sys_reset` is high
// the output stays low. It has no lock time, jitter or phase adjustment and
// is not synthesizable.
module pll_model #(
  parameter realtime IN_PERIOD = 20ns
) (
  input  logic sys_clk,
  input  logic sys_reset,
  output logic clk_100MHz
);

  initial clk_100MHz = 1'b0;

  always @(posedge sys_clk) begin
    if (!sys_reset) begin
      clk_100MHz = 1'b1;
      #(IN_PERIOD / 4) clk_100MHz = 1'b0;
      #(IN_PERIOD / 4) clk_100MHz = 1'b1;
      #(IN_PERIOD / 4) clk_100MHz = 1'b0;
    end
  end

endmodule
