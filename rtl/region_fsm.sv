// region_fsm: the region state machine of the address counter.
//
// Four states ONE..FOUR follow the four quarters of a sine period. In ONE and
// THREE the ROM address counts up by `step` every enabled cycle, in TWO and
// FOUR it counts down. The state advances in ONE/THREE once address + step
// >= MAX_ADDR and in TWO/FOUR once address - step <= 0, exactly the tests of
// the original region state diagram; FOUR wraps to ONE. `negative` is high in THREE and
// FOUR, where the read sample must be negated.
//
// This design's own choice is what the address becomes on the cycle a
// boundary is crossed: the step that would run past the end is folded back
// (2*MAX_ADDR - (address+step) at the top, step - address at zero), so the
// address never leaves 0..MAX_ADDR and the phase keeps advancing by exactly
// `step` per cycle. One period is thus 4*MAX_ADDR = 99996 address units,
// i.e. 99996/step sampling cycles. The fold is correct for step <= MAX_ADDR;
// the step controller limits the step to STEP_MAX = 10000.
//
// Interface: `clear` (synchronous, from the step controller's RESET state)
// forces address 0 and state ONE; `enable` low holds everything. Reset is
// asynchronous and active high and also gives address 0 in ONE.
// Timing: `address`, `region` and `negative` are registered; a new value
// appears on the clock edge after the cycle that computed it.
module region_fsm
  import sine_gen_pkg::*;
#(
  parameter int unsigned AW       = ADDR_W,
  parameter int unsigned MAX_A    = MAX_ADDR
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          enable,
  input  logic [AW-1:0] step,
  output logic [AW-1:0] address,
  output region_t       region,
  output logic          negative
);

  // One extra bit holds address + step and 2*MAX_A without overflow.
  localparam int unsigned SW = AW + 2;
  localparam logic [SW-1:0] MAX_S = SW'(MAX_A);

  logic [SW-1:0] addr_s, step_s, sum;
  logic [AW-1:0] fold_top, fold_bot, diff;
  logic          hit_top, hit_bot;
  logic [AW-1:0] address_d;
  region_t       region_d;

  assign addr_s   = SW'(address);
  assign step_s   = SW'(step);
  assign sum      = addr_s + step_s;
  assign diff     = AW'(addr_s - step_s);
  assign fold_top = AW'((MAX_S << 1) - sum);
  assign fold_bot = AW'(step_s - addr_s);
  assign hit_top  = (sum >= MAX_S);
  assign hit_bot  = (addr_s <= step_s);

  always_comb begin
    address_d = address;
    region_d  = region;
    unique case (region)
      REG_ONE, REG_THREE: begin
        if (hit_top) begin
          address_d = fold_top;
          region_d  = (region == REG_ONE) ? REG_TWO : REG_FOUR;
        end else begin
          address_d = AW'(sum);
        end
      end
      REG_TWO, REG_FOUR: begin
        if (hit_bot) begin
          address_d = fold_bot;
          region_d  = (region == REG_TWO) ? REG_THREE : REG_ONE;
        end else begin
          address_d = diff;
        end
      end
      default: begin
        address_d = '0;
        region_d  = REG_ONE;
      end
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      address <= '0;
      region  <= REG_ONE;
    end else if (clear) begin
      address <= '0;
      region  <= REG_ONE;
    end else if (enable) begin
      address <= address_d;
      region  <= region_d;
    end
  end

  assign negative = (region == REG_THREE) || (region == REG_FOUR);

  // The address must stay inside the ROM.
  a_addr_in_range: assert property (@(posedge clk) disable iff (rst) address <= AW'(MAX_A));

endmodule
