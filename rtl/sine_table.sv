// sine_table: quarter-wave sine ROM with sign restoration.
//
// The ROM holds the first quarter of a sine period, DEPTH words of ROM_W
// bits: word a = round(AMP * sin(pi/2 * a / (DEPTH-1))), so word 0 is 0 and
// word DEPTH-1 is the peak AMP (3276). With the defaults this is 25000 x 13
// bits = 325000 bits of block memory. The contents are computed at
// elaboration from that formula instead of being read from a file.
// Reading the same words back in falling address order gives the second
// quarter; negating both gives the second half period.
//
// Timing: two register stages. Cycle 1 reads the ROM word at `address` into
// a register (a synchronous block-RAM read) and delays `negative` alongside
// it; cycle 2 registers the word, negated when `negative` was set, as the
// signed `data_out`. So data_out follows address by two clock cycles.
// The depth, word width, peak and 16-bit output follow the description of
// the generator; the two-stage read, the `negative` input and the exact
// rounding formula are this design's own choices. Addresses above DEPTH-1
// are never produced by the address counter and read as 0.
module sine_table
  import sine_gen_pkg::*;
#(
  parameter int unsigned DEPTH = ROM_DEPTH,
  parameter int unsigned AW    = ADDR_W,
  parameter int unsigned DW    = ROM_W,
  parameter int unsigned OW    = OUT_W,
  parameter int unsigned AMP   = AMPLITUDE
) (
  input  logic                 clk,
  input  logic [AW-1:0]        address,
  input  logic                 negative,
  output logic signed [OW-1:0] data_out
);

  localparam real HALF_PI = 1.5707963267948966;

  logic [DW-1:0] rom [DEPTH];

  function automatic logic [DW-1:0] quarter_sine(int unsigned a);
    real v;
    v = real'(AMP) * $sin(HALF_PI * real'(a) / real'(DEPTH - 1));
    return DW'($rtoi(v + 0.5));
  endfunction

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = quarter_sine(i);
  end

  logic [DW-1:0] rom_q;
  logic          neg_q;

  always_ff @(posedge clk) begin
    rom_q <= (address < AW'(DEPTH)) ? rom[address] : '0;
    neg_q <= negative;
  end

  always_ff @(posedge clk) begin
    if (neg_q) data_out <= -$signed({{(OW-DW){1'b0}}, rom_q});
    else       data_out <=  $signed({{(OW-DW){1'b0}}, rom_q});
  end

endmodule
