// tb_sine_table: self-checking test of the quarter-wave ROM and sign stage.
//
// Every one of the 25000 addresses is read twice, once with the sign flag
// clear and once set, with a new address every cycle. The expected word is
// worked out here as round(3276 * cos(pi/2 * (24999 - a) / 24999)), a
// different route to the same quarter wave, and compared, allowing one LSB
// for a different rounding of the last bit. The fixed points of the table
// (0 at address 0, 3276 at address 24999), the monotone rise of the stored
// quarter wave and the two-cycle latency from address to data_out are
// checked exactly. A watchdog ends the run.
module tb_sine_table;
  import sine_gen_pkg::*;

  localparam int unsigned DEPTH = 25000;
  localparam int unsigned LAT   = 2;
  localparam real HALF_PI = 1.5707963267948966;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [14:0]        address;
  logic               negative;
  logic signed [15:0] data_out;

  sine_table dut (.clk(clk), .address(address), .negative(negative), .data_out(data_out));

  function automatic int expected(int unsigned a, bit neg);
    real v;
    int  r;
    v = 3276.0 * $cos(HALF_PI * real'(DEPTH - 1 - a) / real'(DEPTH - 1));
    r = int'($floor(v + 0.5));
    return neg ? -r : r;
  endfunction

  // Pipeline of the stimulus, to line expected values up with data_out.
  int unsigned a_pipe [LAT+1];
  bit          n_pipe [LAT+1];
  bit          v_pipe [LAT+1];
  int          prev_pos = -1;

  task automatic step_cycle(int unsigned a, bit neg, bit valid);
    address  = 15'(a);
    negative = neg;
    a_pipe[0] = a; n_pipe[0] = neg; v_pipe[0] = valid;
    @(posedge clk);
    for (int k = LAT; k > 0; k--) begin
      a_pipe[k] = a_pipe[k-1]; n_pipe[k] = n_pipe[k-1]; v_pipe[k] = v_pipe[k-1];
    end
    #1;
    if (v_pipe[LAT]) begin
      int e;
      e = expected(a_pipe[LAT], n_pipe[LAT]);
      checks++;
      if (int'(data_out) > e + 1 || int'(data_out) < e - 1) begin
        failures++;
        if (failures < 10)
          $display("FAIL addr=%0d neg=%0b data_out=%0d exp=%0d",
                   a_pipe[LAT], n_pipe[LAT], data_out, e);
      end
      if (!n_pipe[LAT]) begin
        checks++;
        if (int'(data_out) < prev_pos) begin
          failures++;
          $display("FAIL table falls at addr=%0d", a_pipe[LAT]);
        end
        prev_pos = int'(data_out);
      end
      if (a_pipe[LAT] == 0 || a_pipe[LAT] == DEPTH - 1) begin
        checks++;
        if (int'(data_out) != (a_pipe[LAT] == 0 ? 0 : (n_pipe[LAT] ? -3276 : 3276))) begin
          failures++;
          $display("FAIL end point addr=%0d data_out=%0d", a_pipe[LAT], data_out);
        end
      end
    end
    @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k <= LAT; k++) v_pipe[k] = 0;
    address = '0; negative = 0;
    @(negedge clk);
    for (int unsigned a = 0; a < DEPTH; a++) step_cycle(a, 1'b0, 1'b1);
    prev_pos = -1;
    for (int unsigned a = 0; a < DEPTH; a++) step_cycle(a, 1'b1, 1'b1);
    for (int k = 0; k < LAT; k++) step_cycle(0, 1'b0, 1'b0);
    // Latency: a single peak read surrounded by zeros appears exactly LAT
    // cycles later.
    address = 15'(DEPTH - 1); negative = 0;
    for (int k = 1; k <= LAT + 1; k++) begin
      @(posedge clk);
      #1;
      checks++;
      if ((k == LAT) != (data_out == 16'sd3276)) begin
        failures++;
        $display("FAIL latency: edge %0d data_out=%0d", k, data_out);
      end
      @(negedge clk) address = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * DEPTH + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
