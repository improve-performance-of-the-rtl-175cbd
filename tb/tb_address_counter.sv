// tb_address_counter: self-checking test of the complete address counter.
//
// The step input is set to the four test frequencies of the generator (125,
// 667, 2000 and 7500 kHz), to the range ends 1 and 10000, to a value above
// the range and to random values, each held for a random time. A reference
// model predicts, cycle by cycle, the restart sequence after every change
// (one UPDATE cycle, five RESET cycles, address 0 from the first RESET
// cycle to the first COUNT cycle) and, while counting,
// the address, region and sign from a phase accumulator that advances by the
// step modulo 4*24999. Address, sign, region, controller state and step in
// use are compared every cycle. A watchdog ends the run.
module tb_address_counter;
  import sine_gen_pkg::*;

  localparam int unsigned M = 24999;
  localparam int unsigned NCYC = 150000;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [14:0] step, address, step_used;
  logic        negative;
  region_t     region;
  upd_state_t  upd_state;

  address_counter dut (
    .clk(clk), .rst(rst), .step(step), .address(address), .negative(negative),
    .region(region), .upd_state(upd_state), .step_used(step_used));

  int unsigned ref_phase = 0;  // 0 count, 1 update, 2..6 reset
  int unsigned ref_step  = 0;
  int unsigned ph        = 0;  // waveform phase, 0 .. 4*M-1
  int unsigned n_restart = 0;

  function automatic int unsigned limited(int unsigned s);
    return (s > 10000) ? 10000 : s;
  endfunction

  function automatic int unsigned fold(int unsigned p);
    if (p < M)        return p;
    else if (p < 2*M) return 2*M - p;
    else if (p < 3*M) return p - 2*M;
    else              return 4*M - p;
  endfunction

  task automatic check_outputs();
    upd_state_t es;
    es = (ref_phase == 0) ? ST_COUNT : (ref_phase == 1) ? ST_UPDATE : ST_RESET;
    checks++;
    if (address != 15'(fold(ph)) || int'(region) != int'(ph / M) ||
        negative != (ph >= 2*M) || upd_state != es || step_used != 15'(ref_step)) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t addr=%0d exp=%0d region=%0d exp=%0d state=%0d exp=%0d step=%0d exp=%0d",
                 $time, address, fold(ph), region, ph / M, upd_state, es, step_used, ref_step);
    end
  endtask

  int unsigned choices [8] = '{125, 667, 2000, 7500, 1, 10000, 20000, 0};

  initial begin
    int unsigned hold;
    rst  = 1'b1;
    step = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check_outputs();
    hold = 0;
    for (int i = 0; i < NCYC; i++) begin
      if (hold == 0) begin
        int unsigned c;
        c = $urandom_range(0, 8);
        step = (c == 8) ? 15'($urandom_range(1, 10000)) : 15'(choices[c]);
        hold = $urandom_range(1, 6000);
      end else hold--;
      // The counter advances on every COUNT cycle and is cleared on every
      // UPDATE and RESET cycle.
      if (ref_phase == 0) ph = (ph + ref_step) % (4*M);
      else                ph = 0;
      unique case (ref_phase)
        0: if (limited(int'(step)) != ref_step) begin
             ref_phase = 1;
             n_restart++;
           end
        1: begin ref_step = limited(int'(step)); ref_phase = 2; end
        6: ref_phase = 0;
        default: ref_phase++;
      endcase
      @(posedge clk);
      #1;
      check_outputs();
      @(negedge clk);
    end
    checks++;
    if (n_restart < 10) begin
      failures++;
      $display("FAIL too few restarts: %0d", n_restart);
    end
    $display("restarts=%0d", n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
