// tb_region_fsm: self-checking test of the region state machine.
//
// Two instances run side by side: one at the full ROM size (highest address
// 24999) and one with a tiny ROM (highest address 7) where the address hits
// the turning points exactly and often. Each gets random steps (the step may
// change every cycle), random enable and occasional clear. A reference model
// keeps a phase accumulator p modulo 4*MAX and derives the expected region
// (p/MAX) and address (p, 2*MAX-p, p-2*MAX or 4*MAX-p) from it, so it does
// not share the up/down-counting formulation of the design. Every cycle the
// address, region and sign are compared; all four region transitions must
// be seen. A watchdog ends the run.
module tb_region_fsm;
  import sine_gen_pkg::*;

  localparam int unsigned AW = 15;
  localparam int unsigned MAX_BIG   = 24999;
  localparam int unsigned MAX_SMALL = 7;
  localparam int unsigned NCYC = 200000;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Stimulus per instance.
  logic          clear_b, en_b, clear_s, en_s;
  logic [AW-1:0] step_b, step_s;
  logic [AW-1:0] addr_b, addr_s;
  region_t       reg_b, reg_s;
  logic          neg_b, neg_s;

  region_fsm #(.AW(AW), .MAX_A(MAX_BIG)) dut_big (
    .clk(clk), .rst(rst), .clear(clear_b), .enable(en_b), .step(step_b),
    .address(addr_b), .region(reg_b), .negative(neg_b));

  region_fsm #(.AW(AW), .MAX_A(MAX_SMALL)) dut_small (
    .clk(clk), .rst(rst), .clear(clear_s), .enable(en_s), .step(step_s),
    .address(addr_s), .region(reg_s), .negative(neg_s));

  // Reference: phase in 0 .. 4*max-1.
  function automatic int unsigned exp_addr(int unsigned p, int unsigned m);
    if (p < m)          return p;
    else if (p < 2*m)   return 2*m - p;
    else if (p < 3*m)   return p - 2*m;
    else                return 4*m - p;
  endfunction

  function automatic int unsigned exp_region(int unsigned p, int unsigned m);
    return p / m;
  endfunction

  int unsigned ph_b = 0, ph_s = 0;
  int unsigned seen [4];

  task automatic compare(string tag, int unsigned ph, int unsigned m,
                         logic [AW-1:0] a, region_t r, logic n);
    checks++;
    if (a != AW'(exp_addr(ph, m)) || int'(r) != int'(exp_region(ph, m)) ||
        n != (exp_region(ph, m) >= 2)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s phase=%0d addr=%0d exp=%0d region=%0d exp=%0d neg=%0b",
                 tag, ph, a, exp_addr(ph, m), r, exp_region(ph, m), n);
    end
  endtask

  region_t prev_b;

  initial begin
    rst = 1'b1;
    clear_b = 0; en_b = 0; step_b = 0;
    clear_s = 0; en_s = 0; step_s = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    compare("big-reset", ph_b, MAX_BIG, addr_b, reg_b, neg_b);
    compare("small-reset", ph_s, MAX_SMALL, addr_s, reg_s, neg_s);
    prev_b = reg_b;
    for (int i = 0; i < NCYC; i++) begin
      // Drive new inputs on the falling edge.
      clear_b = ($urandom_range(0, 999) == 0);
      en_b    = ($urandom_range(0, 9) != 0);
      if ($urandom_range(0, 99) == 0) step_b = AW'($urandom_range(0, 10000));
      else if (i == 0) step_b = 15'd125;
      clear_s = ($urandom_range(0, 99) == 0);
      en_s    = ($urandom_range(0, 7) != 0);
      step_s  = AW'($urandom_range(0, MAX_SMALL));
      // Reference update for this edge.
      if (clear_b) ph_b = 0;
      else if (en_b) ph_b = (ph_b + step_b) % (4*MAX_BIG);
      if (clear_s) ph_s = 0;
      else if (en_s) ph_s = (ph_s + step_s) % (4*MAX_SMALL);
      @(posedge clk);
      #1;
      compare("big", ph_b, MAX_BIG, addr_b, reg_b, neg_b);
      compare("small", ph_s, MAX_SMALL, addr_s, reg_s, neg_s);
      if (reg_b != prev_b && !clear_b) seen[int'(prev_b)]++;
      prev_b = reg_b;
      @(negedge clk);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL transition out of region %0d never seen", k);
      end
    end
    $display("region transitions seen: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
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
