// tb_seg_ctrl: self-checking testbench for seg_ctrl.
//
// Three controllers share one clock:
//   * N = 18, M = 18 (defaults): 2^18 - 1 = 262143 is divisible by 9, so
//     automatic mode splits. Segment #1 (9 stages, leap 9) has period 511.
//   * N = 4, M = 3: 15 is divisible by 3, so automatic mode splits. Segment #1
//     (2 stages, leap 2) has period 3.
//   * N = 17, M = 3: 131071 is prime, so automatic mode stays joined.
// Checked: sel for each mode request, and that in split mode step2 is high
// exactly once every P1 cycles, counted from reset or from entering split
// mode, while in joined mode it is high every cycle.
module tb_seg_ctrl;

  import lfsr_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic  clk = 1'b0;
  always #5ns clk = ~clk;

  logic  rst;
  mode_e mode;
  logic  sel_a, st_a, sel_b, st_b, sel_c, st_c;

  seg_ctrl                       u_a (.clk(clk), .rst(rst), .mode(mode), .sel(sel_a), .step2(st_a));
  seg_ctrl #(.N(4),  .M(3))      u_b (.clk(clk), .rst(rst), .mode(mode), .sel(sel_b), .step2(st_b));
  seg_ctrl #(.N(17), .M(3))      u_c (.clk(clk), .rst(rst), .mode(mode), .sel(sel_c), .step2(st_c));

  // cycles since reset / entering split, per instance
  int since_a, since_b;
  int pulses_a, pulses_b;


  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1; mode = MODE_AUTO;
    @(negedge clk);
    rst = 1'b0;
    check(sel_a, 1'b1, "auto sel N=18 M=18");
    check(sel_b, 1'b1, "auto sel N=4 M=3");
    check(sel_c, 1'b0, "auto sel N=17 M=3");
    check(st_c, 1'b1, "joined step2 N=17");
    since_a = 0; since_b = 0; pulses_a = 0; pulses_b = 0;
    // first edge after reset release already counts
    for (int i = 0; i < 3 * 511; i++) begin
      check(st_a, (since_a % 511) == 510, "step2 N=18");
      check(st_b, (since_b % 3) == 2, "step2 N=4");
      if (st_a) pulses_a++;
      if (st_b) pulses_b++;
      since_a++; since_b++;
      @(negedge clk);
    end
    checks++;
    if (pulses_a != 3 || pulses_b != 511) begin
      failures++;
      $display("FAIL pulse counts %0d %0d", pulses_a, pulses_b);
    end
    // forced joined: step2 every cycle, sel 0 everywhere
    mode = MODE_JOINED;
    #1ns;
    check(sel_a, 1'b0, "joined sel");
    check(sel_b, 1'b0, "joined sel");
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      check(st_a, 1'b1, "joined step2");
      check(st_b, 1'b1, "joined step2");
    end
    // forced split: count restarts
    mode = MODE_SPLIT;
    #1ns;
    check(sel_c, 1'b1, "forced split sel N=17");
    since_a = 0; since_b = 0;
    for (int i = 0; i < 1100; i++) begin
      check(st_a, (since_a % 511) == 510, "step2 N=18 after switch");
      check(st_b, (since_b % 3) == 2, "step2 N=4 after switch");
      since_a++; since_b++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
