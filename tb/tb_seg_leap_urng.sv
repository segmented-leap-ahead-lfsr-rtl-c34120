// tb_seg_leap_urng: end-to-end, full-size testbench of seg_leap_urng.
//
// The generator runs at its default size, 18 stages and 18 output bits. Then
// 2^18 - 1 = 262143 = 9 * 29127, so the joined leap-ahead LFSR repeats after
// 29,127 words. Split into two 9-stage segments, it repeats after
// 511 * 511 = 261,121 words.
//
// A reference model written here (one-bit Galois steps repeated, two 9-stage
// segments with taps {X_1, C_4}, the 18-stage LFSR with taps {X_1, C_7}, and a
// modulo-511 step counter for segment #2) predicts rnd, sel and seg2_step
// every cycle. Phases:
//   1. automatic mode (splits): one full period plus a margin; the first
//      return of the output to the seed must come after exactly 261,121
//      words, with 511 steps of segment #2;
//   2. forced joined mode: the seed must come back after exactly 29,127
//      words;
//   3. random mode switches, with resets, including all-zero seeds;
//   4. an all-zero seed must give state X_1 = X_10 = 1.
// Each mechanism (split stepping, joined stepping, a segment #2 step, a mode
// switch, a zero-seed replacement) is counted; one that never happened is a
// failure. Latency: after reset the seed itself is the first word, and a new
// word follows every clock.
module tb_seg_leap_urng;

  import lfsr_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5ns clk = ~clk;

  logic        rst;
  logic [17:0] seed;
  mode_e       mode;
  logic [17:0] rnd;
  logic        sel, seg2_step;

  seg_leap_urng u_dut (
    .clk(clk), .rst(rst), .seed(seed), .mode(mode),
    .rnd(rnd), .sel(sel), .seg2_step(seg2_step)
  );

  // ---------------- reference model ----------------
  function automatic logic [31:0] ref_leap(logic [31:0] s, logic [31:0] taps, int n, int m);
    logic [31:0] v;
    logic        xn;
    v = s;
    for (int i = 0; i < m; i++) begin
      logic [31:0] nv;
      xn    = v[n-1];
      nv    = '0;
      nv[0] = xn;
      for (int k = 1; k < n; k++) nv[k] = v[k-1] ^ (taps[k] & xn);
      v = nv;
    end
    return v;
  endfunction

  logic [8:0] m1, m2;
  int         mcnt;
  mode_e      last_mode;

  int n_split = 0, n_joined = 0, n_seg2 = 0, n_switch = 0, n_zero = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", what, $time);
  endtask

  // One clock: apply inputs, check the combinational outputs, advance the
  // model, and after the edge check rnd.
  task automatic cycle(input logic r, input mode_e md, input logic [17:0] sd);
    logic esel, estep;
    rst  = r;
    mode = md;
    seed = sd;
    #1ns;
    esel  = (md != MODE_JOINED);   // automatic mode splits at this size
    estep = esel ? (mcnt == 510) : 1'b1;
    checks += 2;
    if (sel !== esel)        fail("sel");
    if (seg2_step !== estep) fail("seg2_step");
    if (!r && md != last_mode) n_switch++;
    last_mode = md;
    if (r) begin
      if (sd[8:0] == 0 || sd[17:9] == 0) n_zero++;
      m1   = (sd[8:0]  == 0) ? 9'h1 : sd[8:0];
      m2   = (sd[17:9] == 0) ? 9'h1 : sd[17:9];
      mcnt = 0;
    end else if (esel) begin
      n_split++;
      m1 = 9'(ref_leap(32'(m1), 32'h11, 9, 9));
      if (estep) begin
        n_seg2++;
        m2 = 9'(ref_leap(32'(m2), 32'h11, 9, 9));
      end
      mcnt = (mcnt == 510) ? 0 : mcnt + 1;
    end else begin
      logic [17:0] j;
      n_joined++;
      j    = 18'(ref_leap(32'({m2, m1}), 32'h81, 18, 18));
      m1   = j[8:0];
      m2   = j[17:9];
      mcnt = 0;
    end
    @(negedge clk);
    checks++;
    if (rnd !== {m2, m1}) fail($sformatf("rnd %h exp %h", rnd, {m2, m1}));
  endtask

  // Run from a fresh seed in one mode; return the number of words until the
  // output first equals the seed again (0 if not within max_cycles).
  task automatic measure(input mode_e md, input logic [17:0] sd, input int max_cycles, output int period);
    int seg2_before;
    cycle(1'b1, md, sd);
    period = 0;
    checks++;
    if (rnd !== sd) fail("first word after reset is not the seed");
    for (int i = 1; i <= max_cycles; i++) begin
      cycle(1'b0, md, sd);
      if (period == 0 && rnd == sd) period = i;
    end
  endtask

  initial begin
    int p, s2_before;
    last_mode = MODE_AUTO;
    mcnt = 0;
    rst = 1'b1; mode = MODE_AUTO; seed = '0;
    @(negedge clk);

    // 1. automatic (split) mode: full period
    s2_before = n_seg2;
    measure(MODE_AUTO, 18'h2b3c5, 261121 + 600, p);
    checks++;
    if (p != 261121) fail($sformatf("split period %0d, expected 261121", p));
    checks++;
    if (n_seg2 - s2_before != 512) fail($sformatf("segment #2 steps %0d", n_seg2 - s2_before));
    $display("split-mode period: %0d words", p);

    // 2. joined mode: period of the conventional leap-ahead LFSR
    measure(MODE_JOINED, 18'h2b3c5, 29127 + 100, p);
    checks++;
    if (p != 29127) fail($sformatf("joined period %0d, expected 29127", p));
    $display("joined-mode period: %0d words", p);

    // 3. random mode switches and resets
    cycle(1'b1, MODE_AUTO, 18'h1);
    for (int i = 0; i < 20000; i++) begin
      mode_e md;
      logic  r;
      logic [17:0] sd;
      md = mode;
      if ($urandom_range(0, 999) < 3) md = mode_e'($urandom_range(0, 2));
      r  = ($urandom_range(0, 999) < 2);
      sd = ($urandom_range(0, 2) == 0) ? {9'($urandom), 9'h0} : 18'($urandom);
      cycle(r, md, sd);
    end

    // 4. all-zero seed
    cycle(1'b1, MODE_AUTO, 18'h0);
    checks++;
    if (rnd !== 18'h00201) fail("zero seed not replaced");

    checks += 5;
    if (n_split  == 0) fail("split stepping never happened");
    if (n_joined == 0) fail("joined stepping never happened");
    if (n_seg2   == 0) fail("segment #2 never stepped");
    if (n_switch == 0) fail("no mode switch");
    if (n_zero   == 0) fail("no zero seed");
    $display("split=%0d joined=%0d seg2_steps=%0d switches=%0d zero_seeds=%0d",
             n_split, n_joined, n_seg2, n_switch, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
