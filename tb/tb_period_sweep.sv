// tb_period_sweep: period sweep of seg_leap_urng with 3 output bits.
//
// For every LFSR length N = 4..20 two generators with M = 3 run side by
// side: one forced into joined mode (the conventional leap-ahead LFSR) and one
// in automatic mode (split exactly when 2^N - 1 is divisible by 3, i.e. for
// even N). Each starts from the all-ones seed. The testbench counts the clocks
// until the generator state first returns to the seed. It compares that count
// with the period worked out here:
//   joined : (2^N - 1) / gcd(2^N - 1, 3)
//   split  : (2^I - 1) * (2^J - 1),  I = ceil(N/2), J = N - I
//            (segment #1 leaps 2 steps, segment #2 one step; both counts are
//             coprime to 2^k - 1, so each segment keeps its full period)
// The state is read hierarchically, since with 3 output bits the output word
// alone does not show when the sequence repeats. The longest period,
// 2^20 - 1 = 1,048,575 clocks, sets the run length.
// A further generator, N = 4 and M = 4 (the 4-stage, 4-bit example), must
// stay joined in automatic mode, since gcd(15, 4) = 1, and repeat after 15
// words; its output word is its whole state.
module tb_period_sweep;

  import lfsr_pkg::*;

  localparam int NMIN = 4;
  localparam int NMAX = 20;
  localparam int RUN  = 1048575 + 100;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5ns clk = ~clk;
  logic rst;

  function automatic longint tgcd(longint a, longint b);
    while (b != 0) begin
      longint t;
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  longint exp_joined [NMIN:NMAX];
  longint exp_auto   [NMIN:NMAX];
  longint got_joined [NMIN:NMAX];
  longint got_auto   [NMIN:NMAX];
  logic   split_seen [NMIN:NMAX];

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_n
    logic [2:0] rnd_j, rnd_a;
    logic       sel_j, sel_a, st_j, st_a;
    longint     cyc;

    seg_leap_urng #(.N(n), .M(3)) u_joined (
      .clk(clk), .rst(rst), .seed({n{1'b1}}), .mode(MODE_JOINED),
      .rnd(rnd_j), .sel(sel_j), .seg2_step(st_j)
    );
    seg_leap_urng #(.N(n), .M(3)) u_auto (
      .clk(clk), .rst(rst), .seed({n{1'b1}}), .mode(MODE_AUTO),
      .rnd(rnd_a), .sel(sel_a), .seg2_step(st_a)
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        cyc <= 0;
        got_joined[n] <= 0;
        got_auto[n]   <= 0;
        split_seen[n] <= 1'b0;
      end else begin
        cyc <= cyc + 1;
        if (sel_a) split_seen[n] <= 1'b1;
        if (cyc > 0 && got_joined[n] == 0 && u_joined.state == {n{1'b1}}) got_joined[n] <= cyc;
        if (cyc > 0 && got_auto[n]   == 0 && u_auto.state   == {n{1'b1}}) got_auto[n]   <= cyc;
      end
    end
  end

  // 4-stage, 4-bit example
  logic [3:0] rnd44;
  logic       sel44, st44;
  longint     cyc44, got44;
  seg_leap_urng #(.N(4), .M(4)) u_44 (
    .clk(clk), .rst(rst), .seed(4'b1011), .mode(MODE_AUTO),
    .rnd(rnd44), .sel(sel44), .seg2_step(st44)
  );
  always_ff @(posedge clk) begin
    if (rst) begin
      cyc44 <= 0;
      got44 <= 0;
    end else begin
      cyc44 <= cyc44 + 1;
      if (cyc44 > 0 && got44 == 0 && rnd44 == 4'b1011) got44 <= cyc44;
    end
  end

  initial begin : watchdog
    repeat (RUN + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_split;
    for (int n = NMIN; n <= NMAX; n++) begin
      longint full, i, j;
      full = (longint'(1) << n) - 1;
      i    = (n + 1) / 2;
      j    = n - i;
      exp_joined[n] = full / tgcd(full, 3);
      exp_auto[n]   = (tgcd(full, 3) != 1) ? ((longint'(1) << i) - 1) * ((longint'(1) << j) - 1)
                                           : exp_joined[n];
    end
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (RUN) @(posedge clk);
    @(negedge clk);
    n_split = 0;
    $display("  N   joined period   segmented period   split");
    for (int n = NMIN; n <= NMAX; n++) begin
      $display("%3d %15d %18d %7d", n, got_joined[n], got_auto[n], split_seen[n]);
      checks += 3;
      if (got_joined[n] != exp_joined[n]) begin
        failures++;
        $display("FAIL N=%0d joined period %0d expected %0d", n, got_joined[n], exp_joined[n]);
      end
      if (got_auto[n] != exp_auto[n]) begin
        failures++;
        $display("FAIL N=%0d segmented period %0d expected %0d", n, got_auto[n], exp_auto[n]);
      end
      if (split_seen[n] != (n % 2 == 0)) begin
        failures++;
        $display("FAIL N=%0d automatic split decision", n);
      end
      if (split_seen[n]) n_split++;
    end
    $display("N=4 M=4: period %0d, split %0d", got44, sel44);
    checks += 2;
    if (got44 != 15) begin
      failures++;
      $display("FAIL N=4 M=4 period %0d expected 15", got44);
    end
    if (sel44 !== 1'b0) begin
      failures++;
      $display("FAIL N=4 M=4 should stay joined");
    end
    checks++;
    if (n_split == 0 || n_split == NMAX - NMIN + 1) begin
      failures++;
      $display("FAIL the sweep never exercised both modes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
