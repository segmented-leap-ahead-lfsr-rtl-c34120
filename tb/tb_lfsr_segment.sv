// tb_lfsr_segment: self-checking testbench for lfsr_segment.
//
// Two segments are driven from one clock: the default 9-stage segment leaping
// 9 steps, and a 4-stage segment leaping 3 steps (so that its 3-bit output is
// a slice of the state). A reference register in the testbench follows the
// expected behaviour, computed by repeating the one-bit Galois step:
//   rst loads the seed (an all-zero seed becomes 1), sel = 1 leaps on the
//   segment's own feedback, sel = 0 loads ext_next, en = 0 holds.
// sel, en, ext_next and occasional resets are random. Every cycle the state
// and rnd (the top M stages) are compared.
module tb_lfsr_segment;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5ns clk = ~clk;

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

  logic       rst, sel, en;
  logic [8:0] seed9, ext9, st9;
  logic [8:0] rnd9;
  logic [3:0] seed4, ext4, st4;
  logic [2:0] rnd4;

  lfsr_segment u_dut9 (
    .clk(clk), .rst(rst), .seed(seed9), .sel(sel), .en(en),
    .ext_next(ext9), .state(st9), .rnd(rnd9)
  );
  lfsr_segment #(.W(4), .M(3), .TAPS(24'h9)) u_dut4 (
    .clk(clk), .rst(rst), .seed(seed4), .sel(sel), .en(en),
    .ext_next(ext4), .state(st4), .rnd(rnd4)
  );

  logic [8:0] exp9;
  logic [3:0] exp4;
  int n_own = 0, n_ext = 0, n_hold = 0, n_zero = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sel = 1'b1; en = 1'b1;
    seed9 = 9'h1a5; seed4 = 4'b1101; ext9 = '0; ext4 = '0;
    exp9 = 9'h1a5; exp4 = 4'b1101;
    @(negedge clk);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // compare the state reached at the last edge
      checks += 4;
      if (st9 !== exp9 || rnd9 !== exp9) begin
        failures++;
        $display("FAIL cyc %0d W=9 state=%h rnd=%h exp=%h", cyc, st9, rnd9, exp9);
      end
      if (st4 !== exp4 || rnd4 !== exp4[3:1]) begin
        failures++;
        $display("FAIL cyc %0d W=4 state=%b rnd=%b exp=%b", cyc, st4, rnd4, exp4);
      end
      checks -= 2;
      // drive the next cycle
      rst   = ($urandom_range(0, 99) < 3);
      sel   = ($urandom_range(0, 99) < 70);
      en    = ($urandom_range(0, 99) < 80);
      ext9  = 9'($urandom);
      ext4  = 4'($urandom);
      seed9 = ($urandom_range(0, 3) == 0) ? 9'h0 : 9'($urandom);
      seed4 = ($urandom_range(0, 3) == 0) ? 4'h0 : 4'($urandom);
      if (rst) begin
        if (seed9 == 0 || seed4 == 0) n_zero++;
        exp9 = (seed9 == 0) ? 9'h1 : seed9;
        exp4 = (seed4 == 0) ? 4'h1 : seed4;
      end else if (en) begin
        if (sel) begin
          n_own++;
          exp9 = 9'(ref_leap(32'(exp9), 32'h11, 9, 9));
          exp4 = 4'(ref_leap(32'(exp4), 32'h9, 4, 3));
        end else begin
          n_ext++;
          exp9 = ext9;
          exp4 = ext4;
        end
      end else n_hold++;
      @(negedge clk);
    end
    checks++;
    if (n_own == 0 || n_ext == 0 || n_hold == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a case never happened: own=%0d ext=%0d hold=%0d zero=%0d", n_own, n_ext, n_hold, n_zero);
    end
    $display("own=%0d ext=%0d hold=%0d zero-seed=%0d", n_own, n_ext, n_hold, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
