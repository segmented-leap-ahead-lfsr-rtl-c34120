// tb_leap_step: self-checking testbench for leap_step.
//
// The expected next state is worked out here, independently of the block, by
// repeating the one-bit Galois LFSR step (X_1' = X_n, X_{k+1}' = X_k ^ C_k X_n)
// M times on the input. Checked configurations:
//   * 4 stages, taps {X_1, C_3}, leaps of 1, 2, 3 and 4: every input value;
//   * 4 stages, leap 1: the single-step transitions of the 4-bit state ring
//     of the reference example (states written X_1 X_2 X_3 X_4);
//   * 9 and 18 stages, leaps of 9 and 18: random inputs.
// The block is combinational; each check applies an input and waits 1 ns.
module tb_leap_step;

  int checks   = 0;
  int failures = 0;

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

  // 4-stage instances, leaps 1..4.
  logic [3:0] in4;
  logic [3:0] out4 [1:4];
  for (genvar g = 1; g <= 4; g++) begin : g_four
    leap_step #(.N(4), .M(g), .TAPS(24'h9)) u_dut (.state(in4), .state_next(out4[g]));
  end

  logic [8:0]  in9,  out9;
  logic [17:0] in18, out18;
  leap_step #(.N(9),  .M(9))  u_dut9  (.state(in9),  .state_next(out9));
  leap_step #(.N(18), .M(18)) u_dut18 (.state(in18), .state_next(out18));

  // Printed ring of the reference 4-stage example: consecutive pairs that are
  // single steps of the LFSR, as strings X_1 X_2 X_3 X_4.
  string ring_from [12] = '{"1100","1000","0100","0010","0001","1001","1101","1111","1110","0111","1010","0101"};
  string ring_to   [12] = '{"0110","0100","0010","0001","1001","1101","1111","1110","0111","1010","0101","1011"};

  function automatic logic [3:0] from_x1x4(string s);
    logic [3:0] v;
    for (int k = 0; k < 4; k++) v[k] = (s[k] == "1");
    return v;
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive 4-stage
    for (int v = 0; v < 16; v++) begin
      in4 = 4'(v);
      #1ns;
      for (int m = 1; m <= 4; m++) begin
        logic [3:0] exp4;
        exp4 = 4'(ref_leap(32'(v), 32'h9, 4, m));
        checks++;
        if (out4[m] !== exp4) begin
          failures++;
          $display("FAIL N=4 M=%0d in=%b got=%b exp=%b", m, in4, out4[m], exp4);
        end
      end
    end
    // printed ring transitions
    for (int i = 0; i < 12; i++) begin
      in4 = from_x1x4(ring_from[i]);
      #1ns;
      checks++;
      if (out4[1] !== from_x1x4(ring_to[i])) begin
        failures++;
        $display("FAIL ring %s -> expected %s", ring_from[i], ring_to[i]);
      end
    end
    // leap 3 from 1000 lands where three single steps land: 0001
    in4 = from_x1x4("1000");
    #1ns;
    checks++;
    if (out4[3] !== from_x1x4("0001")) begin
      failures++;
      $display("FAIL leap-3 from 1000");
    end
    // random 9- and 18-stage
    for (int t = 0; t < 500; t++) begin
      in9  = 9'($urandom);
      in18 = 18'($urandom);
      #1ns;
      checks += 2;
      if (out9 !== 9'(ref_leap(32'(in9), 32'h11, 9, 9))) begin
        failures++;
        $display("FAIL N=9 in=%h got=%h", in9, out9);
      end
      if (out18 !== 18'(ref_leap(32'(in18), 32'h81, 18, 18))) begin
        failures++;
        $display("FAIL N=18 in=%h got=%h", in18, out18);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
