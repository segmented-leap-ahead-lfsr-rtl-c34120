// seg_ctrl: feedback-mode and step control of the segmented leap-ahead LFSR.
//
// Two jobs:
//  * Sel. In MODE_AUTO the generator splits into two segments exactly when
//    2^N - 1 and M share a factor: only then does the joined leap-ahead LFSR
//    lose period (its period is (2^N - 1) / gcd(2^N - 1, M)). MODE_JOINED and
//    MODE_SPLIT force the choice. sel = 1 means split.
//  * The upper segment's clock. The reference design runs segment #2 on a
//    clock divided by the number of distinct states segment #1 passes through.
//    Here segment #1 steps every clock and a modulo-P1 counter produces a
//    one-cycle enable, step2, for segment #2 once per full period P1 of
//    segment #1, so the two periods multiply. P1 = (2^I - 1) / gcd(2^I - 1, M1)
//    is fixed at elaboration. In joined mode step2 is held high and the
//    counter at 0.
//
// Timing: step2 is combinational from the counter and sel. It is high in the
// cycle whose clock edge moves segment #2. The first split-mode step of
// segment #2 comes P1 clocks after reset or after entering split mode. rst is
// synchronous and active high.
module seg_ctrl #(
  parameter int unsigned N  = 18,
  parameter int unsigned M  = 18,
  parameter int unsigned I  = lfsr_pkg::seg1_len(N),
  parameter int unsigned M1 = (M + 1) / 2
) (
  input  logic            clk,
  input  logic            rst,
  input  lfsr_pkg::mode_e mode,
  output logic            sel,
  output logic            step2
);

  localparam longint unsigned P1   = lfsr_pkg::leap_period(I, M1);
  localparam bit              AUTO = lfsr_pkg::split_pays(N, M);
  localparam int unsigned     CW   = (P1 > 1) ? $clog2(P1) : 1;

  logic [CW-1:0] cnt;
  logic          wrap;

  always_comb begin
    unique case (mode)
      lfsr_pkg::MODE_JOINED: sel = 1'b0;
      lfsr_pkg::MODE_SPLIT:  sel = 1'b1;
      default:               sel = AUTO;
    endcase
  end

  assign wrap  = (cnt == CW'(P1 - 1));
  assign step2 = sel ? wrap : 1'b1;

  always_ff @(posedge clk) begin
    if (rst || !sel) cnt <= '0;
    else if (wrap)   cnt <= '0;
    else             cnt <= cnt + CW'(1);
  end

  a_cnt_range : assert property (@(posedge clk) disable iff (rst) cnt < CW'(P1));

endmodule
