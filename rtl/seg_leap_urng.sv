// seg_leap_urng: segmented leap-ahead LFSR uniform random number generator.
//
// Problem: a leap-ahead LFSR turns one N-stage LFSR into an M-bit-per-clock
// generator by advancing A^M steps per clock. But its state sequence then
// repeats after (2^N - 1) / gcd(2^N - 1, M) clocks, so whenever 2^N - 1 and M
// share a factor the period collapses (N = M = 18: 29,127 instead of
// 262,143).
//
// Idea: split the register into two segments, each a maximal-length
// leap-ahead LFSR of its own:
//   segment #1: I = ceil(N/2) stages (X_1..X_I), leaps M1 = ceil(M/2) steps,
//               steps every clock;
//   segment #2: J = N - I stages (X_{I+1}..X_N), leaps M2 = M - M1 steps,
//               steps once per full period P1 of segment #1.
// The combined sequence then has period P1 * P2 (N = M = 18: 511 * 511 =
// 261,121). When splitting does not pay, the segments are chained into one
// N-stage leap-ahead LFSR (joined mode), which is the conventional design.
//
// Structure: a full-length leap_step computes the joined next state; each
// lfsr_segment muxes between that slice (sel = 0) and its own leap-ahead
// feedback (sel = 1); seg_ctrl picks sel and produces segment #2's slow step.
//
// Interface and timing: one clock. rst (synchronous, active high) loads seed
// (bit k-1 = X_k); rnd shows the seed-derived word in the first cycle after
// reset and a new M-bit word every clock after that. In joined mode rnd is
// X_{N-M+1}..X_N; in split mode it is {segment #2's last M2 stages, segment
// #1's last M1 stages}. For M = N both are the full state. mode selects
// automatic, forced-joined or forced-split operation; sel and seg2_step show
// the chosen mode and the cycles in which segment #2 moves.
//
// The segmentation, the mux and the divided upper clock follow the reference
// architecture. The rest is this design's own choice: the step enable in place
// of a second clock, the tap masks, the exact segment sizes for odd N or M,
// the output bit selection and the mode override.
module seg_leap_urng #(
  parameter int unsigned    N      = 18,
  parameter int unsigned    M      = 18,
  parameter lfsr_pkg::vec_t TAPS_N = lfsr_pkg::default_taps(N),
  parameter lfsr_pkg::vec_t TAPS_1 = lfsr_pkg::default_taps(lfsr_pkg::seg1_len(N)),
  parameter lfsr_pkg::vec_t TAPS_2 = lfsr_pkg::default_taps(N - lfsr_pkg::seg1_len(N))
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N-1:0]    seed,
  input  lfsr_pkg::mode_e mode,
  output logic [M-1:0]    rnd,
  output logic            sel,
  output logic            seg2_step
);

  localparam int unsigned I  = lfsr_pkg::seg1_len(N);
  localparam int unsigned J  = N - I;
  localparam int unsigned M1 = (M + 1) / 2;
  localparam int unsigned M2 = M - M1;

  if (M < 2 || M > N || M1 > I || M2 > J) begin : g_bad_size
    $error("seg_leap_urng: need 2 <= M <= N");
  end

  logic [N-1:0]  state;
  logic [N-1:0]  joined_next;
  logic [I-1:0]  s1;
  logic [J-1:0]  s2;
  logic [M1-1:0] rnd1;
  logic [M2-1:0] rnd2;

  seg_ctrl #(.N(N), .M(M), .I(I), .M1(M1)) u_ctrl (
    .clk   (clk),
    .rst   (rst),
    .mode  (mode),
    .sel   (sel),
    .step2 (seg2_step)
  );

  leap_step #(.N(N), .M(M), .TAPS(TAPS_N)) u_joined (
    .state      (state),
    .state_next (joined_next)
  );

  lfsr_segment #(.W(I), .M(M1), .TAPS(TAPS_1)) u_seg1 (
    .clk      (clk),
    .rst      (rst),
    .seed     (seed[I-1:0]),
    .sel      (sel),
    .en       (1'b1),
    .ext_next (joined_next[I-1:0]),
    .state    (s1),
    .rnd      (rnd1)
  );

  lfsr_segment #(.W(J), .M(M2), .TAPS(TAPS_2)) u_seg2 (
    .clk      (clk),
    .rst      (rst),
    .seed     (seed[N-1:I]),
    .sel      (sel),
    .en       (seg2_step),
    .ext_next (joined_next[N-1:I]),
    .state    (s2),
    .rnd      (rnd2)
  );

  assign state = {s2, s1};
  assign rnd   = sel ? {rnd2, rnd1} : state[N-1 -: M];

endmodule
