// lfsr_segment: one segment of the segmented leap-ahead LFSR.
//
// A segment is a W-stage leap-ahead Galois LFSR (its own register, its own
// feedback polynomial TAPS, leaping M single steps per enabled clock) with a
// multiplexer in front of its register:
//   sel = 1 : the segment runs on its own feedback (split operation);
//   sel = 0 : the register takes ext_next, the slice of the next state that
//             the joined, full-length leap-ahead LFSR computes, so that the two
//             segments behave as one long LFSR (joined operation).
// The mux and its encoding (0 = from the other segment, 1 = own feedback)
// follow the reference architecture. There, the mux carries a single feedback
// bit. With a leap of M > 1 steps, however, the whole next state depends on
// the feedback, so here the mux selects a whole next-state vector.
//
// en is a synchronous step enable. It replaces the slower, divided clock that
// drives the upper segment, so the whole generator stays on one clock. rst
// (synchronous, active high) loads seed. An all-zero seed would lock the LFSR
// up, so it is replaced by 1 (X_1 set).
//
// rnd is the segment's random output: its last M stages, X_{W-M+1}..X_W,
// read straight from the register (no extra latency).
module lfsr_segment #(
  parameter int unsigned    W    = 9,
  parameter int unsigned    M    = 9,
  parameter lfsr_pkg::vec_t TAPS = lfsr_pkg::default_taps(W)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] seed,
  input  logic         sel,
  input  logic         en,
  input  logic [W-1:0] ext_next,
  output logic [W-1:0] state,
  output logic [M-1:0] rnd
);

  if (M < 1 || M > W) begin : g_bad_m
    $error("lfsr_segment: M must lie in 1..W");
  end

  logic [W-1:0] own_next;

  leap_step #(.N(W), .M(M), .TAPS(TAPS)) u_leap (
    .state      (state),
    .state_next (own_next)
  );

  always_ff @(posedge clk) begin
    if (rst)     state <= (seed == '0) ? W'(1) : seed;
    else if (en) state <= sel ? own_next : ext_next;
  end

  assign rnd = state[W-1 -: M];

  // A disabled segment holds its state.
  a_hold : assert property (@(posedge clk) disable iff (rst) !en |=> $stable(state));

endmodule
