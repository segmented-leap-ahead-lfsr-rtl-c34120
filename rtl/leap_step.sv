// leap_step: leap-ahead transform of an N-stage Galois LFSR.
//
// A conventional Galois LFSR advances its state by one single step per clock,
// X(t+1) = A X(t), where A is the shift with feedback of X_N into X_1 and into
// every tapped stage. This block computes X(t+M) = A^M X(t) in one
// combinational pass, so that a register fed from it leaps M single steps per
// clock and its stages can be read out as an M-bit random word.
//
// How: the columns of A^M are worked out at elaboration time by stepping each
// unit vector M times (lfsr_pkg::leap); the hardware is then one XOR tree per
// output bit, XOR-ing the input bits whose column has a 1 in that row. With
// M = 1 this is exactly the one-bit Galois LFSR next-state logic.
//
// Interface: state[k-1] = X_k in, state_next out; purely combinational, no
// clock. TAPS bit 0 is the feedback into X_1 and bit k the tap C_k into
// X_{k+1}. The matrix method is the reference design's; the default tap masks
// are this implementation's choice (any maximal-length mask may be given).
module leap_step #(
  parameter int unsigned   N    = 18,
  parameter int unsigned   M    = 18,
  parameter lfsr_pkg::vec_t TAPS = lfsr_pkg::default_taps(N)
) (
  input  logic [N-1:0] state,
  output logic [N-1:0] state_next
);

  if (N < 2 || N > lfsr_pkg::MAX_N) begin : g_bad_n
    $error("leap_step: N must lie in 2..%0d", lfsr_pkg::MAX_N);
  end
  if (M < 1) begin : g_bad_m
    $error("leap_step: M must be at least 1");
  end

  // col[c] = A^M e_c : the contribution of input bit c to the next state.
  logic [N-1:0] col [N];

  for (genvar c = 0; c < N; c++) begin : g_col
    localparam lfsr_pkg::vec_t COL = lfsr_pkg::leap(lfsr_pkg::vec_t'(1) << c, TAPS, N, M);
    assign col[c] = COL[N-1:0];
  end

  always_comb begin
    state_next = '0;
    for (int unsigned c = 0; c < N; c++) begin
      if (state[c]) state_next = state_next ^ col[c];
    end
  end

endmodule
