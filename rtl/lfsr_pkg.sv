// lfsr_pkg: types, constants and elaboration-time functions shared by the
// segmented leap-ahead LFSR random number generator.
//
// State convention used throughout: an n-stage Galois LFSR holds stages
// X_1..X_n in a vector s with s[k-1] = X_k. One single step (the shift
// register of the conventional one-bit Galois LFSR) is
//     X_1' = X_n,   X_{k+1}' = X_k ^ (C_k & X_n)   for k = 1..n-1,
// which is  s' = (s << 1) ^ (X_n ? taps : 0)  with a tap mask whose bit 0 is
// the feedback into X_1 (always 1) and whose bit k is tap C_k.
//
// The functions below are evaluated by the elaborator only; they build the
// leap-ahead matrix A^m column by column and work out the sequence periods
// that decide whether the LFSR is split into two segments.
package lfsr_pkg;

  // Widest LFSR (and segment) the tap table below covers.
  localparam int unsigned MAX_N = 24;

  typedef logic [MAX_N-1:0] vec_t;

  // Feedback mode request of the generator.
  //   MODE_AUTO   : split exactly when gcd(2^n - 1, m) > 1 (the case where the
  //                 joined leap-ahead LFSR loses period)
  //   MODE_JOINED : one n-stage leap-ahead LFSR (segments chained)
  //   MODE_SPLIT  : two independent segments, the second stepped once per
  //                 full period of the first
  typedef enum logic [1:0] {
    MODE_AUTO   = 2'd0,
    MODE_JOINED = 2'd1,
    MODE_SPLIT  = 2'd2
  } mode_e;

  // Tap masks giving the maximal period 2^n - 1, found by exhaustive period
  // search (fewest taps first). The 4-stage mask (taps into X_1 and C_3)
  // reproduces the 4-bit state ring of the reference 4-stage example.
  function automatic vec_t default_taps(int unsigned n);
    case (n)
      2:  return vec_t'(24'h000003);
      3:  return vec_t'(24'h000003);
      4:  return vec_t'(24'h000009);
      5:  return vec_t'(24'h000005);
      6:  return vec_t'(24'h000003);
      7:  return vec_t'(24'h000003);
      8:  return vec_t'(24'h000087);
      9:  return vec_t'(24'h000011);
      10: return vec_t'(24'h000009);
      11: return vec_t'(24'h000005);
      12: return vec_t'(24'h000107);
      13: return vec_t'(24'h000027);
      14: return vec_t'(24'h001007);
      15: return vec_t'(24'h000003);
      16: return vec_t'(24'h00100b);
      17: return vec_t'(24'h000009);
      18: return vec_t'(24'h000081);
      19: return vec_t'(24'h000027);
      20: return vec_t'(24'h000009);
      21: return vec_t'(24'h000005);
      22: return vec_t'(24'h000003);
      23: return vec_t'(24'h000021);
      24: return vec_t'(24'h000087);
      default: return '0;
    endcase
  endfunction

  // One single step of the n-stage Galois LFSR.
  function automatic vec_t galois_step(vec_t s, vec_t taps, int unsigned n);
    vec_t mask;
    vec_t nxt;
    logic out;
    mask = (n >= MAX_N) ? '1 : ((vec_t'(1) << n) - vec_t'(1));
    out  = s[n-1];
    nxt  = ((s << 1) ^ (out ? taps : '0)) & mask;
    return nxt;
  endfunction

  // m single steps: column c of A^m is leap(e_c, ...).
  function automatic vec_t leap(vec_t s, vec_t taps, int unsigned n, int unsigned m);
    vec_t v;
    v = s;
    for (int unsigned i = 0; i < m; i++) v = galois_step(v, taps, n);
    return v;
  endfunction

  function automatic longint unsigned gcd(longint unsigned a, longint unsigned b);
    longint unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Period of the state sequence of a maximal n-stage LFSR leaping m steps
  // per clock: lcm(2^n - 1, m) / m = (2^n - 1) / gcd(2^n - 1, m).
  function automatic longint unsigned leap_period(int unsigned n, int unsigned m);
    longint unsigned full;
    full = (longint'(1) << n) - 1;
    return full / gcd(full, longint'(m));
  endfunction

  // The joined LFSR loses period exactly when 2^n - 1 and m share a factor.
  function automatic bit split_pays(int unsigned n, int unsigned m);
    return gcd((longint'(1) << n) - 1, longint'(m)) != 1;
  endfunction

  // Segment sizes: segment #1 takes the larger half of the stages and of the
  // output bits, segment #2 the rest.
  function automatic int unsigned seg1_len(int unsigned n);
    return (n + 1) / 2;
  endfunction

endpackage
