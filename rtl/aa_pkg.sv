// aa_pkg - shared types and constant functions for the adaptively
// approximate divider (AAXD) and square-root (AASR) circuits.
//
// seq_state_e is the control state of the sequential versions: IDLE waits
// for start, PREP is the single preparation cycle (leading-one detection,
// pruning, shift amount), ITER covers the shifted-subtraction cycles of the
// reduced-width core and OUTP is the single output cycle (shift, correction).
// isqrt() is the integer square root used to fill the lookup-table SQR core
// at elaboration time; it is never synthesised as logic of its own.
package aa_pkg;

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_PREP = 2'd1,
    S_ITER = 2'd2,
    S_OUTP = 2'd3
  } seq_state_e;

  // floor(sqrt(x)) by linear search; used only on constants.
  function automatic int unsigned isqrt(input int unsigned x);
    int unsigned r;
    r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

endpackage
