// ffa_pkg -- types and helpers shared by the symmetric fast-FIR (FFA) filters.
//
// adder_arch_e selects how the multi-operand pre/post-processing adders are
// built: a chain of ripple-carry adders, or a chain of 3:2 carry-save
// compressors closed by one ripple-carry adder. Both forms are the ones the
// filters are characterised with; carry-save is the default of the top level.
//
// sym_e tells a sub-filter how its coefficient set is organised:
//   SYM_NONE  no relation, one multiplier per tap
//   SYM_EVEN  c[k] =  c[M-1-k], one multiplier serves two taps
//   SYM_ODD   c[k] = -c[M-1-k], one multiplier serves two taps with a sign
//
// acc_width() gives the internal word length of a filter: products of a
// W-bit sample sum and a W-bit coefficient sum (each up to 4 terms, so W+2
// bits), accumulated over N taps, plus headroom for the post-processing sums.
package ffa_pkg;

  typedef enum logic {
    ADD_RCA = 1'b0,
    ADD_CSA = 1'b1
  } adder_arch_e;

  typedef enum logic [1:0] {
    SYM_NONE = 2'd0,
    SYM_EVEN = 2'd1,
    SYM_ODD  = 2'd2
  } sym_e;

  // Guard bits on top of the data/coefficient word length for sample and
  // coefficient sums of up to four terms.
  localparam int unsigned PRE_GUARD = 3;

  // True when the filter length n splits into l polyphase components.
  function automatic bit is_multiple(int unsigned n, int unsigned l);
    return (n % l) == 0;
  endfunction

  function automatic int unsigned acc_width(int unsigned w, int unsigned n);
    return 2 * w + $clog2(n) + 6;
  endfunction

endpackage
