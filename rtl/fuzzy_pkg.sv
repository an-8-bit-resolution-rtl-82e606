// Shared constants of the fuzzy inference processor.
//
// The processor evaluates singleton-consequent fuzzy rules on J crisp inputs of N bits.
// Each input has two groups of non-overlapping membership functions (one per
// membership-function circuit); a group memory holds M edges per input, an even edge rising
// and an odd edge falling, so a group has M/2 labels and an input M labels in all.
// K operational elements each score one singleton over I sub-rules.  Every pipeline stage
// works in slots of S = max(M,N)+1 clock cycles, one input per slot.
//
// N = 8, M = 8, K = 8 and I = 4 follow the document; J = 8 is this design's choice.
package fuzzy_pkg;
  parameter int unsigned N_DEF = 8;  // resolution in bits
  parameter int unsigned M_DEF = 8;  // edges per group memory per input (= labels per input)
  parameter int unsigned J_DEF = 8;  // number of inputs
  parameter int unsigned K_DEF = 8;  // operational elements (singletons)
  parameter int unsigned I_DEF = 4;  // sub-rules per operational element

  // Cycles per pipeline slot: max(M,N) plus one for the registered memory read.
  function automatic int unsigned slot_len(int unsigned m, int unsigned n);
    return ((m > n) ? m : n) + 1;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction
endpackage
