// Shared constants and width helpers for the parallel-streaming neural-like
// encryption/decryption datapath.
//
// N_INPUTS is the number of inputs of every neuron (and, in the network, the
// number of neurons), DATA_BITS the operand width n, which is also the number
// of pipeline processing units, and WEIGHT_BITS the weight width.  The
// defaults (8/8/8) are this design's choice; the source of the architecture
// leaves all three open.
//
// A macro-partial product is a sum of up to N weights and needs
// WEIGHT_BITS + log2(N) bits, the "(n + log2 N)-bit adder" width of the
// architecture.  The partial result of the halving recurrence
// Z_i = Z_{i-1}/2 + P_M can reach twice the table range, so the accumulator
// carries one guard bit more than that.
package psne_pkg;

  localparam int unsigned N_INPUTS    = 8;
  localparam int unsigned DATA_BITS   = 8;
  localparam int unsigned WEIGHT_BITS = 8;

  // Width of one macro-partial-product table word.
  function automatic int unsigned pm_width(int unsigned wbits, int unsigned n_in);
    return wbits + ((n_in > 1) ? $clog2(n_in) : 1);
  endfunction

  // Width of the partial-result accumulator (table width plus a guard bit).
  function automatic int unsigned acc_width(int unsigned wbits, int unsigned n_in);
    return pm_width(wbits, n_in) + 1;
  endfunction

  // Width of an index over n items (at least one bit).
  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Cascade of encryption stages.  Stage 0 takes xw-bit data and ww-bit
  // weights; every later stage takes the previous stage's output words as
  // operands and uses weights of the same width, so that a scaled signed
  // permutation can still be represented exactly.
  function automatic int unsigned stage_xw(int unsigned s, int unsigned xw,
                                           int unsigned ww, int unsigned n_in);
    return (s == 0) ? xw : ww + s * acc_width(0, n_in);
  endfunction

  function automatic int unsigned stage_ww(int unsigned s, int unsigned xw,
                                           int unsigned ww, int unsigned n_in);
    return (s == 0) ? ww : stage_xw(s, xw, ww, n_in);
  endfunction

  // Output (ciphertext) word width of encryption stage s.
  function automatic int unsigned stage_zw(int unsigned s, int unsigned xw,
                                           int unsigned ww, int unsigned n_in);
    return acc_width(stage_ww(s, xw, ww, n_in), n_in);
  endfunction

endpackage
