// dycac_pkg: constants, types and elaboration-time functions shared by the
// 3D-DyCAC codec.
//
// The phase-1 code is a numerical system: a code word c_N..c_1 stands for the
// value sum(c_i * b_i). The bases come from the sequence g_k, the number of
// code words available with k bits:
//   g_1..g_5 = 2, 3, 4, 5, 7 and g_k = g_{k-1} + g_{k-5} for k > 5
//   b_1 = 1, b_2 = 0, b_i = g_{i-1} - g_{i-2} for 3 <= i <= N-1, b_N = g_{N-3}
// For N = 9 this gives the bases 9 3 2 2 1 1 1 0 1 (b_9 .. b_1) and the
// values 0 .. 20 (g_9 = 21 code words). Because b_2 = 0, bit d_2 carries no
// weight and is free for the phase-2 inversion.
//
// The encoder walks from d_N down to d_1 and keeps a remainder r. A bit that
// continues a run of 1s is set when r >= b_i ("continue" threshold); a bit
// that would start a new run of 1s is set only when r >= a larger "start"
// threshold, so that runs of 1s and 0s stay long. The start thresholds are
// g_{i-3} for i >= 6, and 4, 2, 2, 1, 1 for i = 5 .. 1; the continue
// threshold of d_2 is 0. These thresholds are this design's own reading of
// the mapping: they give every value exactly one code word, the sum is always
// exact, no code word holds 010, 101, 0110 or 1001 (checked for N = 6 .. 24),
// and value 3 maps to 000001111 as in the worked example of the method.
//
// A 3x3 TSV cluster holds d_1..d_9 column by column (3 rows):
//     d1 d4 d7
//     d2 d5 d8
//     d3 d6 d9
// d5 is the victim, d2/d4/d6/d8 its direct neighbours, d1/d3/d7/d9 the
// diagonal ones. The next cluster sits to the right, so its d1, d2, d3 (the
// triangular window) face this cluster's d8. Bit d_i is bit i-1 of a word.
package dycac_pkg;

  localparam int unsigned CLUSTER_N = 9;  // TSVs per 3x3 cluster

  // Bit positions of d_i inside a cluster word (d_i -> bit i-1).
  localparam int unsigned D1 = 0;
  localparam int unsigned D2 = 1;
  localparam int unsigned D3 = 2;
  localparam int unsigned D4 = 3;
  localparam int unsigned D5 = 4;
  localparam int unsigned D6 = 5;
  localparam int unsigned D7 = 6;
  localparam int unsigned D8 = 7;
  localparam int unsigned D9 = 8;

  typedef logic [CLUSTER_N-1:0] cluster_word_t;

  // g_k: number of code words of a k-bit code word (k >= 1).
  function automatic int unsigned cac_g(int unsigned k);
    int unsigned w1, w2, w3, w4, w5, wn;
    case (k)
      0, 1: return 2;
      2: return 3;
      3: return 4;
      4: return 5;
      5: return 7;
      default: begin
        w1 = 2; w2 = 3; w3 = 4; w4 = 5; w5 = 7;
        for (int unsigned j = 6; j <= k; j++) begin
          wn = w5 + w1;
          w1 = w2; w2 = w3; w3 = w4; w4 = w5; w5 = wn;
        end
        return w5;
      end
    endcase
  endfunction

  // b_i: weight of code bit d_i in an n-bit code word.
  function automatic int unsigned cac_base(int unsigned i, int unsigned n);
    if (i == 1) return 1;
    if (i == 2) return 0;
    if (i < n) return cac_g(i - 1) - cac_g(i - 2);
    return cac_g(n - 3);
  endfunction

  // b_1 + ... + b_i of an n-bit code word.
  function automatic int unsigned cac_base_sum(int unsigned i, int unsigned n);
    int unsigned s = 0;
    for (int unsigned j = 1; j <= i; j++) s += cac_base(j, n);
    return s;
  endfunction

  // Threshold for setting d_i when d_{i+1} is 0 (or i = N): start of a run.
  function automatic int unsigned cac_thr_start(int unsigned i);
    case (i)
      1, 2: return 1;
      3, 4: return 2;
      5: return 4;
      default: return cac_g(i - 3);
    endcase
  endfunction

  // Threshold for setting d_i when d_{i+1} is 1: continuation of a run.
  function automatic int unsigned cac_thr_cont(int unsigned i, int unsigned n);
    if (i == 2) return 0;
    return cac_base(i, n);
  endfunction

  // Largest data width a cluster of n code bits can carry.
  function automatic int unsigned cac_data_bits(int unsigned n);
    return $clog2(cac_g(n) + 1) - 1;
  endfunction

endpackage
