// nbcac_encoder: phase 1 of 3D-DyCAC, the numerical-system crosstalk
// avoidance encoder.
//
// Maps a K-bit data value to an N-bit code word whose weighted sum with the
// bases b_i of dycac_pkg equals the value. The code words are built from long
// runs of 1s and 0s, so neighbouring TSVs rarely switch in opposite
// directions. The bases follow the method's recurrence; the bit-by-bit mapping
// (a remainder that walks from d_N to d_1, with a "start" and a "continue"
// threshold per bit) is this design's own choice, documented in dycac_pkg.
//
// Each stage compares the remainder with a constant, and subtracts a constant
// when the bit is set: N comparators and N subtractors in a chain.
//
// Interface: data_i (K bits, 2**K <= g_N), code_o (N bits, bit i-1 = d_i).
// Timing: purely combinational.
module nbcac_encoder
  import dycac_pkg::*;
#(
  parameter int unsigned N = 9,  // code bits (TSVs) per code word
  parameter int unsigned K = 4   // data bits per code word
) (
  input  logic [K-1:0] data_i,
  output logic [N-1:0] code_o
);

  localparam int unsigned VW = $clog2(cac_g(N));  // width of the remainder

  if (N < 6) begin : g_bad_n
    $error("nbcac_encoder: N must be at least 6");
  end
  if ((64'd1 << K) > 64'(cac_g(N))) begin : g_bad_k
    $error("nbcac_encoder: K data bits do not fit in N code bits");
  end

  // The numerical system is complete (every value up to the sum of the bases
  // has a representation) when b_i <= 1 + b_1 + ... + b_{i-1} for all i.
  for (genvar i = 2; i <= N; i++) begin : g_complete
    if (cac_base(i, N) > 1 + cac_base_sum(i - 1, N)) begin : g_gap
      $error("nbcac_encoder: numerical system is not complete at bit %0d", i);
    end
  end

  // rem[i] is the remainder entering the decision for d_i.
  logic [VW-1:0] rem [0:N];

  assign rem[N] = VW'(data_i);

  for (genvar i = N; i >= 1; i--) begin : g_stage
    localparam logic [VW-1:0] B  = VW'(cac_base(i, N));
    localparam logic [VW-1:0] T0 = VW'(cac_thr_start(i));
    localparam logic [VW-1:0] T1 = VW'(cac_thr_cont(i, N));
    logic prev;
    if (i == N) begin : g_msb
      assign prev = 1'b0;
    end else begin : g_rest
      assign prev = code_o[i];  // d_{i+1}
    end
    assign code_o[i-1] = rem[i] >= (prev ? T1 : T0);
    assign rem[i-1]    = code_o[i-1] ? rem[i] - B : rem[i];
  end

  // Every value must be used up by the time d_1 has been decided.
  always_comb begin
    assert (rem[0] == '0 || $isunknown(data_i))
      else $error("nbcac_encoder: remainder %0d left for data %0d", rem[0], data_i);
  end

endmodule
