// nbcac_decoder: inverse of phase 1 of 3D-DyCAC.
//
// The data value is the weighted sum of the code bits, value = sum(d_i * b_i),
// with the bases b_i of dycac_pkg (for N = 9: 9 3 2 2 1 1 1 0 1). This is the
// decoding rule of the method itself. Bit d_2 has weight 0, so whatever the
// phase-2 inversion did to it has no effect here.
//
// Built as a chain of constant adders, one per bit with a non-zero weight.
//
// Interface: code_i (N bits, bit i-1 = d_i), data_o (the sum, cut to K bits).
// Timing: purely combinational.
module nbcac_decoder
  import dycac_pkg::*;
#(
  parameter int unsigned N = 9,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] code_i,
  output logic [K-1:0] data_o
);

  localparam int unsigned VW = $clog2(cac_g(N));

  // acc[i] is the sum of d_1 .. d_i.
  logic [VW-1:0] acc [0:N];

  assign acc[0] = '0;

  for (genvar i = 1; i <= N; i++) begin : g_term
    localparam logic [VW-1:0] B = VW'(cac_base(i, N));
    assign acc[i] = code_i[i-1] ? acc[i-1] + B : acc[i-1];
  end

  assign data_o = K'(acc[N]);

endmodule
