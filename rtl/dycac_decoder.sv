// dycac_decoder: receiver side of the 3D-DyCAC codec.
//
// For every 3x3 cluster the received flag TSV says whether the sender
// inverted the victim d5; if so d5 is inverted back. d2, which the sender may
// also have inverted, is left as received: its weight in the numerical code
// is 0, so it does not change the value. The cluster word is then decoded as
// the weighted sum of its bits (nbcac_decoder) and the groups are put back
// together into the DATA_W-bit bus, cluster k giving bits k*GROUP_W upwards.
//
// The decoding rule is the method's; the flag per cluster, the grouping and
// the output register are this design's choices and match dycac_encoder.
//
// Interface: tsv_valid_i, tsv_code_i, tsv_inv_i in from the TSVs;
// out_valid_o/out_data_o out. Timing: one clock of latency, one word per
// clock. Reset (rst_n low, synchronous) clears the outputs.
module dycac_decoder
  import dycac_pkg::*;
#(
  parameter int unsigned DATA_W   = 64,
  parameter int unsigned GROUP_W  = 4,
  localparam int unsigned CLUSTERS = DATA_W / GROUP_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         tsv_valid_i,
  input  cluster_word_t [CLUSTERS-1:0] tsv_code_i,
  input  logic [CLUSTERS-1:0]          tsv_inv_i,
  output logic                         out_valid_o,
  output logic [DATA_W-1:0]            out_data_o
);

  if (DATA_W % GROUP_W != 0) begin : g_bad_w
    $error("dycac_decoder: DATA_W must be a multiple of GROUP_W");
  end

  logic [DATA_W-1:0] data_d;

  for (genvar k = 0; k < CLUSTERS; k++) begin : g_cluster
    cluster_word_t restored;

    always_comb begin
      restored     = tsv_code_i[k];
      restored[D5] = tsv_code_i[k][D5] ^ tsv_inv_i[k];
    end

    nbcac_decoder #(.N(CLUSTER_N), .K(GROUP_W)) u_cac (
      .code_i (restored),
      .data_o (data_d[k*GROUP_W +: GROUP_W])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      out_data_o  <= '0;
    end else begin
      out_valid_o <= tsv_valid_i;
      if (tsv_valid_i) out_data_o <= data_d;
    end
  end

endmodule
