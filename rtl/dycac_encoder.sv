// dycac_encoder: sender side of the 3D-DyCAC codec.
//
// The DATA_W-bit data bus is cut into groups of GROUP_W bits. Group k goes
// through the phase-1 numerical encoder (nbcac_encoder) into a 9-bit code
// word for 3x3 TSV cluster k, and then through the phase-2 triangular-window
// check (tw_inverter). Clusters sit side by side in a 3-row mesh, cluster k-1
// to the left of cluster k, so the window of cluster k is judged against d8
// of cluster k-1; cluster 0 has no left neighbour and skips that test. d8 is
// never touched by phase 2, so all clusters decide in parallel.
//
// The method fixes the two phases, the 3x3 clusters, the 64-bit bus and an
// extra TSV that tells the receiver about inverted TSVs. The 4 data bits per
// cluster (9 code bits hold 21 values), one flag per cluster and the output
// register are this design's choices.
//
// Interface: in_valid_i/in_data_i in; tsv_valid_o, tsv_code_o (one 9-bit word
// per cluster) and tsv_inv_o (one flag per cluster) out, to the TSVs.
// Timing: one clock of latency, one data word per clock. Reset (rst_n low,
// synchronous to clk) clears the outputs.
module dycac_encoder
  import dycac_pkg::*;
#(
  parameter int unsigned DATA_W   = 64,
  parameter int unsigned GROUP_W  = 4,
  parameter int unsigned DNC_MAX  = 1,
  parameter int unsigned TC_MAX   = 1,
  localparam int unsigned CLUSTERS = DATA_W / GROUP_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid_i,
  input  logic [DATA_W-1:0]            in_data_i,
  output logic                         tsv_valid_o,
  output cluster_word_t [CLUSTERS-1:0] tsv_code_o,
  output logic [CLUSTERS-1:0]          tsv_inv_o
);

  if (DATA_W % GROUP_W != 0) begin : g_bad_w
    $error("dycac_encoder: DATA_W must be a multiple of GROUP_W");
  end

  cluster_word_t [CLUSTERS-1:0] code;
  cluster_word_t [CLUSTERS-1:0] tsv_d;
  logic [CLUSTERS-1:0]          inv_d;

  for (genvar k = 0; k < CLUSTERS; k++) begin : g_cluster
    nbcac_encoder #(.N(CLUSTER_N), .K(GROUP_W)) u_cac (
      .data_i (in_data_i[k*GROUP_W +: GROUP_W]),
      .code_o (code[k])
    );

    tw_inverter #(.DNC_MAX(DNC_MAX), .TC_MAX(TC_MAX)) u_tw (
      .code_i     (code[k]),
      .nb_valid_i (k != 0),
      .nb_d8_i    ((k != 0) ? code[(k == 0) ? 0 : k-1][D8] : 1'b0),
      .tsv_o      (tsv_d[k]),
      .inv_o      (inv_d[k]),
      .both_o     (),
      .dnc_low_o  (),
      .tc_low_o   (),
      .dnc_o      (),
      .tc_o       ()
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tsv_valid_o <= 1'b0;
      tsv_code_o  <= '0;
      tsv_inv_o   <= '0;
    end else begin
      tsv_valid_o <= in_valid_i;
      if (in_valid_i) begin
        tsv_code_o <= tsv_d;
        tsv_inv_o  <= inv_d;
      end
    end
  end

endmodule
