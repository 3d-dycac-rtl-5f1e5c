// dycac_codec: the 3D-DyCAC crosstalk avoidance codec, sender and receiver.
//
// 3D-DyCAC protects a vertical bus of through-silicon vias (TSVs) against
// crosstalk. The sender (dycac_encoder) turns each 4-bit slice of the data
// word into a 9-bit code word of a numerical system with long runs of equal
// bits (phase 1) and then, looking at the word as a 3x3 TSV cluster, may
// invert the centre TSV d5, and d2 with it, so that the centre and the
// triangle facing the previous cluster agree with their neighbours (phase 2).
// The receiver (dycac_decoder) undoes the inversion and decodes the numbers.
//
// The TSVs themselves are not logic, so the TSV side of the encoder and the
// decoder are both ports: connect tsv_*_o to tsv_*_i through the TSV model or
// wiring of the system. With the default 64-bit bus there are 16 clusters,
// 144 code TSVs and 16 flag TSVs, plus one valid line.
//
// Timing: one clock in the encoder and one in the decoder, so a word wired
// straight through appears at out_data_o two clocks after in_data_i. One
// word per clock, no back-pressure. rst_n is active low and synchronous.
module dycac_codec
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
  // data in, sender side
  input  logic                         in_valid_i,
  input  logic [DATA_W-1:0]            in_data_i,
  // to the TSVs
  output logic                         tsv_valid_o,
  output cluster_word_t [CLUSTERS-1:0] tsv_code_o,
  output logic [CLUSTERS-1:0]          tsv_inv_o,
  // from the TSVs
  input  logic                         tsv_valid_i,
  input  cluster_word_t [CLUSTERS-1:0] tsv_code_i,
  input  logic [CLUSTERS-1:0]          tsv_inv_i,
  // data out, receiver side
  output logic                         out_valid_o,
  output logic [DATA_W-1:0]            out_data_o
);

  dycac_encoder #(
    .DATA_W  (DATA_W),
    .GROUP_W (GROUP_W),
    .DNC_MAX (DNC_MAX),
    .TC_MAX  (TC_MAX)
  ) u_enc (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid_i  (in_valid_i),
    .in_data_i   (in_data_i),
    .tsv_valid_o (tsv_valid_o),
    .tsv_code_o  (tsv_code_o),
    .tsv_inv_o   (tsv_inv_o)
  );

  dycac_decoder #(
    .DATA_W  (DATA_W),
    .GROUP_W (GROUP_W)
  ) u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .tsv_valid_i (tsv_valid_i),
    .tsv_code_i  (tsv_code_i),
    .tsv_inv_i   (tsv_inv_i),
    .out_valid_o (out_valid_o),
    .out_data_o  (out_data_o)
  );

endmodule
