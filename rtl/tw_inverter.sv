// tw_inverter: phase 2 of 3D-DyCAC for one 3x3 TSV cluster.
//
// Two counters judge the phase-1 code word as it will sit on the cluster:
//   DNC: how many of the direct neighbours d2, d4, d6, d8 equal the victim d5
//        (0..4, i.e. DNC = count/4);
//   TC:  how many of the triangular-window bits d1, d2, d3 of this cluster
//        equal d8 of the neighbouring cluster on that side (0..3, TC = count/3).
// If DNC <= DNC_MAX/4 or TC <= TC_MAX/3 the word is changed: when d2 equals
// d5 both are inverted, otherwise only d5 is inverted. inv_o then tells the
// receiver, over the cluster's extra TSV, that d5 was inverted. d2 needs no
// flag because its weight in the numerical code is 0.
//
// The counters, the two thresholds and the d2/d5 rule are the method's. The
// threshold values are this design's choice: TC_MAX = 1 follows the rule that
// at least two of d1, d2, d3 must match d8; DNC_MAX = 1 inverts when at most
// one direct neighbour matches the victim. A cluster with no neighbour on the
// window side (nb_valid_i = 0) skips the TC test.
//
// Interface: code_i, nb_valid_i, nb_d8_i in; tsv_o, inv_o, both_o, the two
// counts and the two threshold results out. Only d2 and d5 can change, so
// the other seven bits of tsv_o are code_i passed straight through.
// Timing: purely combinational.
module tw_inverter
  import dycac_pkg::*;
#(
  parameter int unsigned DNC_MAX = 1,
  parameter int unsigned TC_MAX  = 1
) (
  input  cluster_word_t code_i,
  input  logic          nb_valid_i,
  input  logic          nb_d8_i,
  output cluster_word_t tsv_o,
  output logic          inv_o,
  output logic          both_o,
  output logic          dnc_low_o,
  output logic          tc_low_o,
  output logic [2:0]    dnc_o,
  output logic [1:0]    tc_o
);

  logic victim;

  always_comb begin
    victim = code_i[D5];
    dnc_o  = 3'(code_i[D2] == victim) + 3'(code_i[D4] == victim)
           + 3'(code_i[D6] == victim) + 3'(code_i[D8] == victim);
    tc_o   = 2'(code_i[D1] == nb_d8_i) + 2'(code_i[D2] == nb_d8_i)
           + 2'(code_i[D3] == nb_d8_i);

    dnc_low_o = 32'(dnc_o) <= DNC_MAX;
    tc_low_o  = nb_valid_i && (32'(tc_o) <= TC_MAX);

    inv_o  = dnc_low_o || tc_low_o;
    both_o = inv_o && (code_i[D2] == victim);

    tsv_o      = code_i;
    tsv_o[D5]  = code_i[D5] ^ inv_o;
    tsv_o[D2]  = code_i[D2] ^ both_o;
  end

endmodule
