// tb_tw_inverter: self-checking test of the phase-2 triangular-window check.
//
// All 512 cluster words are applied with every combination of neighbour
// presence and neighbour d8. A model in this file counts the direct
// neighbours of d5 and the window bits matching the neighbour's d8, decides
// the inversion and builds the expected TSV word; the test compares all
// outputs and counts how often each case (no inversion, d5 only, d2 and d5,
// triggered by DNC, by TC) occurred. Every case must occur.
module tb_tw_inverter;

  int checks = 0;
  int failures = 0;

  logic [8:0] code, tsv;
  logic nb_valid, nb_d8, inv, both, dnc_low, tc_low;
  logic [2:0] dnc;
  logic [1:0] tc;

  tw_inverter dut (
    .code_i(code), .nb_valid_i(nb_valid), .nb_d8_i(nb_d8),
    .tsv_o(tsv), .inv_o(inv), .both_o(both),
    .dnc_low_o(dnc_low), .tc_low_o(tc_low), .dnc_o(dnc), .tc_o(tc)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_none = 0, n_d5 = 0, n_both = 0, n_dnc = 0, n_tc = 0;
    int e_dnc, e_tc;
    bit e_inv, e_both;
    logic [8:0] e_tsv;
    // d_i is code[i-1]
    for (int w = 0; w < 512; w++) begin
      for (int m = 0; m < 4; m++) begin
        code = 9'(w);
        nb_valid = m[1];
        nb_d8 = m[0];
        #1;
        e_dnc = int'(code[1] == code[4]) + int'(code[3] == code[4])
              + int'(code[5] == code[4]) + int'(code[7] == code[4]);
        e_tc  = int'(code[0] == nb_d8) + int'(code[1] == nb_d8) + int'(code[2] == nb_d8);
        e_inv = (e_dnc <= 1) || (nb_valid && e_tc <= 1);
        e_both = e_inv && (code[1] == code[4]);
        e_tsv = code;
        if (e_inv) e_tsv[4] = ~code[4];
        if (e_both) e_tsv[1] = ~code[1];
        check(dnc == 3'(e_dnc), $sformatf("word %b: DNC %0d, expected %0d", code, dnc, e_dnc));
        check(tc == 2'(e_tc), $sformatf("word %b d8=%b: TC %0d, expected %0d", code, nb_d8, tc, e_tc));
        check(inv == e_inv && both == e_both,
              $sformatf("word %b nb=%b%b: inv/both %b%b, expected %b%b", code, nb_valid, nb_d8, inv, both, e_inv, e_both));
        check(tsv == e_tsv, $sformatf("word %b nb=%b%b: tsv %b, expected %b", code, nb_valid, nb_d8, tsv, e_tsv));
        if (!e_inv) n_none++;
        else if (e_both) n_both++;
        else n_d5++;
        if (e_dnc <= 1) n_dnc++;
        if (nb_valid && e_tc <= 1) n_tc++;
      end
    end
    $display("cases: none=%0d d5_only=%0d d2_and_d5=%0d dnc_trigger=%0d tc_trigger=%0d",
             n_none, n_d5, n_both, n_dnc, n_tc);
    check(n_none > 0 && n_d5 > 0 && n_both > 0 && n_dnc > 0 && n_tc > 0, "a case never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
