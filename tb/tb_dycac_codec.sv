// tb_dycac_codec: end-to-end test of the 3D-DyCAC codec at its default size
// (64-bit data, 16 clusters of 3x3 TSVs plus 16 flag TSVs).
//
// The TSV side of the encoder is wired straight to the decoder, as ideal
// TSVs. Directed words (all 0s, all 1s, alternating patterns) and random words
// are sent with random idle cycles. The test checks:
//   - every data word comes out unchanged exactly two clocks after it went in;
//   - every cluster's TSV word and flag equal a model in this file (phase-1
//     mapping, then the phase-2 window check against the cluster to the left);
//   - reset clears both sides.
// It counts how often each mechanism occurred: no inversion, d5 alone
// inverted, d2 and d5 inverted, inversion triggered by the direct-neighbour
// count (DNC) and by the triangular-window count (TC), cluster 0 without a
// window neighbour, and idle cycles. A mechanism that never occurred is a
// failure. It also reports how many clusters break the DNC and TC limits
// before and after phase 2, and how many pairs of direct neighbours on the
// mesh switch in opposite directions between successive words.
module tb_dycac_codec;

  localparam int DATA_W = 64;
  localparam int CL = DATA_W / 4;
  localparam int WORDS = 4000;

  int checks = 0;
  int failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [DATA_W-1:0] in_data = '0;
  logic tsv_valid;
  logic [CL-1:0][8:0] tsv_code;
  logic [CL-1:0] tsv_inv;
  logic out_valid;
  logic [DATA_W-1:0] out_data;

  always #5 clk = ~clk;

  dycac_codec dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid_i(in_valid), .in_data_i(in_data),
    .tsv_valid_o(tsv_valid), .tsv_code_o(tsv_code), .tsv_inv_o(tsv_inv),
    .tsv_valid_i(tsv_valid), .tsv_code_i(tsv_code), .tsv_inv_i(tsv_inv),
    .out_valid_o(out_valid), .out_data_o(out_data)
  );

  function automatic int g_ref(int k);
    int g [1:16];
    g[1] = 2; g[2] = 3; g[3] = 4; g[4] = 5; g[5] = 7;
    for (int j = 6; j <= k; j++) g[j] = g[j-1] + g[j-5];
    return g[k];
  endfunction

  function automatic int b_ref(int i);
    if (i == 1) return 1;
    if (i == 2) return 0;
    if (i < 9) return g_ref(i - 1) - g_ref(i - 2);
    return g_ref(6);
  endfunction

  function automatic logic [8:0] enc_ref(int v);
    int r = v;
    int t;
    bit prev = 0;
    logic [8:0] c;
    for (int i = 9; i >= 1; i--) begin
      if (prev) t = (i == 2) ? 0 : b_ref(i);
      else if (i >= 6) t = g_ref(i - 3);
      else if (i == 5) t = 4;
      else if (i >= 3) t = 2;
      else t = 1;
      c[i-1] = (r >= t);
      if (c[i-1]) r -= b_ref(i);
      prev = c[i-1];
    end
    return c;
  endfunction

  function automatic int dnc_of(logic [8:0] c);
    return int'(c[1] == c[4]) + int'(c[3] == c[4]) + int'(c[5] == c[4]) + int'(c[7] == c[4]);
  endfunction

  function automatic int tc_of(logic [8:0] c, logic nb_d8);
    return int'(c[0] == nb_d8) + int'(c[1] == nb_d8) + int'(c[2] == nb_d8);
  endfunction

  // mechanism counters
  int n_none = 0, n_d5 = 0, n_both = 0, n_dnc = 0, n_tc = 0, n_first = 0, n_idle = 0;
  int pre_dnc_low = 0, pre_tc_low = 0, post_dnc_low = 0, post_tc_low = 0;

  task automatic model(input logic [DATA_W-1:0] d,
                       output logic [CL-1:0][8:0] e_code, output logic [CL-1:0] e_inv);
    logic [CL-1:0][8:0] c;
    int dnc, tc;
    bit inv;
    for (int k = 0; k < CL; k++) c[k] = enc_ref(int'(d[k*4 +: 4]));
    for (int k = 0; k < CL; k++) begin
      dnc = dnc_of(c[k]);
      tc = (k > 0) ? tc_of(c[k], c[k-1][7]) : 3;
      inv = (dnc <= 1) || (tc <= 1);
      e_code[k] = c[k];
      if (inv) begin
        if (c[k][1] == c[k][4]) e_code[k][1] = ~c[k][1];
        e_code[k][4] = ~c[k][4];
      end
      e_inv[k] = inv;
      if (k == 0) n_first++;
      if (!inv) n_none++;
      else if (c[k][1] == c[k][4]) n_both++;
      else n_d5++;
      if (dnc <= 1) n_dnc++;
      if (tc <= 1) n_tc++;
      if (dnc <= 1) pre_dnc_low++;
      if (tc <= 1) pre_tc_low++;
    end
    opp_p1 += opposite(last_p1, c);
    opp_tx += opposite(last_tx, e_code);
    last_p1 = c;
    last_tx = e_code;
    for (int k = 0; k < CL; k++) begin
      if (dnc_of(e_code[k]) <= 1) post_dnc_low++;
      if (k > 0 && tc_of(e_code[k], e_code[k-1][7]) <= 1) post_tc_low++;
    end
  endtask

  // Opposite transitions (one TSV rising while a direct neighbour falls)
  // between two successive words on the whole 3-row mesh, clusters side by
  // side. Column 3k+j, row r of the mesh holds d_(3j+r+1) of cluster k.
  function automatic bit mesh_bit(logic [CL-1:0][8:0] w, int col, int row);
    return w[col / 3][3 * (col % 3) + row];
  endfunction

  function automatic int opposite(logic [CL-1:0][8:0] a, logic [CL-1:0][8:0] b);
    int n = 0;
    for (int c = 0; c < 3 * CL; c++) begin
      for (int r = 0; r < 3; r++) begin
        bit ta = mesh_bit(a, c, r), tb = mesh_bit(b, c, r);
        if (r < 2) begin
          bit ua = mesh_bit(a, c, r + 1), ub = mesh_bit(b, c, r + 1);
          if (ta != tb && ua != ub && tb != ub) n++;
        end
        if (c + 1 < 3 * CL) begin
          bit ua = mesh_bit(a, c + 1, r), ub = mesh_bit(b, c + 1, r);
          if (ta != tb && ua != ub && tb != ub) n++;
        end
      end
    end
    return n;
  endfunction

  logic [CL-1:0][8:0] last_p1 = '0, last_tx = '0;
  int opp_p1 = 0, opp_tx = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (WORDS * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: data sent, the cycle it was sent, expected TSV contents.
  logic [DATA_W-1:0] sent_q [$];
  int                sent_cyc [$];
  int cycle = 0;
  int received = 0;
  logic [CL-1:0][8:0] exp_code;
  logic [CL-1:0] exp_inv;
  bit exp_tsv_valid = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Sender: drive on the falling edge.
  initial begin
    logic [DATA_W-1:0] d;
    repeat (3) @(posedge clk);
    #1;
    check(tsv_valid == 0 && tsv_code == '0 && tsv_inv == '0 && out_valid == 0 && out_data == '0,
          "reset did not clear the codec");
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < WORDS; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
        n_idle++;
        n--;
        continue;
      end
      case (n)
        0: d = '0;
        1: d = '1;
        2: d = {16{4'h5}};
        3: d = {16{4'hA}};
        4: d = {16{4'hF}};
        5: d = 64'h0123_4567_89AB_CDEF;
        default: d = {$urandom, $urandom};
      endcase
      in_valid = 1;
      in_data = d;
      sent_q.push_back(d);
      sent_cyc.push_back(cycle);
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Monitor of the TSV side and the receiver, checked just after each edge.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      check(tsv_valid == exp_tsv_valid, "tsv_valid one clock after in_valid");
      if (exp_tsv_valid)
        check(tsv_code == exp_code && tsv_inv == exp_inv,
              $sformatf("TSV word %h/%h, expected %h/%h", tsv_code, tsv_inv, exp_code, exp_inv));
      if (out_valid) begin
        if (sent_q.size() == 0) begin
          check(0, "output with nothing sent");
        end else begin
          logic [DATA_W-1:0] d;
          int c0;
          d = sent_q.pop_front();
          c0 = sent_cyc.pop_front();
          check(out_data == d, $sformatf("out_data %h, expected %h", out_data, d));
          check(cycle - c0 == 2, $sformatf("latency %0d clocks, expected 2", cycle - c0));
          received++;
        end
      end
    end
  end

  // Expected TSV contents for the next edge, from what is driven now.
  always @(negedge clk) begin
    #2;
    exp_tsv_valid = rst_n && in_valid;
    if (rst_n && in_valid) model(in_data, exp_code, exp_inv);
  end

  initial begin
    wait (received == WORDS);
    repeat (3) @(posedge clk);
    $display("clusters: no inversion=%0d d5 only=%0d d2 and d5=%0d", n_none, n_d5, n_both);
    $display("triggers: DNC=%0d TC=%0d; cluster 0 without window=%0d; idle cycles=%0d",
             n_dnc, n_tc, n_first, n_idle);
    $display("clusters with DNC<=1/4: %0d before phase 2, %0d after", pre_dnc_low, post_dnc_low);
    $display("clusters with TC<=1/3:  %0d before phase 2, %0d after", pre_tc_low, post_tc_low);
    $display("opposite transitions of direct neighbours: %0d after phase 1, %0d after phase 2",
             opp_p1, opp_tx);
    check(n_none > 0, "no cluster passed unchanged");
    check(n_d5 > 0, "d5 was never inverted alone");
    check(n_both > 0, "d2 and d5 were never inverted together");
    check(n_dnc > 0, "DNC never triggered an inversion");
    check(n_tc > 0, "TC never triggered an inversion");
    check(n_first > 0, "cluster 0 never coded");
    check(n_idle > 0, "no idle cycle");
    check(received == WORDS, "not every word came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
