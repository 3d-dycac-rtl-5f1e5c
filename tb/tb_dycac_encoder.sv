// tb_dycac_encoder: self-checking test of the sender side at the default
// 64-bit width (16 clusters).
//
// Random words, with random idle cycles, go in; one clock later every
// cluster's TSV word and flag must equal a model in this file (phase-1
// mapping followed by the phase-2 window check against the cluster to the
// left). The test also checks the one-clock latency, that idle cycles hold
// the outputs, and that reset clears them.
module tb_dycac_encoder;

  localparam int DATA_W = 64;
  localparam int CL = DATA_W / 4;

  int checks = 0;
  int failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [DATA_W-1:0] in_data = '0;
  logic tsv_valid;
  logic [CL-1:0][8:0] tsv_code;
  logic [CL-1:0] tsv_inv;

  always #5 clk = ~clk;

  dycac_encoder dut (
    .clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .in_data_i(in_data),
    .tsv_valid_o(tsv_valid), .tsv_code_o(tsv_code), .tsv_inv_o(tsv_inv)
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

  // Expected TSV words and flags of a whole data word.
  task automatic model(input logic [DATA_W-1:0] d,
                       output logic [CL-1:0][8:0] e_code, output logic [CL-1:0] e_inv);
    logic [CL-1:0][8:0] c;
    int dnc, tc;
    bit inv;
    for (int k = 0; k < CL; k++) c[k] = enc_ref(int'(d[k*4 +: 4]));
    for (int k = 0; k < CL; k++) begin
      dnc = int'(c[k][1] == c[k][4]) + int'(c[k][3] == c[k][4])
          + int'(c[k][5] == c[k][4]) + int'(c[k][7] == c[k][4]);
      tc = 3;
      if (k > 0) tc = int'(c[k][0] == c[k-1][7]) + int'(c[k][1] == c[k-1][7])
                    + int'(c[k][2] == c[k-1][7]);
      inv = (dnc <= 1) || (tc <= 1);
      e_code[k] = c[k];
      if (inv) begin
        if (c[k][1] == c[k][4]) e_code[k][1] = ~c[k][1];
        e_code[k][4] = ~c[k][4];
      end
      e_inv[k] = inv;
    end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CL-1:0][8:0] e_code, h_code;
    logic [CL-1:0] e_inv, h_inv;
    bit was_valid;
    int n_inv = 0;

    repeat (3) @(posedge clk);
    #1;
    check(tsv_valid == 0 && tsv_code == '0 && tsv_inv == '0, "outputs not cleared by reset");
    @(negedge clk);
    rst_n = 1;
    h_code = '0;
    h_inv = '0;

    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      was_valid = ($urandom_range(0, 3) != 0);
      in_valid = was_valid;
      in_data = {$urandom, $urandom};
      if (n == 0) in_data = '0;
      if (n == 1) in_data = '1;
      if (was_valid) begin
        model(in_data, e_code, e_inv);
        h_code = e_code;
        h_inv = e_inv;
      end
      @(posedge clk);
      #1;
      check(tsv_valid == was_valid, $sformatf("word %0d: tsv_valid %b one clock after in_valid %b", n, tsv_valid, was_valid));
      check(tsv_code == h_code && tsv_inv == h_inv,
            $sformatf("word %0d data %h: TSV %h/%h, expected %h/%h", n, in_data, tsv_code, tsv_inv, h_code, h_inv));
      if (was_valid) n_inv += $countones(h_inv);
    end
    in_valid = 0;
    $display("clusters inverted: %0d", n_inv);
    check(n_inv > 0, "no cluster was ever inverted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
