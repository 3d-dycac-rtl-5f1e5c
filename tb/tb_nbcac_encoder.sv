// tb_nbcac_encoder: self-checking test of the phase-1 numerical encoder.
//
// Every data value is applied to two encoders: the default 9-bit cluster code
// (4 data bits) and an 18-bit code (8 data bits). For each code word the test
// checks, without reusing the encoder's own arithmetic:
//   - the weighted sum of the bits equals the value (for N = 9 with the bases
//     9 3 2 2 1 1 1 0 1 written out by hand, for N = 18 with bases rebuilt
//     from the g_k recurrence in this file);
//   - no 010, 101, 0110 or 1001 pattern appears;
//   - no two values share a code word;
// and that value 3 encodes to 000001111.
module tb_nbcac_encoder;

  int checks = 0;
  int failures = 0;

  logic [3:0] data9;
  logic [8:0] code9;
  logic [7:0] data18;
  logic [17:0] code18;

  nbcac_encoder #(.N(9), .K(4)) dut9 (.data_i(data9), .code_o(code9));
  nbcac_encoder #(.N(18), .K(8)) dut18 (.data_i(data18), .code_o(code18));

  localparam int B9 [1:9] = '{1, 0, 1, 1, 1, 2, 2, 3, 9};

  function automatic int g_ref(int k);
    int g [1:40];
    g[1] = 2; g[2] = 3; g[3] = 4; g[4] = 5; g[5] = 7;
    for (int j = 6; j <= k; j++) g[j] = g[j-1] + g[j-5];
    return g[k];
  endfunction

  function automatic int b_ref(int i, int n);
    if (i == 1) return 1;
    if (i == 2) return 0;
    if (i < n) return g_ref(i - 1) - g_ref(i - 2);
    return g_ref(n - 3);
  endfunction

  // 1 when the n-bit word (read d_n .. d_1) holds a forbidden pattern.
  function automatic bit has_forbidden(logic [31:0] w, int n);
    for (int i = 0; i + 2 < n; i++) begin
      if (w[i+:3] == 3'b010 || w[i+:3] == 3'b101) return 1;
    end
    for (int i = 0; i + 3 < n; i++) begin
      if (w[i+:4] == 4'b0110 || w[i+:4] == 4'b1001) return 1;
    end
    return 0;
  endfunction

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
    logic [8:0]  seen9  [16];
    logic [17:0] seen18 [256];
    int sum;

    for (int v = 0; v < 16; v++) begin
      data9 = 4'(v);
      #1;
      sum = 0;
      for (int i = 1; i <= 9; i++) sum += code9[i-1] * B9[i];
      check(sum == v, $sformatf("N=9 value %0d -> %b sums to %0d", v, code9, sum));
      check(!has_forbidden(32'(code9), 9), $sformatf("N=9 value %0d -> %b has a forbidden pattern", v, code9));
      for (int u = 0; u < v; u++)
        check(seen9[u] != code9, $sformatf("N=9 values %0d and %0d share %b", u, v, code9));
      seen9[v] = code9;
    end

    data9 = 4'd3;
    #1;
    check(code9 == 9'b000001111, $sformatf("value 3 -> %b, expected 000001111", code9));

    for (int v = 0; v < 256; v++) begin
      data18 = 8'(v);
      #1;
      sum = 0;
      for (int i = 1; i <= 18; i++) sum += code18[i-1] * b_ref(i, 18);
      check(sum == v, $sformatf("N=18 value %0d -> %b sums to %0d", v, code18, sum));
      check(!has_forbidden(32'(code18), 18), $sformatf("N=18 value %0d -> %b has a forbidden pattern", v, code18));
      for (int u = 0; u < v; u++)
        if (seen18[u] == code18) check(0, $sformatf("N=18 values %0d and %0d share %b", u, v, code18));
      seen18[v] = code18;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
