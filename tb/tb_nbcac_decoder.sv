// tb_nbcac_decoder: self-checking test of the phase-1 numerical decoder.
//
// All 512 words of a 9-bit cluster are applied; the output must equal the
// weighted sum with the bases 9 3 2 2 1 1 1 0 1 (d9 .. d1), cut to 4 bits.
// An 18-bit decoder is also checked on every word the 18-bit encoder makes
// (values 0 .. 255): encode then decode must give the value back.
module tb_nbcac_decoder;

  int checks = 0;
  int failures = 0;

  logic [8:0]  code9;
  logic [3:0]  data9;
  logic [7:0]  val18, data18;
  logic [17:0] code18;

  nbcac_decoder #(.N(9), .K(4)) dut9 (.code_i(code9), .data_o(data9));
  nbcac_encoder #(.N(18), .K(8)) enc18 (.data_i(val18), .code_o(code18));
  nbcac_decoder #(.N(18), .K(8)) dut18 (.code_i(code18), .data_o(data18));

  localparam int B9 [1:9] = '{1, 0, 1, 1, 1, 2, 2, 3, 9};

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
    int sum;
    for (int w = 0; w < 512; w++) begin
      code9 = 9'(w);
      #1;
      sum = 0;
      for (int i = 1; i <= 9; i++) sum += code9[i-1] * B9[i];
      check(data9 == 4'(sum), $sformatf("N=9 word %b -> %0d, expected %0d", code9, data9, sum % 16));
    end
    for (int v = 0; v < 256; v++) begin
      val18 = 8'(v);
      #1;
      check(data18 == val18, $sformatf("N=18 value %0d came back as %0d", v, data18));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
