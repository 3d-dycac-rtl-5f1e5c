// tb_dycac_decoder: self-checking test of the receiver side at the default
// 64-bit width (16 clusters).
//
// For random data words this file builds the TSV words itself: each 4-bit
// group is mapped to a 9-bit word of the numerical system by searching for
// one whose weighted sum (bases 9 3 2 2 1 1 1 0 1) is the group value, then
// d5 is inverted with a random flag and d2 is given a random value, since it
// carries no weight. The decoder must return the data word one clock later,
// hold it over idle cycles and clear it on reset.
module tb_dycac_decoder;

  localparam int DATA_W = 64;
  localparam int CL = DATA_W / 4;
  localparam int B9 [1:9] = '{1, 0, 1, 1, 1, 2, 2, 3, 9};

  int checks = 0;
  int failures = 0;

  logic clk = 0, rst_n = 0;
  logic tsv_valid = 0;
  logic [CL-1:0][8:0] tsv_code = '0;
  logic [CL-1:0] tsv_inv = '0;
  logic out_valid;
  logic [DATA_W-1:0] out_data;

  always #5 clk = ~clk;

  dycac_decoder dut (
    .clk(clk), .rst_n(rst_n), .tsv_valid_i(tsv_valid), .tsv_code_i(tsv_code),
    .tsv_inv_i(tsv_inv), .out_valid_o(out_valid), .out_data_o(out_data)
  );

  // A random 9-bit word whose weighted sum is v.
  function automatic logic [8:0] some_word(int v);
    logic [8:0] w;
    int s;
    forever begin
      w = 9'($urandom);
      s = 0;
      for (int i = 1; i <= 9; i++) s += w[i-1] * B9[i];
      if (s == v) return w;
    end
  endfunction

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
    logic [DATA_W-1:0] d, held;
    bit was_valid;
    logic [8:0] w;

    repeat (3) @(posedge clk);
    #1;
    check(out_valid == 0 && out_data == '0, "outputs not cleared by reset");
    @(negedge clk);
    rst_n = 1;
    held = '0;

    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      was_valid = ($urandom_range(0, 3) != 0);
      d = {$urandom, $urandom};
      tsv_valid = was_valid;
      for (int k = 0; k < CL; k++) begin
        w = some_word(int'(d[k*4 +: 4]));
        tsv_inv[k] = 1'($urandom);
        if (tsv_inv[k]) w[4] = ~w[4];
        w[1] = 1'($urandom);
        tsv_code[k] = w;
      end
      if (was_valid) held = d;
      @(posedge clk);
      #1;
      check(out_valid == was_valid, $sformatf("word %0d: out_valid %b, expected %b", n, out_valid, was_valid));
      check(out_data == held, $sformatf("word %0d: out_data %h, expected %h", n, out_data, held));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
