// tb_dycac_widths: the codec at other bus widths.
//
// Three codecs, 16, 32 and 128 data bits wide (4, 8 and 32 clusters), run
// side by side with their TSV ports wired straight through. Every clock a
// random word (with random idle cycles) goes into all three; each must give
// its word back unchanged exactly two clocks later. The 64-bit default is
// covered by tb_dycac_codec.
module tb_dycac_widths;

  localparam int WORDS = 2000;

  int checks = 0;
  int failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [127:0] in_data = '0;

  always #5 clk = ~clk;

  logic v16, v32, v128;
  logic [15:0] d16;
  logic [31:0] d32;
  logic [127:0] d128;

  logic tv16, tv32, tv128;
  logic [3:0][8:0]  tc16;
  logic [7:0][8:0]  tc32;
  logic [31:0][8:0] tc128;
  logic [3:0]  ti16;
  logic [7:0]  ti32;
  logic [31:0] ti128;

  dycac_codec #(.DATA_W(16)) u16 (
    .clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .in_data_i(in_data[15:0]),
    .tsv_valid_o(tv16), .tsv_code_o(tc16), .tsv_inv_o(ti16),
    .tsv_valid_i(tv16), .tsv_code_i(tc16), .tsv_inv_i(ti16),
    .out_valid_o(v16), .out_data_o(d16)
  );
  dycac_codec #(.DATA_W(32)) u32 (
    .clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .in_data_i(in_data[31:0]),
    .tsv_valid_o(tv32), .tsv_code_o(tc32), .tsv_inv_o(ti32),
    .tsv_valid_i(tv32), .tsv_code_i(tc32), .tsv_inv_i(ti32),
    .out_valid_o(v32), .out_data_o(d32)
  );
  dycac_codec #(.DATA_W(128)) u128 (
    .clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .in_data_i(in_data),
    .tsv_valid_o(tv128), .tsv_code_o(tc128), .tsv_inv_o(ti128),
    .tsv_valid_i(tv128), .tsv_code_i(tc128), .tsv_inv_i(ti128),
    .out_valid_o(v128), .out_data_o(d128)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (WORDS * 3) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // History of the last three driven cycles: [0] is the newest.
  logic [127:0] hist_d [3];
  bit           hist_v [3];
  int inverted = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < WORDS; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      hist_d[2] = hist_d[1]; hist_v[2] = hist_v[1];
      hist_d[1] = hist_d[0]; hist_v[1] = hist_v[0];
      hist_d[0] = in_data;   hist_v[0] = in_valid;
      #1;
      if (n >= 2) begin
        // outputs now show what was driven two clocks ago
        check(v16 == hist_v[1] && v32 == hist_v[1] && v128 == hist_v[1], "valid two clocks later");
        if (hist_v[1]) begin
          check(d16 == hist_d[1][15:0], $sformatf("16-bit: %h, expected %h", d16, hist_d[1][15:0]));
          check(d32 == hist_d[1][31:0], $sformatf("32-bit: %h, expected %h", d32, hist_d[1][31:0]));
          check(d128 == hist_d[1], $sformatf("128-bit: %h, expected %h", d128, hist_d[1]));
        end
      end
      if (tv128) inverted += $countones(ti128);
    end
    $display("128-bit clusters inverted: %0d", inverted);
    check(inverted > 0, "no inversion at 128 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
