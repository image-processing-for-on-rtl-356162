// tb_jpeg_dht: loads the four Huffman tables of jpeg_tb_pkg (DC codes of 2
// to 11 bits, AC codes of 2 to 16 bits, 162 symbols) through the write port,
// then for every symbol of every table presents its code followed by random
// bits and checks the symbol and code length returned. It also checks that a
// bit pattern beyond the last code of a table reports no match.
`timescale 1ns / 1ps
module tb_jpeg_dht;
  import jpeg_tb_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        wr_valid = 0, wr_is_count = 0;
  logic [1:0]  wr_table = '0, lu_table = '0;
  logic [7:0]  wr_idx = '0, wr_data = '0;
  logic [15:0] lu_bits = '0;
  logic        lu_match;
  logic [4:0]  lu_len;
  logic [7:0]  lu_symbol;
  int checks = 0, failures = 0;

  jpeg_dht dut (.clk, .rst_n, .wr_valid, .wr_table, .wr_is_count, .wr_idx, .wr_data,
                .lu_table, .lu_bits, .lu_match, .lu_len, .lu_symbol);

  always #5 clk = ~clk;

  task automatic wr(int t, bit is_count, int idx, int data);
    @(negedge clk);
    wr_valid = 1; wr_table = 2'(t); wr_is_count = is_count;
    wr_idx = 8'(idx); wr_data = 8'(data);
    @(negedge clk);
    wr_valid = 0;
  endtask

  initial begin
    build_tables();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      for (int l = 0; l < 16; l++) wr(t, 1, l, bits[t][l]);
      for (int i = 0; i < nval[t]; i++) wr(t, 0, i, vals[t][i]);
    end
    for (int rep = 0; rep < 3; rep++)
      for (int t = 0; t < 4; t++)
        for (int i = 0; i < nval[t]; i++) begin
          int sym, len;
          logic [15:0] pat;
          sym = vals[t][i];
          len = clen[t][sym];
          pat = 16'($urandom);
          pat = (pat >> len) | 16'(code[t][sym] << (16 - len));
          lu_table = 2'(t); lu_bits = pat;
          #1;
          checks++;
          if (!lu_match || int'(lu_len) != len || int'(lu_symbol) != sym) begin
            failures++;
            if (failures < 10)
              $display("FAIL: table %0d bits %04h got %0b/%0d/%02h want %0d/%02h",
                       t, pat, lu_match, lu_len, lu_symbol, len, sym);
          end
        end
    // all-ones is beyond the last code of every table
    for (int t = 0; t < 4; t++) begin
      lu_table = 2'(t); lu_bits = 16'hFFFF;
      #1;
      checks++;
      if (lu_match) begin
        failures++;
        $display("FAIL: table %0d matched all ones", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
