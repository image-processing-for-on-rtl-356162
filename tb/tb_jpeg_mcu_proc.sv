// tb_jpeg_mcu_proc: the MCU decoder with its neighbours (bit buffer, Huffman
// lookup, MCU ID generator) decodes the entropy-coded data of two generated
// pictures, a 4:2:0 one and then a 4:4:4 one (DC predictors must restart).
// Every coefficient token (zigzag index and value, DC after prediction) and
// every end-of-block token is compared, in order, with the coefficients the
// generator coded; the component of each end-of-block ID is checked against
// the block order of the layout. The coded data contains long zero runs
// (ZRL), blocks that end at coefficient 63 without EOB and large values.
// Bytes arrive with random gaps and the output is stalled at random.
`timescale 1ns / 1ps
module tb_jpeg_mcu_proc;
  import jpeg_pkg::*;
  import jpeg_tb_pkg::*;
  logic               clk = 0, rst_n = 0, start = 0;
  img_info_t          info = '0;
  logic               b_valid = 0, b_ready;
  logic [7:0]         b_data = '0;
  logic [31:0]        window;
  logic [6:0]         count;
  logic               pop;
  logic [5:0]         pop_bits;
  logic               h_wr = 0, h_is_count = 0;
  logic [1:0]         h_tab = '0;
  logic [7:0]         h_idx = '0, h_data = '0;
  logic [1:0]         lu_table;
  logic [15:0]        lu_bits;
  logic               lu_match;
  logic [4:0]         lu_len;
  logic [7:0]         lu_symbol;
  logic               id_active, id_advance;
  blk_id_t            id;
  logic               o_valid, o_ready = 0, o_eob, busy;
  logic [5:0]         o_idx;
  logic signed [15:0] o_coef;
  blk_id_t            o_id;

  jpeg_bitbuffer u_bb (.clk, .rst_n, .flush(start), .in_valid(b_valid), .in_data(b_data),
                       .in_ready(b_ready), .window, .count, .pop, .pop_bits);
  jpeg_dht u_dht (.clk, .rst_n, .wr_valid(h_wr), .wr_table(h_tab), .wr_is_count(h_is_count),
                  .wr_idx(h_idx), .wr_data(h_data), .lu_table, .lu_bits, .lu_match, .lu_len, .lu_symbol);
  jpeg_mcu_id u_id (.clk, .rst_n, .start, .mode(info.mode), .width(info.width), .height(info.height),
                    .advance(id_advance), .active(id_active), .id);
  jpeg_mcu_proc dut (.clk, .rst_n, .start, .info, .window, .count, .pop, .pop_bits,
                     .lu_table, .lu_bits, .lu_match, .lu_len, .lu_symbol,
                     .id_active, .id, .id_advance,
                     .out_valid(o_valid), .out_ready(o_ready), .out_eob(o_eob),
                     .out_idx(o_idx), .out_coef(o_coef), .out_id(o_id), .busy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_tok = 0, n_blk = 0, n_stall = 0, nb_mcu = 6, ny_mcu = 4;
  int exp_tok[$];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic decode(int w, int h, int layout);
    n_zrl = 0; n_full = 0;
    make_picture(w, h, layout);
    $display("picture %0dx%0d: %0d tokens, %0d ZRL, %0d blocks without EOB", w, h,
             tokens.size(), n_zrl, n_full);
    check(n_zrl > 0 && n_full > 0, "test data lacks ZRL or full blocks");
    exp_tok = tokens;
    n_tok = 0; n_blk = 0;
    nb_mcu = (layout == L_420) ? 6 : (layout == L_422) ? 4 : (layout == L_444) ? 3 : 1;
    ny_mcu = (layout == L_420) ? 4 : (layout == L_422) ? 2 : 1;
    for (int t = 0; t < 4; t++) begin
      for (int l = 0; l < 16; l++) begin
        @(negedge clk); h_wr = 1; h_tab = 2'(t); h_is_count = 1; h_idx = 8'(l); h_data = 8'(bits[t][l]);
      end
      for (int i = 0; i < nval[t]; i++) begin
        @(negedge clk); h_wr = 1; h_tab = 2'(t); h_is_count = 0; h_idx = 8'(i); h_data = 8'(vals[t][i]);
      end
    end
    @(negedge clk);
    h_wr = 0;
    info = '0;
    info.mode = mode_e'(layout); info.width = 16'(w); info.height = 16'(h);
    info.dc_cb = 1; info.dc_cr = 1; info.ac_cb = 1; info.ac_cr = 1;
    start = 1;
    @(negedge clk);
    start = 0;
    foreach (ecs_plain[i]) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      b_valid = 1; b_data = ecs_plain[i];
      @(posedge clk);
      while (!b_ready) @(posedge clk);
      #1 b_valid = 0;
      @(negedge clk);
    end
    wait (n_tok == exp_tok.size());
    repeat (5) @(posedge clk);
    check(!busy, "busy after the last block");
  endtask

  always @(posedge clk) o_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if (o_valid && !o_ready) n_stall++;
    if (o_valid && o_ready) begin
      int got, e, b;
      got = o_eob ? -1 : ((int'(o_idx) << 16) | (int'(o_coef) & 16'hFFFF));
      e = (n_tok < exp_tok.size()) ? exp_tok[n_tok] : -2;
      check(got == e, $sformatf("token %0d got %08h want %08h", n_tok, got, e));
      if (o_eob) begin
        b = n_blk % nb_mcu;
        check(o_id.comp == ((b < ny_mcu) ? COMP_Y : (b == ny_mcu) ? COMP_CB : COMP_CR),
              $sformatf("block %0d component %0d", n_blk, o_id.comp));
        n_blk++;
      end
      n_tok++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    decode(24, 20, L_420);
    decode(16, 16, L_444);
    check(n_stall > 0, "output never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
