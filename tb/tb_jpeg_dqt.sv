// tb_jpeg_dqt: writes four random quantisation tables, then streams random
// coefficient tokens for all three components (with random table
// assignment, random input gaps and random output stalls) and checks each
// output token against a model: natural position from an independent
// zigzag walk, value = coefficient * table entry saturated to 16 bits,
// end-of-block and ID passed through, order kept.
`timescale 1ns / 1ps
module tb_jpeg_dqt;
  import jpeg_pkg::*;
  import jpeg_tb_pkg::zz_nat;
  logic               clk = 0, rst_n = 0;
  logic               wr_valid = 0;
  logic [1:0]         wr_table = '0;
  logic [5:0]         wr_idx = '0;
  logic [7:0]         wr_data = '0;
  img_info_t          info = '0;
  logic               in_valid = 0, in_ready, in_eob = 0;
  logic [5:0]         in_idx = '0;
  logic signed [15:0] in_coef = '0;
  blk_id_t            in_id = '0;
  logic               out_valid, out_ready = 0, out_eob;
  logic [5:0]         out_pos;
  logic signed [15:0] out_coef;
  blk_id_t            out_id;
  int checks = 0, failures = 0, n_sat = 0, n_stall = 0, n_out = 0;
  int q [4][64];
  int exp_q[$];
  localparam int NTOK = 5000;

  jpeg_dqt dut (.clk, .rst_n, .wr_valid, .wr_table, .wr_idx, .wr_data, .info,
                .in_valid, .in_ready, .in_eob, .in_idx, .in_coef, .in_id,
                .out_valid, .out_ready, .out_eob, .out_pos, .out_coef, .out_id);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++)
      for (int k = 0; k < 64; k++) begin
        q[t][k] = $urandom_range(1, 255);
        @(negedge clk);
        wr_valid = 1; wr_table = 2'(t); wr_idx = 6'(k); wr_data = 8'(q[t][k]);
      end
    @(negedge clk);
    wr_valid = 0;
    info.qt_y = 2'd2; info.qt_cb = 2'd0; info.qt_cr = 2'd3;
    for (int n = 0; n < NTOK; n++) begin
      int k, v, t, e;
      bit eob;
      comp_e c;
      c   = comp_e'($urandom_range(0, 2));
      eob = ($urandom_range(0, 9) == 0);
      k   = $urandom_range(0, 63);
      v   = ($urandom_range(0, 19) == 0) ? $urandom_range(0, 65535) - 32768
                                         : $urandom_range(0, 200) - 100;
      t   = (c == COMP_Y) ? 2 : (c == COMP_CB) ? 0 : 3;
      e   = v * q[t][k];
      if (e > 32767) begin e = 32767; n_sat++; end
      if (e < -32768) begin e = -32768; n_sat++; end
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_eob = eob; in_idx = 6'(k); in_coef = 16'(v);
      in_id = '0; in_id.comp = c; in_id.mcu_x = 13'(n);
      exp_q.push_back(eob ? (-1 - n) : ((zz_nat(k) << 16) | (e & 16'hFFFF)));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      int e, got;
      e = exp_q.pop_front();
      got = out_eob ? (-1 - int'(out_id.mcu_x)) : ((int'(out_pos) << 16) | (int'(out_coef) & 16'hFFFF));
      checks++;
      if (got != e) begin
        failures++;
        if (failures < 10) $display("FAIL: token %0d got %08h want %08h", n_out, got, e);
      end
      n_out++;
    end
  end

  initial begin
    wait (n_out == NTOK);
    checks++;
    if (n_sat == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL: saturation (%0d) or output stall (%0d) never happened", n_sat, n_stall);
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
