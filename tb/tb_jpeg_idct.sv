// tb_jpeg_idct: feeds 40 random coefficient blocks (sparse, a few large
// values so that some pixels clamp; tokens in random order with random
// gaps) and compares every pixel with a floating-point IDCT (+128, rounded,
// clamped) within one level. Output stalls are random. It checks that each
// block's 64 pixels come out once with the block's ID, that out_last marks
// the 64th, and that the next block is being accepted while the previous
// one is still leaving (input buffer and transpose buffer working in
// parallel).
`timescale 1ns / 1ps
module tb_jpeg_idct;
  import jpeg_pkg::*;
  import jpeg_tb_pkg::ref_idct;
  logic               clk = 0, rst_n = 0;
  logic               in_valid = 0, in_ready, in_eob = 0;
  logic [5:0]         in_pos = '0;
  logic signed [15:0] in_coef = '0;
  blk_id_t            in_id = '0;
  logic               out_valid, out_ready = 0, out_last, busy;
  logic [5:0]         out_pos;
  logic [7:0]         out_pix;
  blk_id_t            out_id;
  localparam int NBLK = 40;
  int exp_pix [NBLK][64];
  int checks = 0, failures = 0, n_blk = 0, n_pix = 0, n_overlap = 0, max_err = 0, n_clamp = 0;
  bit seen [64];

  jpeg_idct dut (.clk, .rst_n, .in_valid, .in_ready, .in_eob, .in_pos, .in_coef, .in_id,
                 .out_valid, .out_ready, .out_pos, .out_pix, .out_last, .out_id, .busy);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      real f[64];
      int  c[64];
      int  p[64];
      int  order[64];
      for (int i = 0; i < 64; i++) begin
        c[i] = 0;
        if (i == 0) c[i] = $urandom_range(0, 2000) - 1000;
        else if ($urandom_range(0, 99) < 20) c[i] = $urandom_range(0, 200) - 100;
        if ($urandom_range(0, 199) == 0) c[i] = $urandom_range(0, 4000) - 2000;
        f[i] = real'(c[i]);
        order[i] = i;
      end
      order.shuffle();
      ref_idct(f, p);
      for (int i = 0; i < 64; i++) begin
        exp_pix[b][i] = p[i];
        if (p[i] == 0 || p[i] == 255) n_clamp++;
      end
      for (int j = 0; j <= 64; j++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        if (j < 64 && c[order[j]] == 0) continue;
        in_valid = 1;
        in_eob   = (j == 64);
        in_pos   = 6'(order[j % 64]);
        in_coef  = 16'(c[order[j % 64]]);
        in_id    = '0;
        in_id.mcu_x = 13'(b);
        @(posedge clk);
        if (dut.tfull_q) n_overlap++;
        while (!in_ready) begin
          @(posedge clk);
        end
        #1 in_valid = 0;
      end
    end
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int e, d;
      check(int'(out_id.mcu_x) == n_blk, $sformatf("block id %0d want %0d", out_id.mcu_x, n_blk));
      check(!seen[out_pos], "position repeated");
      seen[out_pos] = 1;
      e = exp_pix[n_blk][out_pos];
      d = (int'(out_pix) > e) ? int'(out_pix) - e : e - int'(out_pix);
      if (d > max_err) max_err = d;
      check(d <= 1, $sformatf("block %0d pos %0d got %0d want %0d", n_blk, out_pos, out_pix, e));
      n_pix++;
      check(out_last == (n_pix == 64), "out_last");
      if (n_pix == 64) begin
        n_pix = 0;
        n_blk++;
        seen = '{default: 0};
      end
    end
  end

  initial begin
    wait (n_blk == NBLK);
    repeat (3) @(posedge clk);
    check(!busy, "busy at the end");
    check(n_overlap > 0, "input never accepted while a block was leaving");
    check(n_clamp > 0, "no clamped pixel in the test");
    $display("blocks %0d, max error %0d, overlapped inputs %0d, clamped pixels %0d",
             n_blk, max_err, n_overlap, n_clamp);
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
