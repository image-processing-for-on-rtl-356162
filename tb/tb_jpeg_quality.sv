// tb_jpeg_quality: the decoder on pictures of different compression
// quality.
//
// The same generator as the other decoder tests builds seven 32x32
// pictures, one each at quality 1, 10, 25, 50, 75, 90 and 100. The quality
// scales the quantiser steps from 255 (quality 1, where almost every pixel
// clamps) down to 1 (quality 100). The layouts rotate through 4:2:0,
// 4:4:4, 4:2:2 and grayscale. The files go back to back on the input
// stream, one byte lane per word, and outport_accept is dropped at random.
// Every pixel is compared with the floating-point reference, within 2
// levels for grayscale and 4 per channel for colour. The test also counts
// pixels that clamp at 0 or 255 and steps of 1 and 255 in the tables, and
// fails if any of them never occurs. It reports the decoding time of each
// picture in clock cycles.
`timescale 1ns / 1ps
module tb_jpeg_quality;
  import jpeg_tb_pkg::*;

  logic        clk = 0, rst = 1;
  logic        in_valid = 0, in_accept;
  logic [31:0] in_data = '0;
  logic [3:0]  in_strb = '0;
  logic        out_valid, out_accept = 0, idle;
  logic [15:0] out_w, out_h, out_x, out_y;
  logic [7:0]  out_r, out_g, out_b;

  jpeg_core dut (
    .clk_i (clk), .rst_i (rst),
    .inport_valid_i (in_valid), .inport_data_i (in_data), .inport_strb_i (in_strb),
    .inport_last_i (1'b0), .inport_accept_o (in_accept),
    .outport_valid_o (out_valid), .outport_width_o (out_w), .outport_height_o (out_h),
    .outport_pixel_x_o (out_x), .outport_pixel_y_o (out_y),
    .outport_pixel_r_o (out_r), .outport_pixel_g_o (out_g), .outport_pixel_b_o (out_b),
    .outport_accept_i (out_accept), .idle_o (idle)
  );

  always #5 clk = ~clk;

  localparam int NPIC = 7;
  localparam int W = 32, H = 32;
  int pic_q [NPIC] = '{1, 10, 25, 50, 75, 90, 100};
  int pic_l [NPIC] = '{L_420, L_444, L_422, L_GRAY, L_420, L_444, L_420};

  byte unsigned stream[$];
  int           exp_rgb[$];
  bit           seen[NPIC * W * H];

  int checks = 0, failures = 0;
  int cur = 0, got = 0, max_err = 0;
  int n_clamp = 0, n_step1 = 0, n_step255 = 0;
  int t_start = 0, cycle = 0;
  bit done = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) cycle++;

  initial begin
    for (int p = 0; p < NPIC; p++) begin
      quality = pic_q[p];
      make_picture(W, H, pic_l[p]);
      for (int t = 0; t < 2; t++)
        for (int k = 0; k < 64; k++) begin
          if (qt[t][k] == 1)   n_step1++;
          if (qt[t][k] == 255) n_step255++;
        end
      for (int i = 0; i < W * H; i++) begin
        exp_rgb.push_back((ref_r[i] << 16) | (ref_g[i] << 8) | ref_b[i]);
        if (ref_r[i] == 0 || ref_r[i] == 255) n_clamp++;
      end
      foreach (file[i]) stream.push_back(file[i]);
    end
    quality = 0;
    check(n_step1 > 0,   "no quantiser step of 1");
    check(n_step255 > 0, "no quantiser step of 255");
    check(n_clamp > 0,   "no clamped pixel");
  end

  // input: one byte per word, in lane 0
  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (2) @(posedge clk);
    foreach (stream[i]) begin
      @(negedge clk);
      in_valid = 1; in_data = {24'd0, stream[i]}; in_strb = 4'b0001;
      while (!in_accept) @(negedge clk);
      @(posedge clk);
      #1 in_valid = 0;
    end
  end

  always @(posedge clk) out_accept <= ($urandom_range(0, 9) < 8);

  always @(posedge clk) begin
    if (!rst && out_valid && out_accept && !done) begin
      int x, y, e, idx, tol;
      x = int'(out_x); y = int'(out_y);
      check(out_w == 16'(W) && out_h == 16'(H), $sformatf("picture %0d size", cur));
      if (x < W && y < H) begin
        idx = cur * W * H + y * W + x;
        check(!seen[idx], $sformatf("pixel %0d,%0d of picture %0d twice", x, y, cur));
        seen[idx] = 1;
        tol = (pic_l[cur] == L_GRAY) ? 2 : 4;
        e = 0;
        e = max2(e, diff(int'(out_r), (exp_rgb[idx] >> 16) & 255));
        e = max2(e, diff(int'(out_g), (exp_rgb[idx] >> 8) & 255));
        e = max2(e, diff(int'(out_b), exp_rgb[idx] & 255));
        if (e > max_err) max_err = e;
        check(e <= tol, $sformatf("quality %0d pixel %0d,%0d got %0d/%0d/%0d want %06x",
                                  pic_q[cur], x, y, out_r, out_g, out_b, exp_rgb[idx]));
      end else begin
        check(0, $sformatf("pixel %0d,%0d outside picture %0d", x, y, cur));
      end
      got++;
      if (got == W * H) begin
        $display("quality %3d layout %0d: %0d cycles", pic_q[cur], pic_l[cur], cycle - t_start);
        t_start = cycle;
        got = 0;
        cur++;
        if (cur == NPIC) done = 1;
      end
    end
  end

  function automatic int diff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction
  function automatic int max2(int a, int b);
    return (a > b) ? a : b;
  endfunction

  initial begin
    wait (done);
    repeat (200) @(posedge clk);
    check(idle, "decoder not idle at the end");
    foreach (seen[i]) if (!seen[i]) begin
      check(0, $sformatf("pixel %0d never produced", i));
      break;
    end
    $display("max channel error %0d, clamped pixels %0d, steps of 1: %0d, of 255: %0d",
             max_err, n_clamp, n_step1, n_step255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d pictures done", cur, NPIC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
