// tb_jpeg_output: for each layout, a picture whose size is not a multiple of
// the MCU is cut into blocks of random Y, Cb and Cr samples, which are sent
// MCU by MCU with their IDs (pixels of a block in random order, random
// gaps). Every RGB output is checked against the JFIF equations in floating
// point (within one level) using the chroma sample that covers the pixel,
// every in-picture position must appear exactly once and none outside, and
// the reported picture size must match. Output stalls are random.
`timescale 1ns / 1ps
module tb_jpeg_output;
  import jpeg_pkg::*;
  logic        clk = 0, rst_n = 0;
  img_info_t   info = '0;
  logic        in_valid = 0, in_ready, in_last = 0;
  logic [5:0]  in_pos = '0;
  logic [7:0]  in_pix = '0;
  blk_id_t     in_id = '0;
  logic        o_valid, o_accept = 0, busy;
  logic [15:0] o_w, o_h, o_x, o_y;
  logic [7:0]  o_r, o_g, o_b;
  int checks = 0, failures = 0, n_stall = 0, n_got = 0;
  int yp[], cbp[], crp[];
  int pw, ph, pcw, pyw;
  mode_e pm;
  bit seen[];

  jpeg_output dut (.clk, .rst_n, .info, .in_valid, .in_ready, .in_pos, .in_pix, .in_last, .in_id,
                   .outport_valid(o_valid), .outport_width(o_w), .outport_height(o_h),
                   .outport_pixel_x(o_x), .outport_pixel_y(o_y), .outport_pixel_r(o_r),
                   .outport_pixel_g(o_g), .outport_pixel_b(o_b), .outport_accept(o_accept),
                   .busy);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int c8(real v);
    int p;
    p = int'($floor(v + 0.5));
    return (p < 0) ? 0 : (p > 255) ? 255 : p;
  endfunction

  task automatic send_block(comp_e c, int yb, int mx, int my, bit lm, int plane[], int pstride, int ox, int oy);
    int order[64];
    for (int i = 0; i < 64; i++) order[i] = i;
    order.shuffle();
    for (int j = 0; j < 64; j++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) @(negedge clk);
      in_valid = 1;
      in_pos   = 6'(order[j]);
      in_pix   = 8'(plane[(oy + order[j] / 8) * pstride + ox + order[j] % 8]);
      in_last  = (j == 63);
      in_id    = '0;
      in_id.comp = c; in_id.yblk = 2'(yb);
      in_id.mcu_x = 13'(mx); in_id.mcu_y = 13'(my); in_id.last_in_mcu = lm;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
    end
  endtask

  task automatic run(mode_e m, int w, int h);
    int mw, mh, nx, ny, nyb, yw;
    pm = m; pw = w; ph = h;
    mw = (m == MODE_420 || m == MODE_422) ? 16 : 8;
    mh = (m == MODE_420) ? 16 : 8;
    nx = (w + mw - 1) / mw; ny = (h + mh - 1) / mh;
    nyb = (m == MODE_420) ? 4 : (m == MODE_422) ? 2 : 1;
    yw = nx * mw; pcw = nx * 8; pyw = yw;
    yp  = new[yw * ny * mh];
    cbp = new[pcw * ny * 8];
    crp = new[pcw * ny * 8];
    foreach (yp[i])  yp[i]  = $urandom_range(0, 255);
    foreach (cbp[i]) cbp[i] = $urandom_range(0, 255);
    foreach (crp[i]) crp[i] = $urandom_range(0, 255);
    seen = new[w * h];
    n_got = 0;
    @(negedge clk);
    info.mode = m; info.width = 16'(w); info.height = 16'(h);
    for (int my = 0; my < ny; my++)
      for (int mx = 0; mx < nx; mx++) begin
        for (int b = 0; b < nyb; b++)
          send_block(COMP_Y, b, mx, my, m == MODE_GRAY, yp, yw,
                     mx * mw + (b % 2) * 8, my * mh + (b / 2) * 8);
        if (m != MODE_GRAY) begin
          send_block(COMP_CB, 0, mx, my, 0, cbp, pcw, mx * 8, my * 8);
          send_block(COMP_CR, 0, mx, my, 1, crp, pcw, mx * 8, my * 8);
        end
      end
    wait (n_got == w * h);
    repeat (300) @(posedge clk);
    check(!busy, "busy after the picture");
    foreach (seen[i]) if (!seen[i]) begin check(0, $sformatf("pixel %0d missing", i)); break; end
  endtask

  always @(posedge clk) o_accept <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && o_valid && !o_accept) n_stall++;
    if (rst_n && o_valid && o_accept) begin
      int x, y, yy, cb, cr, ci, er, eg, eb;
      x = int'(o_x); y = int'(o_y);
      check(int'(o_w) == pw && int'(o_h) == ph, "picture size");
      if (x < pw && y < ph) begin
        check(!seen[y * pw + x], $sformatf("pixel %0d,%0d twice", x, y));
        seen[y * pw + x] = 1;
        yy = yp[y * pyw + x];
        ci = (pm == MODE_420) ? (y / 2) * pcw + x / 2 : (pm == MODE_422) ? y * pcw + x / 2 : y * pcw + x;
        cb = cbp[ci] - 128; cr = crp[ci] - 128;
        if (pm == MODE_GRAY) begin er = yy; eg = yy; eb = yy; end
        else begin
          er = c8(yy + 1.402 * cr);
          eg = c8(yy - 0.344136 * cb - 0.714136 * cr);
          eb = c8(yy + 1.772 * cb);
        end
        check((int'(o_r) - er) inside {[-1:1]} && (int'(o_g) - eg) inside {[-1:1]} &&
              (int'(o_b) - eb) inside {[-1:1]},
              $sformatf("mode %0d pixel %0d,%0d got %0d,%0d,%0d want %0d,%0d,%0d",
                        pm, x, y, o_r, o_g, o_b, er, eg, eb));
      end else begin
        check(0, $sformatf("pixel %0d,%0d outside the picture", x, y));
      end
      n_got++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_GRAY, 12, 10);
    run(MODE_444, 16, 9);
    run(MODE_422, 20, 8);
    run(MODE_420, 30, 18);
    check(n_stall > 0, "no output stall");
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
