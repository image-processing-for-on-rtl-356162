// tb_jpeg_core: end-to-end test of the JPEG decoder.
//
// Six pictures, one of each layout plus a second 4:2:0 one, with sizes that
// are and are not multiples of the MCU size, are generated by jpeg_tb_pkg and
// sent back to back on the input stream. The third file is cut off in the
// middle of its scan data and closed with EOI: its pixels are not compared,
// but it must still yield each of its positions exactly once, and the
// pictures after it must decode correctly. Words carry 1..4 bytes in random
// lanes (inport_strb), with random gaps; outport_accept is dropped at random.
// Every output pixel is compared with the floating-point reference (within
// 2 levels for grayscale, 4 per channel for colour, the fixed-point IDCT and
// colour-conversion error), its picture size is checked, and each position
// must appear exactly once. The test also counts the mechanisms exercised:
// byte stuffing, ZRL, blocks ending without EOB, each layout, MCU padding,
// input and output back-pressure.
`timescale 1ns / 1ps
module tb_jpeg_core;
  import jpeg_tb_pkg::*;

  logic        clk = 0, rst = 1;
  logic        in_valid = 0, in_last = 0, in_accept;
  logic [31:0] in_data = '0;
  logic [3:0]  in_strb = '0;
  logic        out_valid, out_accept = 0, idle;
  logic [15:0] out_w, out_h, out_x, out_y;
  logic [7:0]  out_r, out_g, out_b;

  jpeg_core dut (
    .clk_i (clk), .rst_i (rst),
    .inport_valid_i (in_valid), .inport_data_i (in_data), .inport_strb_i (in_strb),
    .inport_last_i (in_last), .inport_accept_o (in_accept),
    .outport_valid_o (out_valid), .outport_width_o (out_w), .outport_height_o (out_h),
    .outport_pixel_x_o (out_x), .outport_pixel_y_o (out_y),
    .outport_pixel_r_o (out_r), .outport_pixel_g_o (out_g), .outport_pixel_b_o (out_b),
    .outport_accept_i (out_accept), .idle_o (idle)
  );

  always #5 clk = ~clk;

  localparam int NPIC = 6;
  int pic_w [NPIC] = '{24, 13, 24, 16, 20, 40};
  int pic_h [NPIC] = '{20,  9, 24,  8, 10, 32};
  int pic_l [NPIC] = '{L_420, L_444, L_444, L_GRAY, L_422, L_420};
  bit pic_t [NPIC] = '{0, 0, 1, 0, 0, 0};    // cut short

  byte unsigned stream[$];
  int           last_at[$];          // index of the last byte of each file
  int           exp_rgb[$];
  int           base [NPIC];
  bit           seen[$];

  int checks = 0, failures = 0;
  int cur = 0, got = 0, max_err = 0;
  int n_out_stall = 0, n_in_stall = 0, n_pad = 0;
  bit done = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // generate pictures
  initial begin
    int zrl, eob, full, stuff, big;
    zrl = 0; eob = 0; full = 0; stuff = 0; big = 0;
    for (int p = 0; p < NPIC; p++) begin
      n_zrl = 0; n_eob = 0; n_full = 0; n_stuff = 0; n_big = 0;
      make_picture(pic_w[p], pic_h[p], pic_l[p]);
      zrl += n_zrl; eob += n_eob; full += n_full; stuff += n_stuff; big += n_big;
      base[p] = exp_rgb.size();
      for (int i = 0; i < pic_w[p] * pic_h[p]; i++) begin
        exp_rgb.push_back((ref_r[i] << 16) | (ref_g[i] << 8) | ref_b[i]);
        seen.push_back(0);
      end
      if (pic_t[p]) begin
        int sos, cut;
        sos = 0;
        while (!(file[sos] == 8'hFF && file[sos + 1] == 8'hDA)) sos++;
        sos += 2 + ((int'(file[sos + 2]) << 8) | int'(file[sos + 3]));
        cut = sos + (file.size() - 2 - sos) / 2;
        if (file[cut - 1] == 8'hFF) cut++;
        for (int i = 0; i < cut; i++) stream.push_back(file[i]);
        stream.push_back(8'hFF);
        stream.push_back(8'hD9);
      end else begin
        foreach (file[i]) stream.push_back(file[i]);
      end
      last_at.push_back(stream.size() - 1);
      if ((pic_w[p] % ((pic_l[p] >= L_422) ? 16 : 8)) != 0 ||
          (pic_h[p] % ((pic_l[p] == L_420) ? 16 : 8)) != 0) n_pad++;
    end
    $display("stream %0d bytes: ZRL %0d, EOB %0d, blocks without EOB %0d, stuffed bytes %0d, large coefs %0d",
             stream.size(), zrl, eob, full, stuff, big);
    check(zrl > 0,   "no ZRL symbol in the test data");
    check(full > 0,  "no block ending at coefficient 63");
    check(stuff > 0, "no stuffed byte in the test data");
    check(n_pad > 0, "no picture with MCU padding");
  end

  // input driver
  initial begin
    int i;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (2) @(posedge clk);
    i = 0;
    while (i < stream.size()) begin
      int n;
      logic [3:0] strb;
      logic [31:0] data;
      n = $urandom_range(1, 4);
      if (n > stream.size() - i) n = stream.size() - i;
      strb = '0; data = $urandom;
      // choose n lanes at random, fill in ascending lane order
      while ($countones(strb) < n) strb[$urandom_range(0, 3)] = 1'b1;
      for (int l = 0; l < 4; l++)
        if (strb[l]) begin
          data[8*l +: 8] = stream[i];
          i++;
        end
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_data = data; in_strb = strb;
      in_last  = (last_at.size() != 0 && i - 1 >= last_at[0]);
      if (in_last) void'(last_at.pop_front());
      while (!in_accept) begin
        n_in_stall++;
        @(negedge clk);
      end
      @(posedge clk);
      #1 in_valid = 0; in_last = 0;
    end
  end

  // output side
  always @(posedge clk) out_accept <= ($urandom_range(0, 9) < 7);

  always @(posedge clk) begin
    if (!rst && out_valid && !out_accept) n_out_stall++;
    if (!rst && out_valid && out_accept && !done) begin
      int x, y, e, idx, tol;
      x = int'(out_x); y = int'(out_y);
      check(out_w == 16'(pic_w[cur]) && out_h == 16'(pic_h[cur]),
            $sformatf("picture %0d size %0dx%0d", cur, out_w, out_h));
      if (x < pic_w[cur] && y < pic_h[cur]) begin
        idx = base[cur] + y * pic_w[cur] + x;
        check(!seen[idx], $sformatf("pixel %0d,%0d of picture %0d twice", x, y, cur));
        seen[idx] = 1;
        tol = (pic_l[cur] == L_GRAY) ? 2 : 4;
        e = 0;
        e = max3(e, diff(int'(out_r), (exp_rgb[idx] >> 16) & 255));
        e = max3(e, diff(int'(out_g), (exp_rgb[idx] >> 8) & 255));
        e = max3(e, diff(int'(out_b), exp_rgb[idx] & 255));
        if (pic_t[cur]) e = 0;
        if (e > max_err) max_err = e;
        check(e <= tol, $sformatf("pic %0d pixel %0d,%0d got %0d/%0d/%0d want %06x",
                                  cur, x, y, out_r, out_g, out_b, exp_rgb[idx]));
      end else begin
        check(0, $sformatf("pixel %0d,%0d outside picture %0d", x, y, cur));
      end
      got++;
      if (got == pic_w[cur] * pic_h[cur]) begin
        got = 0;
        cur++;
        if (cur == NPIC) done = 1;
      end
    end
  end

  function automatic int diff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction
  function automatic int max3(int a, int b);
    return (a > b) ? a : b;
  endfunction

  initial begin
    wait (done);
    repeat (200) @(posedge clk);   // MCU padding after the last pixel is skipped
    check(idle, "decoder not idle at the end");
    foreach (seen[i]) if (!seen[i]) begin
      check(0, $sformatf("pixel %0d never produced", i));
      break;
    end
    check(n_out_stall > 0, "output back-pressure never happened");
    check(n_in_stall > 0,  "input back-pressure never happened");
    $display("pictures %0d, max channel error %0d, output stalls %0d, input stalls %0d",
             cur, max_err, n_out_stall, n_in_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d pictures done", cur, NPIC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
