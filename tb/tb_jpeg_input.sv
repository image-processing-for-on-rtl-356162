// tb_jpeg_input: two generated JPEG files (a 4:2:0 picture, then a
// grayscale one) are sent back to back in words of 1..4 bytes in random
// lanes. The testbench checks every quantisation-table and Huffman-table
// write against the tables the files carry, every entropy-coded byte
// against the coded data with stuffing removed (under random back-pressure
// on data_ready), one scan_start per file, the picture information after
// each scan header, and that the second file's headers are not taken while
// core_busy holds after the first file's EOI. The APP0 segment of each file
// must be skipped without effect. After each EOI, while core_busy holds,
// only 0xFF fill bytes may appear on the data output, and some must.
`timescale 1ns / 1ps
module tb_jpeg_input;
  import jpeg_pkg::*;
  import jpeg_tb_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_last = 0, in_accept;
  logic [31:0] in_data = '0;
  logic [3:0]  in_strb = '0;
  logic        d_valid, d_ready = 0;
  logic [7:0]  d_byte;
  logic        q_wr;
  logic [1:0]  q_tab;
  logic [5:0]  q_idx;
  logic [7:0]  q_data;
  logic        h_wr, h_is_count;
  logic [1:0]  h_tab;
  logic [7:0]  h_idx, h_data;
  img_info_t   info;
  logic        scan_start, core_busy = 0, idle;

  jpeg_input dut (.clk, .rst_n, .inport_valid(in_valid), .inport_data(in_data),
                  .inport_strb(in_strb), .inport_last(in_last), .inport_accept(in_accept),
                  .data_valid(d_valid), .data_byte(d_byte), .data_ready(d_ready),
                  .dqt_wr_valid(q_wr), .dqt_wr_table(q_tab), .dqt_wr_idx(q_idx), .dqt_wr_data(q_data),
                  .dht_wr_valid(h_wr), .dht_wr_table(h_tab), .dht_wr_is_count(h_is_count),
                  .dht_wr_idx(h_idx), .dht_wr_data(h_data),
                  .info, .scan_start, .core_busy, .idle);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned stream[$];
  byte unsigned exp_data[2][$];
  int exp_w[2] = '{20, 9};
  int exp_h[2] = '{12, 7};
  mode_e exp_m[2] = '{MODE_420, MODE_GRAY};
  int n_q = 0, n_h = 0, n_scan = 0, n_data = 0, file_no = 0, n_hold = 0, n_bp = 0, n_fill = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    make_picture(exp_w[0], exp_h[0], L_420);
    foreach (file[i]) stream.push_back(file[i]);
    foreach (ecs_plain[i]) exp_data[0].push_back(ecs_plain[i]);
    make_picture(exp_w[1], exp_h[1], L_GRAY);
    foreach (file[i]) stream.push_back(file[i]);
    foreach (ecs_plain[i]) exp_data[1].push_back(ecs_plain[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < stream.size(); ) begin
      int n;
      logic [3:0] strb;
      logic [31:0] data;
      n = $urandom_range(1, 4);
      if (n > stream.size() - i) n = stream.size() - i;
      strb = '0; data = $urandom;
      while ($countones(strb) < n) strb[$urandom_range(0, 3)] = 1'b1;
      for (int l = 0; l < 4; l++) if (strb[l]) begin data[8*l +: 8] = stream[i]; i++; end
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_data = data; in_strb = strb; in_last = (i == stream.size());
      while (!in_accept) @(negedge clk);
      @(posedge clk);
      #1 in_valid = 0; in_last = 0;
    end
  end

  always @(posedge clk) d_ready <= ($urandom_range(0, 2) != 0);

  // core_busy: from scan_start until 300 cycles after the scan's last byte
  int hold = 0;
  always @(posedge clk) begin
    if (scan_start) core_busy <= 1;
    else if ((core_busy || hold == 300) && file_no < 2 && n_data == exp_data[file_no].size()) begin
      // the input block sees core_busy low one cycle later, so the file
      // counts move on one cycle after the release
      hold++;
      if (hold == 300) core_busy <= 0;
      if (hold == 301) begin
        hold = 0;
        file_no++;
        n_data = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (core_busy && in_valid && !in_accept) n_hold++;
    if (q_wr) begin
      check(!core_busy, "DQT write while the decoder is busy");
      check(int'(q_data) == qt[q_tab][q_idx], $sformatf("DQT table %0d entry %0d = %0d", q_tab, q_idx, q_data));
      n_q++;
    end
    if (h_wr) begin
      check(!core_busy, "DHT write while the decoder is busy");
      if (h_is_count) check(int'(h_data) == bits[h_tab][h_idx[3:0]], $sformatf("DHT %0d count %0d", h_tab, h_idx));
      else            check(int'(h_data) == vals[h_tab][h_idx], $sformatf("DHT %0d symbol %0d", h_tab, h_idx));
      n_h++;
    end
    if (d_valid && !d_ready) n_bp++;
    if (d_valid && d_ready && file_no < 2 && n_data == exp_data[file_no].size()) begin
      // after EOI: fill bytes while the decoder is busy
      check(d_byte == 8'hFF, $sformatf("fill byte %02h after file %0d", d_byte, file_no));
      n_fill++;
    end else if (d_valid && d_ready) begin
      check(file_no < 2 && n_data < exp_data[file_no].size() && d_byte == exp_data[file_no][n_data],
            $sformatf("file %0d data byte %0d = %02h", file_no, n_data, d_byte));
      n_data++;
    end
    if (scan_start) begin
      check(info.width == 16'(exp_w[n_scan]) && info.height == 16'(exp_h[n_scan]) &&
            info.mode == exp_m[n_scan], $sformatf("scan %0d info %0dx%0d mode %0d",
                                                  n_scan, info.width, info.height, info.mode));
      if (exp_m[n_scan] == MODE_420)
        check(info.qt_y == 0 && info.qt_cb == 1 && info.qt_cr == 1 && info.dc_y == 0 &&
              info.dc_cb == 1 && info.ac_cb == 1 && info.ac_cr == 1 && info.ac_y == 0,
              "table selections");
      n_scan++;
    end
  end

  initial begin
    wait (file_no == 2);
    repeat (20) @(posedge clk);
    check(n_scan == 2, $sformatf("%0d scans", n_scan));
    check(n_q == 4 * 64, $sformatf("%0d DQT writes", n_q));
    check(n_h == 2 * (64 + 12 + 12 + 162 + 162), $sformatf("%0d DHT writes", n_h));
    check(n_hold > 0, "input never held while the decoder was busy");
    check(n_bp > 0, "no back-pressure on data");
    check(n_fill > 0, "no fill bytes after EOI");
    check(idle, "not idle at the end");
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
