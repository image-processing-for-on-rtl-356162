// tb_jpeg_mcu_id: for each layout and for picture sizes that are and are not
// multiples of the MCU, walks the generator through a whole picture (with
// random pauses between advances) and compares every block's component,
// Y-block index, MCU position and last flags with a nested-loop model. It
// checks the block count and that active drops after the last block.
`timescale 1ns / 1ps
module tb_jpeg_mcu_id;
  import jpeg_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0, advance = 0, active;
  mode_e       mode = MODE_GRAY;
  logic [15:0] width = '0, height = '0;
  blk_id_t     id;
  int checks = 0, failures = 0;

  jpeg_mcu_id dut (.clk, .rst_n, .start, .mode, .width, .height, .advance, .active, .id);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run(mode_e m, int w, int h);
    int mw, mh, nx, ny, nyb, nb, total;
    mw = (m == MODE_420 || m == MODE_422) ? 16 : 8;
    mh = (m == MODE_420) ? 16 : 8;
    nx = (w + mw - 1) / mw; ny = (h + mh - 1) / mh;
    nyb = (m == MODE_420) ? 4 : (m == MODE_422) ? 2 : 1;
    nb  = (m == MODE_GRAY) ? 1 : nyb + 2;
    total = 0;
    @(negedge clk);
    mode = m; width = 16'(w); height = 16'(h);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int my = 0; my < ny; my++)
      for (int mx = 0; mx < nx; mx++)
        for (int b = 0; b < nb; b++) begin
          comp_e c;
          c = (b < nyb) ? COMP_Y : (b == nyb) ? COMP_CB : COMP_CR;
          check(active, "inactive too early");
          check(id.comp == c && (c != COMP_Y || int'(id.yblk) == b) &&
                int'(id.mcu_x) == mx && int'(id.mcu_y) == my &&
                id.last_in_mcu == (b == nb - 1) &&
                id.last_in_image == (b == nb - 1 && mx == nx - 1 && my == ny - 1),
                $sformatf("mode %0d %0dx%0d mcu %0d,%0d block %0d: got comp %0d yblk %0d mcu %0d,%0d last %0b%0b",
                          m, w, h, mx, my, b, id.comp, id.yblk, id.mcu_x, id.mcu_y,
                          id.last_in_mcu, id.last_in_image));
          while ($urandom_range(0, 2) == 0) @(negedge clk);
          advance = 1;
          @(negedge clk);
          advance = 0;
          total++;
        end
    check(!active, "still active after the last block");
    check(total == nx * ny * nb, "block count");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_GRAY, 17, 9);
    run(MODE_444, 8, 8);
    run(MODE_444, 24, 17);
    run(MODE_422, 33, 8);
    run(MODE_422, 16, 20);
    run(MODE_420, 17, 17);
    run(MODE_420, 48, 32);
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
