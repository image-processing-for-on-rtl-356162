// tb_vga_test: one frame of the VGA test design. The switches change to a
// new random colour every 1000 clocks; rgb must equal the switch value of
// the previous clock inside the visible area and be black outside it, and
// the sync outputs must follow the 640x480 timing (checked against a model
// built from the clock count, as in tb_vga_controller).
`timescale 1ns / 1ps
module tb_vga_test;
  logic        clk = 0, reset = 1;
  logic [11:0] sw = '0;
  logic        hsync, vsync;
  logic [11:0] rgb;
  int checks = 0, failures = 0;

  vga_test dut (.clk, .reset, .sw, .hsync, .vsync, .rgb);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int ppx, ppy, lit;
    logic [11:0] sw_prev;
    bit on;
    lit = 0;
    sw_prev = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 1; n <= 800 * 525 * 4; n++) begin
      @(negedge clk);
      ppx = ((n - 1) / 4) % 800; ppy = (((n - 1) / 4) / 800) % 525;
      on  = (ppx < 640 && ppy < 480);
      check(rgb == (on ? sw_prev : 12'd0), $sformatf("n=%0d rgb %03h want %03h", n, rgb, on ? sw_prev : 12'd0));
      check(hsync == (ppx >= 640 && ppx < 752), $sformatf("n=%0d hsync", n));
      check(vsync == (ppy >= 513 && ppy < 815), $sformatf("n=%0d vsync", n));
      if (on && rgb != 0) lit++;
      if (n % 1000 == 0) sw = 12'($urandom_range(1, 4095));
      sw_prev = sw;
    end
    check(lit > 0, "colour never shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
