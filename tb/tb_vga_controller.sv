// tb_vga_controller: runs the controller at its default parameters for a
// little over one frame (800 x 525 pixels of 4 board clocks) and compares x,
// y, video_on, hsync and vsync every cycle with a reference model built from
// the clock count: pixel p = n / 4, x = p mod 800, y = (p / 800) mod 525, the
// registered outputs one board clock behind. It also counts visible pixels
// (640 x 480), hsync pulses (one per line) and the vsync length (12 lines).
`timescale 1ns / 1ps
module tb_vga_controller;
  logic       clk = 0, reset = 1;
  logic       hsync, vsync, video_on, p_tick;
  logic [9:0] x, y;
  int checks = 0, failures = 0;

  vga_controller dut (.clk, .reset, .hsync, .vsync, .video_on, .p_tick, .x, .y);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int px, py, ppx, ppy, vis, hs_rise, vs_cycles;
    bit hs_prev;
    vis = 0; hs_rise = 0; vs_cycles = 0; hs_prev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 1; n <= 800 * 525 * 4 + 100; n++) begin
      @(negedge clk);
      px  = (n / 4) % 800;       py  = ((n / 4) / 800) % 525;
      ppx = ((n - 1) / 4) % 800; ppy = (((n - 1) / 4) / 800) % 525;
      check(int'(x) == px && int'(y) == py, $sformatf("n=%0d x,y=%0d,%0d want %0d,%0d", n, x, y, px, py));
      check(p_tick == ((n % 4) == 3), $sformatf("n=%0d p_tick", n));
      check(video_on == (ppx < 640 && ppy < 480), $sformatf("n=%0d video_on", n));
      check(hsync == (ppx >= 640 && ppx < 752), $sformatf("n=%0d hsync", n));
      check(vsync == (ppy >= 513 && ppy < 815), $sformatf("n=%0d vsync", n));
      if (n <= 800 * 525 * 4) begin
        vis += video_on;
        vs_cycles += vsync;
        if (hsync && !hs_prev) hs_rise++;
      end
      hs_prev = hsync;
    end
    check(vis == 640 * 480 * 4, $sformatf("visible cycles %0d", vis));
    check(hs_rise == 525, $sformatf("hsync pulses %0d", hs_rise));
    check(vs_cycles == 12 * 800 * 4, $sformatf("vsync cycles %0d", vs_cycles));
    $display("visible cycles %0d, hsync pulses %0d, vsync cycles %0d", vis, hs_rise, vs_cycles);
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
