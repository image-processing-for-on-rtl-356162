// tb_vga_clk_div: checks that tick is high for exactly one cycle in every DIV
// cycles, at the default DIV = 4 (100 MHz -> 25 MHz) and at DIV = 3, and
// that the first tick comes DIV cycles after reset.
`timescale 1ns / 1ps
module tb_vga_clk_div;
  logic clk = 0, reset = 1;
  logic tick4, tick3;
  int checks = 0, failures = 0;

  vga_clk_div            u4 (.clk, .reset, .tick(tick4));
  vga_clk_div #(.DIV(3)) u3 (.clk, .reset, .tick(tick3));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int n4, n3;
    n4 = 0; n3 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 1; n <= 400; n++) begin
      @(negedge clk);
      // after n edges the counter holds n mod DIV; tick when it is DIV-1
      check(tick4 == ((n % 4) == 3), $sformatf("DIV=4 cycle %0d tick %0b", n, tick4));
      check(tick3 == ((n % 3) == 2), $sformatf("DIV=3 cycle %0d tick %0b", n, tick3));
      n4 += tick4; n3 += tick3;
    end
    check(n4 == 100, $sformatf("DIV=4: %0d ticks in 400 cycles", n4));
    check(n3 == 133, $sformatf("DIV=3: %0d ticks in 400 cycles", n3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
