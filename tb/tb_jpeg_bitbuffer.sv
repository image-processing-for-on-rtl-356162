// tb_jpeg_bitbuffer: pushes random bytes (with random gaps) and pops random
// bit counts no larger than the fill level, and after every cycle compares
// count and the valid part of window with a bit-queue model. It checks that
// a byte is refused only when more than 56 bits would remain, that push and
// pop happen in the same cycle, and that flush empties the buffer.
`timescale 1ns / 1ps
module tb_jpeg_bitbuffer;
  logic        clk = 0, rst_n = 0, flush = 0;
  logic        in_valid = 0, in_ready;
  logic [7:0]  in_data = '0;
  logic [31:0] window;
  logic [6:0]  count;
  logic        pop = 0;
  logic [5:0]  pop_bits = '0;
  int checks = 0, failures = 0, both = 0, refused = 0;
  bit model[$];

  jpeg_bitbuffer dut (.clk, .rst_n, .flush, .in_valid, .in_data, .in_ready,
                      .window, .count, .pop, .pop_bits);

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
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int remain;
      // drive at negedge
      pop = ($urandom_range(0, 2) == 0) && model.size() > 0;
      pop_bits = pop ? 6'($urandom_range(0, (model.size() > 32) ? 32 : model.size())) : 6'd0;
      in_valid = $urandom_range(0, 3) != 0;
      in_data  = 8'($urandom);
      flush    = (n % 5000 == 4999);
      #1;
      remain = model.size() - (pop ? int'(pop_bits) : 0);
      check(in_ready == (remain <= 56 && !flush), $sformatf("in_ready %0b with %0d bits left", in_ready, remain));
      @(posedge clk);
      if (flush) model.delete();
      else begin
        if (pop) repeat (pop_bits) void'(model.pop_front());
        if (in_valid && in_ready) begin
          for (int i = 7; i >= 0; i--) model.push_back(in_data[i]);
          if (pop && pop_bits != 0) both++;
        end
        if (in_valid && !in_ready) refused++;
      end
      @(negedge clk);
      check(int'(count) == model.size(), $sformatf("count %0d want %0d", count, model.size()));
      for (int i = 0; i < 32 && i < model.size(); i++)
        check(window[31 - i] == model[i], $sformatf("window bit %0d", i));
    end
    check(both > 0 && refused > 0, "push with pop, or a refused byte, never happened");
    $display("push+pop cycles %0d, refused bytes %0d", both, refused);
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
