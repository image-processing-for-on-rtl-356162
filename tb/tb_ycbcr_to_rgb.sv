// tb_ycbcr_to_rgb: compares the converter with the JFIF equations computed
// in floating point, rounded and clamped, for the corners of the YCbCr cube
// and 20000 random pixels (at most one level of difference, from the 16-bit
// fractions), and checks that gray mode copies Y to all three channels.
`timescale 1ns / 1ps
module tb_ycbcr_to_rgb;
  logic       gray;
  logic [7:0] y, cb, cr, r, g, b;
  int checks = 0, failures = 0, exact = 0;

  ycbcr_to_rgb dut (.gray, .y, .cb, .cr, .r, .g, .b);

  function automatic int ref8(real v);
    int p;
    p = int'($floor(v + 0.5));
    return (p < 0) ? 0 : (p > 255) ? 255 : p;
  endfunction
  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  task automatic try(int yy, int cbb, int crr, bit gr);
    int er, eg, eb;
    gray = gr; y = 8'(yy); cb = 8'(cbb); cr = 8'(crr);
    #1;
    if (gr) begin
      er = yy; eg = yy; eb = yy;
    end else begin
      er = ref8(yy + 1.402 * (crr - 128));
      eg = ref8(yy - 0.344136 * (cbb - 128) - 0.714136 * (crr - 128));
      eb = ref8(yy + 1.772 * (cbb - 128));
    end
    checks++;
    if (absd(int'(r), er) > (gr ? 0 : 1) || absd(int'(g), eg) > (gr ? 0 : 1) ||
        absd(int'(b), eb) > (gr ? 0 : 1)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: Y=%0d Cb=%0d Cr=%0d gray=%0b got %0d,%0d,%0d want %0d,%0d,%0d",
                 yy, cbb, crr, gr, r, g, b, er, eg, eb);
    end
    if (int'(r) == er && int'(g) == eg && int'(b) == eb) exact++;
  endtask

  initial begin
    for (int i = 0; i < 8; i++) try((i & 1) ? 255 : 0, (i & 2) ? 255 : 0, (i & 4) ? 255 : 0, 0);
    try(128, 128, 128, 0);
    for (int i = 0; i < 20000; i++)
      try($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255), 0);
    for (int i = 0; i < 200; i++)
      try($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255), 1);
    $display("exact %0d of %0d", exact, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
