// ycbcr_to_rgb: JFIF colour conversion of one pixel.
//
//   R = Y + 1.402    (Cr-128)
//   G = Y - 0.344136 (Cb-128) - 0.714136 (Cr-128)
//   B = Y + 1.772    (Cb-128)
// with the factors as 16-bit fractions, rounded to nearest and clamped to
// 0..255. With gray set (single-component pictures) R = G = B = Y.
// Combinational. The equations are those of the JFIF format; the fixed-point
// precision is this design's choice.
module ycbcr_to_rgb (
  input  logic       gray,
  input  logic [7:0] y,
  input  logic [7:0] cb,
  input  logic [7:0] cr,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);
  localparam int signed K_RCR = 91881;    // 1.402    * 65536
  localparam int signed K_GCB = 22554;    // 0.344136 * 65536
  localparam int signed K_GCR = 46802;    // 0.714136 * 65536
  localparam int signed K_BCB = 116130;   // 1.772    * 65536

  function automatic logic [7:0] clamp8(int signed v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return 8'(v);
  endfunction

  always_comb begin
    int signed yi, cbi, cri, rv, gv, bv;
    yi  = int'(y);
    cbi = int'(cb) - 128;
    cri = int'(cr) - 128;
    rv  = yi + ((K_RCR * cri + 32768) >>> 16);
    gv  = yi + ((32768 - K_GCB * cbi - K_GCR * cri) >>> 16);
    bv  = yi + ((K_BCB * cbi + 32768) >>> 16);
    if (gray) begin
      r = y; g = y; b = y;
    end else begin
      r = clamp8(rv);
      g = clamp8(gv);
      b = clamp8(bv);
    end
  end
endmodule
