// jpeg_pkg: types and constants shared by the blocks of the JPEG decoder.
//
// The decoder handles baseline (sequential, Huffman, 8-bit) JPEG. The chroma
// arrangement of an image is reduced to one of four MCU layouts, and every
// 8x8 block travels down the pipeline with a blk_id_t tag that says which
// component it belongs to and where its MCU sits in the picture. The tag is
// produced by the MCU ID generator and consumed by the output stage, which
// uses it to place the pixels. The cosine constants of the IDCT are kept here
// as eight integers, cos(k*pi/16) scaled by 4096; every entry of the 8x8 IDCT
// matrix is derived from them by idct_coef().
package jpeg_pkg;

  // MCU layout, derived from the sampling factors in the frame header.
  typedef enum logic [1:0] {
    MODE_GRAY = 2'd0,   // one component, 8x8 MCU, 1 block
    MODE_444  = 2'd1,   // Y Cb Cr all 1x1, 8x8 MCU, 3 blocks
    MODE_422  = 2'd2,   // Y 2x1, 16x8 MCU, 4 blocks (Y0 Y1 Cb Cr)
    MODE_420  = 2'd3    // Y 2x2, 16x16 MCU, 6 blocks (Y0 Y1 Y2 Y3 Cb Cr)
  } mode_e;

  typedef enum logic [1:0] {
    COMP_Y  = 2'd0,
    COMP_CB = 2'd1,
    COMP_CR = 2'd2
  } comp_e;

  localparam int MCU_POS_W = 13;  // 16-bit picture size / 8

  // Identification of one 8x8 block.
  typedef struct packed {
    comp_e                 comp;          // colour component
    logic [1:0]            yblk;          // index of a Y block inside the MCU
    logic [MCU_POS_W-1:0]  mcu_x;         // MCU column
    logic [MCU_POS_W-1:0]  mcu_y;         // MCU row
    logic                  last_in_mcu;   // last block of its MCU
    logic                  last_in_image; // last block of the picture
  } blk_id_t;

  // Picture information gathered from the frame and scan headers.
  typedef struct packed {
    logic [15:0] width;
    logic [15:0] height;
    mode_e       mode;
    logic [1:0]  qt_y, qt_cb, qt_cr;   // quantisation table per component
    logic        dc_y, dc_cb, dc_cr;   // DC Huffman table per component
    logic        ac_y, ac_cb, ac_cr;   // AC Huffman table per component
  } img_info_t;

  // Blocks per MCU for a layout.
  function automatic logic [2:0] blocks_per_mcu(mode_e m);
    case (m)
      MODE_GRAY: return 3'd1;
      MODE_444:  return 3'd3;
      MODE_422:  return 3'd4;
      default:   return 3'd6;
    endcase
  endfunction

  // 4096*cos(k*pi/16), k = 0..7, rounded.
  localparam int COS_Q12 [8] = '{4096, 4017, 3784, 3406, 2896, 2276, 1567, 799};

  // Entry of the 1-D IDCT matrix: 4096 * C(u) * cos((2x+1)*u*pi/16),
  // with C(0) = 1/sqrt(2) and C(u) = 1 otherwise.
  function automatic int idct_coef(int u, int x);
    int k, s, v;
    if (u == 0) return 2896;
    k = ((2 * x + 1) * u) % 32;        // angle in units of pi/16
    s = 1;
    if (k > 16) k = 32 - k;            // cos is even about 2*pi
    if (k > 8) begin                   // cos(pi - a) = -cos(a)
      k = 16 - k;
      s = -1;
    end
    v = (k == 8) ? 0 : COS_Q12[k];
    return s * v;
  endfunction

  // Natural (row-major) position of zigzag index k. The zigzag walk is
  // followed for all 64 steps and the position reached at step k is kept.
  function automatic logic [5:0] zigzag_to_natural(logic [5:0] k);
    int r, c, i;
    logic [5:0] pos;
    r = 0; c = 0; pos = '0;
    for (i = 0; i < 64; i++) begin
      if (i == int'(k)) pos = 6'(r * 8 + c);
      if (((r + c) % 2) == 0) begin     // moving up-right
        if (c == 7) r++;
        else if (r == 0) c++;
        else begin r--; c++; end
      end else begin                    // moving down-left
        if (r == 7) c++;
        else if (c == 0) r++;
        else begin r++; c--; end
      end
    end
    return pos;
  endfunction

endpackage
