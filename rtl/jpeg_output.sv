// jpeg_output: YCbCr staging buffers and conversion to RGB.
//
// Pixels of the blocks of one MCU arrive from the IDCT, each with its
// block's ID, and are written into three staging buffers: Y (up to four
// blocks, 256 bytes), Cb and Cr (one block each). When the last pixel of the
// last block of the MCU is in, the block stops accepting and drains the MCU:
// it visits every pixel of the MCU (8x8, 16x8 or 16x16 depending on the
// layout) row by row, picks its Y sample and the Cb/Cr sample that covers it
// (chroma shared by 2x1 or 2x2 pixels in 4:2:2 / 4:2:0), converts to RGB and
// presents it with its picture coordinates and the picture size, one pixel
// per cycle under an outport_valid / outport_accept handshake. Pixels that
// fall outside the picture (the right and bottom padding of MCUs) are
// skipped without being presented. Then the next MCU is accepted.
//
// Staging and conversion are the decoder's; a single set of staging buffers
// (no double buffering) and chroma replication for subsampled pictures are
// this design's choices.
module jpeg_output
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  img_info_t   info,
  // pixels from the IDCT
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [5:0]  in_pos,
  input  logic [7:0]  in_pix,
  input  logic        in_last,
  input  blk_id_t     in_id,
  // RGB pixels
  output logic        outport_valid,
  output logic [15:0] outport_width,
  output logic [15:0] outport_height,
  output logic [15:0] outport_pixel_x,
  output logic [15:0] outport_pixel_y,
  output logic [7:0]  outport_pixel_r,
  output logic [7:0]  outport_pixel_g,
  output logic [7:0]  outport_pixel_b,
  input  logic        outport_accept,
  output logic        busy
);
  logic [7:0] ybuf  [256];
  logic [7:0] cbbuf [64];
  logic [7:0] crbuf [64];

  logic                 drain_q;
  logic [3:0]           px_q, py_q;
  logic [MCU_POS_W-1:0] mx_q, my_q;

  assign in_ready = !drain_q;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      unique case (in_id.comp)
        COMP_CB: cbbuf[in_pos] <= in_pix;
        COMP_CR: crbuf[in_pos] <= in_pix;
        default: ybuf[{in_id.yblk, in_pos}] <= in_pix;
      endcase
    end
  end

  // MCU geometry.
  logic [3:0] last_px, last_py;
  always_comb begin
    unique case (info.mode)
      MODE_420: begin last_px = 4'd15; last_py = 4'd15; end
      MODE_422: begin last_px = 4'd15; last_py = 4'd7;  end
      default:  begin last_px = 4'd7;  last_py = 4'd7;  end
    endcase
  end

  // Samples of the current pixel.
  logic [7:0]  ys, cbs, crs;
  logic [1:0]  yb;
  logic [5:0]  cpos;
  always_comb begin
    yb = {py_q[3], px_q[3]};
    unique case (info.mode)
      MODE_420: cpos = {py_q[3:1], px_q[3:1]};
      MODE_422: cpos = {py_q[2:0], px_q[3:1]};
      default:  cpos = {py_q[2:0], px_q[2:0]};
    endcase
    ys  = ybuf[{yb, py_q[2:0], px_q[2:0]}];
    cbs = cbbuf[cpos];
    crs = crbuf[cpos];
  end

  ycbcr_to_rgb u_csc (
    .gray (info.mode == MODE_GRAY),
    .y    (ys), .cb (cbs), .cr (crs),
    .r    (outport_pixel_r), .g (outport_pixel_g), .b (outport_pixel_b)
  );

  // Picture coordinates.
  logic [16:0] xpos, ypos;
  logic        in_pic, step, mcu_done;
  always_comb begin
    unique case (info.mode)
      MODE_420: begin xpos = {mx_q, 4'd0}; ypos = {my_q, 4'd0}; end
      MODE_422: begin xpos = {mx_q, 4'd0}; ypos = {1'b0, my_q, 3'd0}; end
      default:  begin xpos = {1'b0, mx_q, 3'd0}; ypos = {1'b0, my_q, 3'd0}; end
    endcase
    xpos = xpos + 17'(px_q);
    ypos = ypos + 17'(py_q);
  end
  assign in_pic          = (xpos < 17'(info.width)) && (ypos < 17'(info.height));
  assign outport_valid   = drain_q && in_pic;
  assign outport_width   = info.width;
  assign outport_height  = info.height;
  assign outport_pixel_x = xpos[15:0];
  assign outport_pixel_y = ypos[15:0];
  assign step            = drain_q && (!in_pic || outport_accept);
  assign mcu_done        = (px_q == last_px) && (py_q == last_py);
  assign busy            = drain_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drain_q <= 1'b0;
      px_q    <= '0;
      py_q    <= '0;
      mx_q    <= '0;
      my_q    <= '0;
    end else if (!drain_q) begin
      if (in_valid && in_last && in_id.last_in_mcu) begin
        drain_q <= 1'b1;
        px_q    <= '0;
        py_q    <= '0;
        mx_q    <= in_id.mcu_x;
        my_q    <= in_id.mcu_y;
      end
    end else if (step) begin
      if (mcu_done) begin
        drain_q <= 1'b0;
      end else if (px_q == last_px) begin
        px_q <= '0;
        py_q <= py_q + 4'd1;
      end else begin
        px_q <= px_q + 4'd1;
      end
    end
  end
endmodule
