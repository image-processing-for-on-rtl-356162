// jpeg_mcu_id: MCU ID generator.
//
// Produces the identification of each 8x8 block in the order the blocks
// appear in the scan: inside an MCU the Y blocks (one, two or four, left to
// right then top to bottom) followed by Cb and Cr; MCUs in raster order. The
// MCU size follows from the layout (8x8 for grayscale and 4:4:4, 16x8 for
// 4:2:2, 16x16 for 4:2:0) and the number of MCUs per row and column from the
// picture size, rounded up. start (one cycle) loads the first block; advance
// (one cycle) steps to the next. id is valid while active is high; after the
// last block of the picture has been advanced past, active drops.
//
// The block order is that of baseline JPEG interleaved scans; carrying the
// MCU position with every block, for the output stage to place its pixels,
// is this design's way of providing the identification information.
module jpeg_mcu_id
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mode_e       mode,
  input  logic [15:0] width,
  input  logic [15:0] height,
  input  logic        advance,
  output logic        active,
  output blk_id_t     id
);
  logic [2:0]           blk_q;
  logic [MCU_POS_W-1:0] mx_q, my_q;
  logic [MCU_POS_W-1:0] mcus_x, mcus_y;
  logic                 active_q;
  logic [2:0]           nblk;
  logic                 last_blk, last_x, last_y;

  // MCUs per row / column: ceil(size / 8) or ceil(size / 16).
  always_comb begin
    logic [16:0] w, h;
    w = 17'(width);
    h = 17'(height);
    unique case (mode)
      MODE_420: begin
        mcus_x = MCU_POS_W'((w + 17'd15) >> 4);
        mcus_y = MCU_POS_W'((h + 17'd15) >> 4);
      end
      MODE_422: begin
        mcus_x = MCU_POS_W'((w + 17'd15) >> 4);
        mcus_y = MCU_POS_W'((h + 17'd7) >> 3);
      end
      default: begin
        mcus_x = MCU_POS_W'((w + 17'd7) >> 3);
        mcus_y = MCU_POS_W'((h + 17'd7) >> 3);
      end
    endcase
  end

  assign nblk     = blocks_per_mcu(mode);
  assign last_blk = (blk_q == nblk - 3'd1);
  assign last_x   = (mx_q == mcus_x - 1'b1);
  assign last_y   = (my_q == mcus_y - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_q    <= '0;
      mx_q     <= '0;
      my_q     <= '0;
      active_q <= 1'b0;
    end else if (start) begin
      blk_q    <= '0;
      mx_q     <= '0;
      my_q     <= '0;
      active_q <= (width != 16'd0) && (height != 16'd0);
    end else if (advance && active_q) begin
      if (!last_blk) begin
        blk_q <= blk_q + 3'd1;
      end else begin
        blk_q <= '0;
        if (!last_x) begin
          mx_q <= mx_q + 1'b1;
        end else begin
          mx_q <= '0;
          if (!last_y) my_q <= my_q + 1'b1;
          else         active_q <= 1'b0;
        end
      end
    end
  end

  // Component of a block position for the layout.
  always_comb begin
    logic [2:0] ny;   // Y blocks per MCU
    unique case (mode)
      MODE_420: ny = 3'd4;
      MODE_422: ny = 3'd2;
      default:  ny = 3'd1;
    endcase
    if (blk_q < ny)               id.comp = COMP_Y;
    else if (blk_q == ny)         id.comp = COMP_CB;
    else                          id.comp = COMP_CR;
    id.yblk          = blk_q[1:0];
    id.mcu_x         = mx_q;
    id.mcu_y         = my_q;
    id.last_in_mcu   = last_blk;
    id.last_in_image = last_blk && last_x && last_y;
  end

  assign active = active_q;
endmodule
