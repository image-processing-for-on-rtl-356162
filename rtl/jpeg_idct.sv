// jpeg_idct: 8x8 two-dimensional inverse DCT.
//
// Structure: IDCT input buffer -> IDCT-X (rows) -> transpose buffer ->
// IDCT-Y (columns), as separable 1-D passes.
//  - Input buffer: 64 16-bit coefficients in natural order, zero before each
//    block. Tokens (position, value) are written as they arrive; the
//    end-of-block token marks the buffer full and stops in_ready.
//  - IDCT-X: once the buffer is full and the transpose buffer is free, one
//    output of one row per cycle (64 cycles), kept with three fractional bits
//    (value * 8) in the transpose buffer, stored column by column. The input
//    buffer is then cleared and accepts the next block while IDCT-Y runs.
//  - IDCT-Y: one pixel per cycle, column by column: rounded, level-shifted
//    by +128 and clamped to 0..255. out_pos is the pixel's row-major position
//    in the block; out_last marks the 64th pixel. out_valid / out_ready is a
//    valid-ready handshake.
// A block takes 64 cycles in each pass; with the input buffer filling during
// IDCT-Y, one block leaves every 128 cycles at most. Arithmetic is fixed
// point with 12-bit cosine constants (see idct_1d). The structure follows the
// decoder's block diagram; pass timing, word widths and rounding are this
// design's choices.
module jpeg_idct
  import jpeg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // de-quantised coefficients
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_eob,
  input  logic [5:0]         in_pos,
  input  logic signed [15:0] in_coef,
  input  blk_id_t            in_id,
  // pixels of the block
  output logic               out_valid,
  input  logic               out_ready,
  output logic [5:0]         out_pos,
  output logic [7:0]         out_pix,
  output logic               out_last,
  output blk_id_t            out_id,
  output logic               busy
);
  localparam int TW = 22;   // transpose buffer word: 8 x row value

  logic signed [15:0] ibuf [64];
  logic               ifull_q;
  blk_id_t            iid_q;

  logic signed [TW-1:0] tbuf [64];   // tbuf[x*8 + v] = row pass output
  logic                 tfull_q;
  blk_id_t              tid_q;

  logic       xrun_q;
  logic [5:0] xcnt_q;   // {row, x}
  logic [5:0] ycnt_q;   // {x, y}

  // IDCT-X
  logic signed [15:0]   xvec [8];
  logic signed [32:0]   xsum;
  logic signed [32:0]   xround;
  for (genvar u = 0; u < 8; u++) begin : g_xvec
    assign xvec[u] = ibuf[{xcnt_q[5:3], 3'(u)}];
  end
  idct_1d #(.IN_W(16)) u_idct_x (.vec(xvec), .pos(xcnt_q[2:0]), .sum(xsum));
  assign xround = (xsum + 33'sd512) >>> 10;

  // IDCT-Y
  logic signed [TW-1:0] yvec [8];
  logic signed [TW+16:0] ysum;
  logic signed [TW+16:0] yround;
  for (genvar v = 0; v < 8; v++) begin : g_yvec
    assign yvec[v] = tbuf[{ycnt_q[5:3], 3'(v)}];
  end
  idct_1d #(.IN_W(TW)) u_idct_y (.vec(yvec), .pos(ycnt_q[2:0]), .sum(ysum));
  assign yround = ((ysum + (TW+17)'(32768)) >>> 16) + (TW+17)'(128);

  always_comb begin
    if (yround < 0)        out_pix = 8'd0;
    else if (yround > 255) out_pix = 8'd255;
    else                   out_pix = yround[7:0];
  end
  assign out_valid = tfull_q;
  assign out_pos   = {ycnt_q[2:0], ycnt_q[5:3]};
  assign out_last  = (ycnt_q == 6'd63);
  assign out_id    = tid_q;
  assign in_ready  = !ifull_q;
  assign busy      = ifull_q || tfull_q || xrun_q;

  logic xstart;
  assign xstart = ifull_q && !xrun_q && !tfull_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ibuf    <= '{default: '0};
      ifull_q <= 1'b0;
      iid_q   <= '0;
      tbuf    <= '{default: '0};
      tfull_q <= 1'b0;
      tid_q   <= '0;
      xrun_q  <= 1'b0;
      xcnt_q  <= '0;
      ycnt_q  <= '0;
    end else begin
      // input buffer
      if (in_valid && in_ready) begin
        if (in_eob) begin
          ifull_q <= 1'b1;
          iid_q   <= in_id;
        end else begin
          ibuf[in_pos] <= in_coef;
        end
      end
      // row pass
      if (xstart) begin
        xrun_q <= 1'b1;
        xcnt_q <= '0;
      end else if (xrun_q) begin
        tbuf[{xcnt_q[2:0], xcnt_q[5:3]}] <= TW'(xround);
        xcnt_q <= xcnt_q + 6'd1;
        if (xcnt_q == 6'd63) begin
          xrun_q  <= 1'b0;
          ifull_q <= 1'b0;
          ibuf    <= '{default: '0};
          tfull_q <= 1'b1;
          tid_q   <= iid_q;
          ycnt_q  <= '0;
        end
      end
      // column pass
      if (tfull_q && out_ready) begin
        ycnt_q <= ycnt_q + 6'd1;
        if (ycnt_q == 6'd63) tfull_q <= 1'b0;
      end
    end
  end
endmodule
