// jpeg_core: baseline JPEG decoder.
//
// A JPEG file enters as a 32-bit AXI stream; decoded pixels leave as 24-bit
// RGB with their X,Y position and the picture's width and height. The chain:
//   jpeg_input     parses markers and headers, loads the tables, strips
//                  byte stuffing from the entropy-coded data
//   jpeg_bitbuffer bit buffer FIFO feeding the Huffman decoder
//   jpeg_mcu_proc  MCU decoder: Huffman decoding of DC and AC coefficients,
//                  with jpeg_dht (Huffman lookup) and jpeg_mcu_id (block IDs)
//   jpeg_dqt       de-quantisation and de-zigzag
//   jpeg_idct      8x8 inverse DCT (input buffer, IDCT-X, transpose, IDCT-Y)
//   jpeg_output    YCbCr staging buffers and YCbCr to RGB
// Every stage passes back-pressure with a valid-ready handshake, so a stall
// on outport_accept holds the whole chain and finally inport_accept. Pixels
// come out MCU by MCU, each MCU in raster order. Supported pictures:
// baseline, 8-bit, grayscale or three components with Y sampled 1x1, 2x1 or
// 2x2 and Cb/Cr 1x1, no restart intervals. Several files may follow each
// other on the stream; each is finished before the next one's headers are
// taken. idle_o is high when no picture is in flight. The split into blocks
// follows the decoder's block diagram; the handshakes and buffer sizes are
// this design's choices.
module jpeg_core
  import jpeg_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_i,
  input  logic        inport_valid_i,
  input  logic [31:0] inport_data_i,
  input  logic [3:0]  inport_strb_i,
  input  logic        inport_last_i,
  output logic        inport_accept_o,
  output logic        outport_valid_o,
  output logic [15:0] outport_width_o,
  output logic [15:0] outport_height_o,
  output logic [15:0] outport_pixel_x_o,
  output logic [15:0] outport_pixel_y_o,
  output logic [7:0]  outport_pixel_r_o,
  output logic [7:0]  outport_pixel_g_o,
  output logic [7:0]  outport_pixel_b_o,
  input  logic        outport_accept_i,
  output logic        idle_o
);
  logic clk, rst_n;
  assign clk   = clk_i;
  assign rst_n = !rst_i;

  img_info_t info;
  logic      scan_start, core_busy, in_idle;

  // input -> bit buffer
  logic       bb_valid, bb_ready;
  logic [7:0] bb_byte;
  // table writes
  logic       dqt_wr_valid;
  logic [1:0] dqt_wr_table;
  logic [5:0] dqt_wr_idx;
  logic [7:0] dqt_wr_data;
  logic       dht_wr_valid, dht_wr_is_count;
  logic [1:0] dht_wr_table;
  logic [7:0] dht_wr_idx, dht_wr_data;

  jpeg_input u_input (
    .clk, .rst_n,
    .inport_valid (inport_valid_i), .inport_data (inport_data_i),
    .inport_strb (inport_strb_i), .inport_last (inport_last_i),
    .inport_accept (inport_accept_o),
    .data_valid (bb_valid), .data_byte (bb_byte), .data_ready (bb_ready),
    .dqt_wr_valid, .dqt_wr_table, .dqt_wr_idx, .dqt_wr_data,
    .dht_wr_valid, .dht_wr_table, .dht_wr_is_count, .dht_wr_idx, .dht_wr_data,
    .info, .scan_start, .core_busy, .idle (in_idle)
  );

  // bit buffer
  logic [31:0] window;
  logic [6:0]  count;
  logic        pop;
  logic [5:0]  pop_bits;

  jpeg_bitbuffer u_bitbuf (
    .clk, .rst_n, .flush (scan_start),
    .in_valid (bb_valid), .in_data (bb_byte), .in_ready (bb_ready),
    .window, .count, .pop, .pop_bits
  );

  // Huffman lookup
  logic [1:0]  lu_table;
  logic [15:0] lu_bits;
  logic        lu_match;
  logic [4:0]  lu_len;
  logic [7:0]  lu_symbol;

  jpeg_dht u_dht (
    .clk, .rst_n,
    .wr_valid (dht_wr_valid), .wr_table (dht_wr_table),
    .wr_is_count (dht_wr_is_count), .wr_idx (dht_wr_idx), .wr_data (dht_wr_data),
    .lu_table, .lu_bits, .lu_match, .lu_len, .lu_symbol
  );

  // MCU ID generator
  logic    id_active, id_advance;
  blk_id_t id;

  jpeg_mcu_id u_mcu_id (
    .clk, .rst_n, .start (scan_start),
    .mode (info.mode), .width (info.width), .height (info.height),
    .advance (id_advance), .active (id_active), .id
  );

  // MCU decoder
  logic               c_valid, c_ready, c_eob;
  logic [5:0]         c_idx;
  logic signed [15:0] c_coef;
  blk_id_t            c_id;
  logic               mcu_busy;

  jpeg_mcu_proc u_mcu_proc (
    .clk, .rst_n, .start (scan_start), .info,
    .window, .count, .pop, .pop_bits,
    .lu_table, .lu_bits, .lu_match, .lu_len, .lu_symbol,
    .id_active, .id, .id_advance,
    .out_valid (c_valid), .out_ready (c_ready), .out_eob (c_eob),
    .out_idx (c_idx), .out_coef (c_coef), .out_id (c_id), .busy (mcu_busy)
  );

  // DQT
  logic               d_valid, d_ready, d_eob;
  logic [5:0]         d_pos;
  logic signed [15:0] d_coef;
  blk_id_t            d_id;

  jpeg_dqt u_dqt (
    .clk, .rst_n,
    .wr_valid (dqt_wr_valid), .wr_table (dqt_wr_table),
    .wr_idx (dqt_wr_idx), .wr_data (dqt_wr_data), .info,
    .in_valid (c_valid), .in_ready (c_ready), .in_eob (c_eob),
    .in_idx (c_idx), .in_coef (c_coef), .in_id (c_id),
    .out_valid (d_valid), .out_ready (d_ready), .out_eob (d_eob),
    .out_pos (d_pos), .out_coef (d_coef), .out_id (d_id)
  );

  // IDCT
  logic       p_valid, p_ready, p_last, idct_busy;
  logic [5:0] p_pos;
  logic [7:0] p_pix;
  blk_id_t    p_id;

  jpeg_idct u_idct (
    .clk, .rst_n,
    .in_valid (d_valid), .in_ready (d_ready), .in_eob (d_eob),
    .in_pos (d_pos), .in_coef (d_coef), .in_id (d_id),
    .out_valid (p_valid), .out_ready (p_ready), .out_pos (p_pos),
    .out_pix (p_pix), .out_last (p_last), .out_id (p_id), .busy (idct_busy)
  );

  // Output
  logic out_busy;

  jpeg_output u_output (
    .clk, .rst_n, .info,
    .in_valid (p_valid), .in_ready (p_ready), .in_pos (p_pos),
    .in_pix (p_pix), .in_last (p_last), .in_id (p_id),
    .outport_valid   (outport_valid_o),
    .outport_width   (outport_width_o),
    .outport_height  (outport_height_o),
    .outport_pixel_x (outport_pixel_x_o),
    .outport_pixel_y (outport_pixel_y_o),
    .outport_pixel_r (outport_pixel_r_o),
    .outport_pixel_g (outport_pixel_g_o),
    .outport_pixel_b (outport_pixel_b_o),
    .outport_accept  (outport_accept_i),
    .busy (out_busy)
  );

  assign core_busy = mcu_busy || d_valid || idct_busy || out_busy;
  assign idle_o    = in_idle && !core_busy;
endmodule
