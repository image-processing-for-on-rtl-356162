// jpeg_dqt: de-quantisation and de-zigzag.
//
// Holds the four 8-bit quantisation tables of baseline JPEG, written in the
// zigzag order in which the file carries them. Each coefficient token from
// the MCU decoder (zigzag index k, quantised value) is multiplied by entry k
// of its component's table and leaves with the natural (row-major) position
// of k inside the 8x8 block, ready for the IDCT input buffer. Products are
// saturated to 16 bits. End-of-block tokens pass unchanged. The block is one
// register stage with a valid-ready handshake on both sides (one token per
// cycle, latency one cycle).
//
// The operation follows the decoder's description. The position is computed
// by jpeg_pkg::zigzag_to_natural, which walks the zigzag path, so no table of
// positions is stored; saturation and the single pipeline stage are this
// design's choices.
module jpeg_dqt
  import jpeg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // table writes
  input  logic               wr_valid,
  input  logic [1:0]         wr_table,
  input  logic [5:0]         wr_idx,
  input  logic [7:0]         wr_data,
  input  img_info_t          info,
  // quantised coefficients, zigzag order
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_eob,
  input  logic [5:0]         in_idx,
  input  logic signed [15:0] in_coef,
  input  blk_id_t            in_id,
  // de-quantised coefficients, natural order
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_eob,
  output logic [5:0]         out_pos,
  output logic signed [15:0] out_coef,
  output blk_id_t            out_id
);
  logic [7:0] qtab [4][64];

  always_ff @(posedge clk) begin
    if (wr_valid) qtab[wr_table][wr_idx] <= wr_data;
  end

  logic [1:0]         tsel;
  logic signed [24:0] prod;
  logic signed [15:0] sat;

  always_comb begin
    unique case (in_id.comp)
      COMP_CB: tsel = info.qt_cb;
      COMP_CR: tsel = info.qt_cr;
      default: tsel = info.qt_y;
    endcase
    prod = 25'(in_coef) * 25'(signed'({1'b0, qtab[tsel][in_idx]}));
    if (prod > 25'sd32767)       sat = 16'sh7FFF;
    else if (prod < -25'sd32768) sat = -16'sh8000;
    else                         sat = prod[15:0];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_eob   <= 1'b0;
      out_pos   <= '0;
      out_coef  <= '0;
      out_id    <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_eob  <= in_eob;
        out_pos  <= zigzag_to_natural(in_idx);
        out_coef <= sat;
        out_id   <= in_id;
      end
    end
  end
endmodule
