// jpeg_input: input stream processor of the JPEG decoder.
//
// Takes the JPEG file as a 32-bit AXI stream (byte lane 0 first, lanes with
// inport_strb low are skipped) and walks it one byte per cycle. Marker
// segments are parsed here:
//   DQT  - 8-bit quantisation tables, written to the DQT block in zigzag order
//   DHT  - Huffman tables, counts and symbols written to the Huffman lookup
//   SOF0 - picture size, number of components, sampling of Y, table numbers
//   SOS  - Huffman table numbers of each component; the entropy-coded data
//          that follows is passed on to the bit buffer
//   EOI  - ends the picture; the stream stalls until the rest of the decoder
//          reports idle, so tables and picture size of the next file cannot
//          overwrite those still in use. While it waits, 0xFF bytes are
//          offered to the bit buffer. A complete scan never reads them, but
//          a scan cut short then runs into all-ones bits, which are no valid
//          Huffman code, so every remaining block ends at once and the
//          picture is still finished instead of waiting for data for ever
// Other segments (APPn, COM, ...) are skipped by their length. In the
// entropy-coded data a stuffed 0xFF 0x00 is passed on as 0xFF and restart
// markers are dropped. inport_last is not needed: the markers delimit the
// picture. scan_start pulses for one cycle when the scan header ends.
//
// What the block does follows the decoder's description; the byte-serial
// parser, the wait and fill at EOI and the set of markers handled are this design's
// choices (baseline JPEG only: no progressive, 12-bit or 16-bit tables,
// restart intervals are not tracked).
module jpeg_input
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // JPEG file, AXI stream
  input  logic        inport_valid,
  input  logic [31:0] inport_data,
  input  logic [3:0]  inport_strb,
  input  logic        inport_last,
  output logic        inport_accept,
  // entropy-coded bytes to the bit buffer
  output logic        data_valid,
  output logic [7:0]  data_byte,
  input  logic        data_ready,
  // quantisation table writes
  output logic        dqt_wr_valid,
  output logic [1:0]  dqt_wr_table,
  output logic [5:0]  dqt_wr_idx,
  output logic [7:0]  dqt_wr_data,
  // Huffman table writes
  output logic        dht_wr_valid,
  output logic [1:0]  dht_wr_table,
  output logic        dht_wr_is_count,
  output logic [7:0]  dht_wr_idx,
  output logic [7:0]  dht_wr_data,
  // picture information
  output img_info_t   info,
  output logic        scan_start,
  input  logic        core_busy,
  output logic        idle
);
  typedef enum logic [2:0] {
    S_IDLE, S_MARK, S_LEN_HI, S_LEN_LO, S_SEG, S_DATA, S_DATA_FF, S_WAIT
  } state_e;
  typedef enum logic [2:0] {SEG_SKIP, SEG_DQT, SEG_DHT, SEG_SOF, SEG_SOS} seg_e;

  state_e      state_q;
  seg_e        seg_q;
  logic [15:0] remain_q;     // payload bytes left in the segment
  logic [8:0]  pos_q;        // position inside a table / header
  logic [1:0]  sub_q;        // DQT: 0 header 1 values; DHT: 0 header 1 counts 2 symbols
  logic [1:0]  tbl_q;
  logic [8:0]  total_q;      // DHT: number of symbols
  logic [1:0]  comp_q;       // SOF / SOS: component index
  logic [7:0]  ns_q;         // SOS: components in the scan

  // Byte lanes of the current word.
  logic [31:0] word_q;
  logic [3:0]  lanes_q;
  logic        have_byte;
  logic [7:0]  cur_byte;
  logic [1:0]  cur_lane;
  logic        take;         // current byte consumed this cycle

  // Header fields.
  logic [15:0] width_q, height_q;
  logic [7:0]  nf_q, hv_y_q;
  logic [1:0]  qt_q [3];
  logic        td_q [3];
  logic        ta_q [3];

  logic unused_last;
  assign unused_last = inport_last;

  always_comb begin
    cur_lane = 2'd0;
    for (int i = 3; i >= 0; i--) if (lanes_q[i]) cur_lane = 2'(i);
  end
  assign have_byte = |lanes_q;
  assign cur_byte  = word_q[8*cur_lane +: 8];

  // A new word is loaded once the last valid lane of the present one goes.
  logic last_lane;
  assign last_lane     = (lanes_q & ~(4'd1 << cur_lane)) == 4'd0;
  assign inport_accept = !have_byte || (take && last_lane);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q  <= '0;
      lanes_q <= '0;
    end else if (inport_valid && inport_accept) begin
      word_q  <= inport_data;
      lanes_q <= inport_strb;
    end else if (take) begin
      lanes_q <= lanes_q & ~(4'd1 << cur_lane);
    end
  end

  // Entropy-coded output.
  always_comb begin
    data_valid = 1'b0;
    data_byte  = cur_byte;
    if (state_q == S_WAIT) begin
      data_valid = 1'b1;               // fill after EOI, see the head comment
      data_byte  = 8'hFF;
    end else if (have_byte) begin
      if (state_q == S_DATA && cur_byte != 8'hFF) data_valid = 1'b1;
      if (state_q == S_DATA_FF && cur_byte == 8'h00) begin
        data_valid = 1'b1;
        data_byte  = 8'hFF;
      end
    end
  end

  always_comb begin
    take = have_byte;
    if (data_valid && !data_ready) take = 1'b0;
    if (state_q == S_WAIT) take = 1'b0;
  end

  // Table writes, straight from the current byte.
  always_comb begin
    dqt_wr_valid    = take && state_q == S_SEG && seg_q == SEG_DQT && sub_q == 2'd1;
    dqt_wr_table    = tbl_q;
    dqt_wr_idx      = pos_q[5:0];
    dqt_wr_data     = cur_byte;
    dht_wr_valid    = take && state_q == S_SEG && seg_q == SEG_DHT && sub_q != 2'd0;
    dht_wr_table    = tbl_q;
    dht_wr_is_count = (sub_q == 2'd1);
    dht_wr_idx      = pos_q[7:0];
    dht_wr_data     = cur_byte;
  end

  // Marker byte handling, shared by S_MARK and S_DATA_FF.
  function automatic seg_e seg_of(logic [7:0] m);
    case (m)
      8'hDB:   return SEG_DQT;
      8'hC4:   return SEG_DHT;
      8'hC0:   return SEG_SOF;
      8'hDA:   return SEG_SOS;
      default: return SEG_SKIP;
    endcase
  endfunction

  logic seg_last;
  assign seg_last = (remain_q == 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      seg_q      <= SEG_SKIP;
      remain_q   <= '0;
      pos_q      <= '0;
      sub_q      <= '0;
      tbl_q      <= '0;
      total_q    <= '0;
      comp_q     <= '0;
      ns_q       <= '0;
      width_q    <= '0;
      height_q   <= '0;
      nf_q       <= '0;
      hv_y_q     <= '0;
      qt_q       <= '{default: '0};
      td_q       <= '{default: '0};
      ta_q       <= '{default: '0};
      scan_start <= 1'b0;
    end else begin
      scan_start <= 1'b0;
      if (state_q == S_WAIT) begin
        if (!core_busy) state_q <= S_IDLE;
      end else if (take) begin
        unique case (state_q)
          S_IDLE: if (cur_byte == 8'hFF) state_q <= S_MARK;
          S_MARK, S_DATA_FF: begin
            if (cur_byte == 8'hFF) begin
              state_q <= state_q;
            end else if (state_q == S_DATA_FF &&
                         (cur_byte == 8'h00 || cur_byte[7:3] == 5'b11010)) begin
              state_q <= S_DATA;                 // stuffed byte or RSTn
            end else if (cur_byte == 8'hD9) begin
              state_q <= S_WAIT;                 // EOI
            end else if (cur_byte == 8'hD8 || cur_byte == 8'h00 ||
                         cur_byte[7:3] == 5'b11010) begin
              state_q <= S_IDLE;                 // SOI, stray, RSTn
            end else begin
              seg_q   <= seg_of(cur_byte);
              state_q <= S_LEN_HI;
            end
          end
          S_LEN_HI: begin
            remain_q[15:8] <= cur_byte;
            state_q        <= S_LEN_LO;
          end
          S_LEN_LO: begin
            remain_q <= {remain_q[15:8], cur_byte} - 16'd2;
            pos_q    <= '0;
            sub_q    <= '0;
            comp_q   <= '0;
            if ({remain_q[15:8], cur_byte} <= 16'd2) begin
              state_q <= (seg_q == SEG_SOS) ? S_DATA : S_IDLE;
              if (seg_q == SEG_SOS) scan_start <= 1'b1;
            end else begin
              state_q <= S_SEG;
            end
          end
          S_SEG: begin
            remain_q <= remain_q - 16'd1;
            if (seg_last) begin
              state_q <= (seg_q == SEG_SOS) ? S_DATA : S_IDLE;
              if (seg_q == SEG_SOS) scan_start <= 1'b1;
            end
            case (seg_q)
              SEG_DQT: begin
                if (sub_q == 2'd0) begin
                  tbl_q <= cur_byte[1:0];
                  pos_q <= '0;
                  sub_q <= 2'd1;
                end else begin
                  pos_q <= pos_q + 9'd1;
                  if (pos_q == 9'd63) sub_q <= 2'd0;
                end
              end
              SEG_DHT: begin
                if (sub_q == 2'd0) begin
                  tbl_q   <= {cur_byte[4], cur_byte[0]};
                  pos_q   <= '0;
                  total_q <= '0;
                  sub_q   <= 2'd1;
                end else if (sub_q == 2'd1) begin
                  total_q <= total_q + 9'(cur_byte);
                  pos_q   <= pos_q + 9'd1;
                  if (pos_q == 9'd15) begin
                    pos_q <= '0;
                    sub_q <= (total_q + 9'(cur_byte) == 9'd0) ? 2'd0 : 2'd2;
                  end
                end else begin
                  pos_q <= pos_q + 9'd1;
                  if (pos_q + 9'd1 == total_q) sub_q <= 2'd0;
                end
              end
              SEG_SOF: begin
                pos_q <= pos_q + 9'd1;
                case (pos_q)
                  9'd1: height_q[15:8] <= cur_byte;
                  9'd2: height_q[7:0]  <= cur_byte;
                  9'd3: width_q[15:8]  <= cur_byte;
                  9'd4: width_q[7:0]   <= cur_byte;
                  9'd5: nf_q           <= cur_byte;
                  9'd7: hv_y_q         <= cur_byte;
                  default: ;
                endcase
                // component i: id at 6+3i, sampling at 7+3i, table at 8+3i
                if (pos_q == 9'd8 || pos_q == 9'd11 || pos_q == 9'd14) begin
                  qt_q[comp_q] <= cur_byte[1:0];
                  comp_q       <= comp_q + 2'd1;
                end
              end
              SEG_SOS: begin
                pos_q <= pos_q + 9'd1;
                if (pos_q == 9'd0) ns_q <= cur_byte;
                // component j: selector at 1+2j, tables at 2+2j
                if ((pos_q == 9'd2 || pos_q == 9'd4 || pos_q == 9'd6) && 8'(comp_q) < ns_q) begin
                  td_q[comp_q] <= cur_byte[4];
                  ta_q[comp_q] <= cur_byte[0];
                  comp_q       <= comp_q + 2'd1;
                end
              end
              default: ;
            endcase
          end
          S_DATA: if (cur_byte == 8'hFF) state_q <= S_DATA_FF;
          default: ;
        endcase
      end
    end
  end

  // Picture information.
  always_comb begin
    info.width  = width_q;
    info.height = height_q;
    if (nf_q == 8'd1)          info.mode = MODE_GRAY;
    else if (hv_y_q == 8'h22)  info.mode = MODE_420;
    else if (hv_y_q == 8'h21)  info.mode = MODE_422;
    else                       info.mode = MODE_444;
    info.qt_y  = qt_q[0];
    info.qt_cb = qt_q[1];
    info.qt_cr = qt_q[2];
    info.dc_y  = td_q[0];
    info.dc_cb = td_q[1];
    info.dc_cr = td_q[2];
    info.ac_y  = ta_q[0];
    info.ac_cb = ta_q[1];
    info.ac_cr = ta_q[2];
  end

  assign idle = (state_q == S_IDLE) && !have_byte;
endmodule
