// jpeg_mcu_proc: MCU decoder.
//
// Decodes the entropy-coded data of a scan into quantised DCT coefficients,
// block after block, in the order and with the identification given by the
// MCU ID generator. For each block it:
//   - decodes the DC category with the component's DC Huffman table, reads
//     that many magnitude bits, and adds the difference to the component's
//     DC predictor (cleared by start);
//   - decodes run/size symbols with the component's AC table: size 0 with
//     run 15 skips sixteen zeros, size 0 otherwise ends the block (EOB), any
//     other symbol skips run zeros and gives one coefficient;
//   - after coefficient 63 or EOB sends an end-of-block token that carries
//     the block's ID.
// Coefficients leave as (zigzag index, value) pairs, zeros not sent. One
// Huffman code with its magnitude bits is consumed per cycle: the code length
// from the Huffman lookup and the magnitude size are added and taken from the
// bit buffer together, once the buffer holds that many bits. out_valid /
// out_ready is a valid-ready handshake; the decoder waits while out_ready is
// low. A code that matches no table entry while 16 bits are available ends
// the block early, so a corrupt stream cannot hang the decoder.
//
// The steps are those of baseline JPEG Huffman decoding; the one-code-per-
// cycle scheduling and the token format are this design's choices.
module jpeg_mcu_proc
  import jpeg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  img_info_t          info,
  // bit buffer
  input  logic [31:0]        window,
  input  logic [6:0]         count,
  output logic               pop,
  output logic [5:0]         pop_bits,
  // Huffman lookup
  output logic [1:0]         lu_table,
  output logic [15:0]        lu_bits,
  input  logic               lu_match,
  input  logic [4:0]         lu_len,
  input  logic [7:0]         lu_symbol,
  // MCU ID generator
  input  logic               id_active,
  input  blk_id_t            id,
  output logic               id_advance,
  // coefficient tokens
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_eob,
  output logic [5:0]         out_idx,
  output logic signed [15:0] out_coef,
  output blk_id_t            out_id,
  output logic               busy
);
  typedef enum logic [2:0] {S_IDLE, S_SYNC, S_BLOCK, S_DC, S_AC, S_EOB} state_e;

  state_e             state_q;
  logic [6:0]         k_q;
  logic signed [15:0] pred_q [3];

  // Table selection for the current component.
  logic dc_tab, ac_tab;
  always_comb begin
    unique case (id.comp)
      COMP_CB: begin dc_tab = info.dc_cb; ac_tab = info.ac_cb; end
      COMP_CR: begin dc_tab = info.dc_cr; ac_tab = info.ac_cr; end
      default: begin dc_tab = info.dc_y;  ac_tab = info.ac_y;  end
    endcase
  end
  assign lu_table = (state_q == S_AC) ? {1'b1, ac_tab} : {1'b0, dc_tab};
  assign lu_bits  = window[31:16];

  // Magnitude bits that follow the code, and their signed value.
  logic [3:0]         size;
  logic [3:0]         run;
  logic [31:0]        after_code;
  logic [10:0]        mag;
  logic signed [15:0] value;
  logic [5:0]         need;
  logic               have_bits;
  logic               bad_code;

  always_comb begin
    run  = (state_q == S_AC) ? lu_symbol[7:4] : 4'd0;
    size = lu_symbol[3:0];
    if (size > 4'd11) size = 4'd11;
    after_code = window << lu_len;
    mag        = after_code[31:21] >> (4'd11 - size);
    if (size == 4'd0)
      value = '0;
    else if (mag < (11'd1 << (size - 4'd1)))
      value = 16'(signed'({5'd0, mag})) - (16'sd1 <<< size) + 16'sd1;
    else
      value = 16'(signed'({5'd0, mag}));
    need      = 6'(lu_len) + 6'(size);
    have_bits = lu_match && (count >= 7'(need));
    bad_code  = !lu_match && (count >= 7'd16);
  end

  logic [6:0] ac_pos;
  assign ac_pos = k_q + 7'(run);

  logic signed [15:0] dc_new;
  assign dc_new = pred_q[id.comp] + value;

  // Outputs and the decision of this cycle.
  always_comb begin
    pop        = 1'b0;
    pop_bits   = need;
    out_valid  = 1'b0;
    out_eob    = 1'b0;
    out_idx    = '0;
    out_coef   = '0;
    id_advance = 1'b0;
    unique case (state_q)
      S_DC: if (have_bits) begin
        out_valid = 1'b1;
        out_idx   = '0;
        out_coef  = dc_new;
        pop       = out_ready;
      end
      S_AC: if (have_bits) begin
        if (size == 4'd0) begin
          pop      = 1'b1;               // EOB or ZRL
          pop_bits = 6'(lu_len);
        end else if (ac_pos <= 7'd63) begin
          out_valid = 1'b1;
          out_idx   = ac_pos[5:0];
          out_coef  = value;
          pop       = out_ready;
        end
      end
      S_EOB: begin
        out_valid  = 1'b1;
        out_eob    = 1'b1;
        id_advance = out_ready;
      end
      default: ;
    endcase
  end
  assign out_id = id;
  assign busy   = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      k_q     <= '0;
      pred_q  <= '{default: '0};
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          pred_q  <= '{default: '0};
          state_q <= S_SYNC;
        end
        S_SYNC:  state_q <= S_BLOCK;      // ID generator loads its first block
        S_BLOCK: state_q <= id_active ? S_DC : S_IDLE;
        S_DC: begin
          if (have_bits && out_ready) begin
            pred_q[id.comp] <= dc_new;
            k_q             <= 7'd1;
            state_q         <= S_AC;
          end else if (bad_code) begin
            state_q <= S_EOB;
          end
        end
        S_AC: begin
          if (have_bits) begin
            if (size == 4'd0) begin
              if (run == 4'd15 && k_q + 7'd16 <= 7'd63) k_q <= k_q + 7'd16;
              else                                      state_q <= S_EOB;
            end else if (ac_pos > 7'd63) begin
              state_q <= S_EOB;
            end else if (out_ready) begin
              k_q <= ac_pos + 7'd1;
              if (ac_pos == 7'd63) state_q <= S_EOB;
            end
          end else if (bad_code) begin
            state_q <= S_EOB;
          end
        end
        S_EOB: if (out_ready) state_q <= S_BLOCK;
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
