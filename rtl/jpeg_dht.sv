// jpeg_dht: Huffman lookup for the MCU decoder.
//
// Holds the four Huffman tables of baseline JPEG (DC 0, DC 1, AC 0, AC 1),
// addressed by {class, id} with class 0 = DC and 1 = AC. A table is written
// as the header delivers it: the sixteen code counts of lengths 1..16
// (wr_is_count = 1, wr_idx = length-1) and then the symbol values in code
// order (wr_is_count = 0, wr_idx = position).
//
// The lookup is combinational. It takes the next 16 bits of the stream,
// most significant first, and the table to use, and returns the symbol and
// the length of the code found at the head of the bits. Codes are canonical,
// so for each length l the first code and the number of codes of that length
// fix a range; the first l bits are tested against the range of every l at
// once and the shortest length that hits gives the code. match is low if no
// length hits (a corrupt stream or an empty table). The decoding method is
// the usual canonical one; the fully parallel comparison is this design's
// choice and costs 16 comparators but needs no cycles.
module jpeg_dht (
  input  logic        clk,
  input  logic        rst_n,
  // table write port
  input  logic        wr_valid,
  input  logic [1:0]  wr_table,
  input  logic        wr_is_count,
  input  logic [7:0]  wr_idx,
  input  logic [7:0]  wr_data,
  // lookup
  input  logic [1:0]  lu_table,
  input  logic [15:0] lu_bits,
  output logic        lu_match,
  output logic [4:0]  lu_len,
  output logic [7:0]  lu_symbol
);
  logic [7:0] counts_q [4][16];
  logic [7:0] values_q [4][256];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < 4; t++)
        for (int l = 0; l < 16; l++) counts_q[t][l] <= '0;
    end else if (wr_valid && wr_is_count) begin
      counts_q[wr_table][wr_idx[3:0]] <= wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && !wr_is_count) values_q[wr_table][wr_idx] <= wr_data;
  end

  // First code and first symbol position of every length, for the table in use.
  logic [16:0] first_code [16];
  logic [8:0]  first_pos  [16];

  always_comb begin
    logic [16:0] code;
    logic [8:0]  pos;
    code = '0;
    pos  = '0;
    for (int l = 0; l < 16; l++) begin
      first_code[l] = code;
      first_pos[l]  = pos;
      code = (code + 17'(counts_q[lu_table][l])) << 1;
      pos  = pos + 9'(counts_q[lu_table][l]);
    end
  end

  always_comb begin
    logic [16:0] head;
    logic [16:0] offset;
    logic [8:0]  base;
    lu_match  = 1'b0;
    base      = '0;
    lu_len    = '0;
    offset    = '0;
    lu_symbol = '0;
    for (int l = 15; l >= 0; l--) begin
      head = 17'(lu_bits >> (15 - l));          // first l+1 bits
      if (head >= first_code[l] &&
          head <  first_code[l] + 17'(counts_q[lu_table][l])) begin
        lu_match = 1'b1;
        lu_len   = 5'(l + 1);
        offset   = head - first_code[l];
        base     = first_pos[l];
      end
    end
    lu_symbol = values_q[lu_table][8'(base + offset[8:0])];
  end
endmodule
