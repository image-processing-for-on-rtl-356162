// jpeg_bitbuffer: the bit buffer FIFO between the input stream processor and
// the MCU decoder.
//
// Entropy-coded bytes (already freed of stuffing) enter one per cycle at
// in_data; the decoder sees the next 32 bits of the stream at window, most
// significant bit first, with count telling how many of them (up to 64 held)
// are valid. The decoder removes pop_bits bits (0..32) in a cycle by raising
// pop; it must never remove more than count. A byte is taken whenever at
// most 56 bits remain after the pop, so push and pop can happen in the same
// cycle. flush empties the buffer at the start of each scan. The buffer is a
// 64-bit shift register; its size is a choice of this design, large enough
// for the longest Huffman code (16 bits) plus its longest magnitude (11 bits).
module jpeg_bitbuffer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        in_ready,
  output logic [31:0] window,
  output logic [6:0]  count,
  input  logic        pop,
  input  logic [5:0]  pop_bits
);
  logic [63:0] bits_q;
  logic [6:0]  count_q;
  logic [63:0] shifted;
  logic [6:0]  remain;

  assign shifted  = pop ? (bits_q << pop_bits) : bits_q;
  assign remain   = pop ? (count_q - 7'(pop_bits)) : count_q;
  assign in_ready = (remain <= 7'd56) && !flush;
  assign window   = bits_q[63:32];
  assign count    = count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q  <= '0;
      count_q <= '0;
    end else if (flush) begin
      bits_q  <= '0;
      count_q <= '0;
    end else if (in_valid && in_ready) begin
      bits_q  <= shifted | ({56'd0, in_data} << (7'd56 - remain));
      count_q <= remain + 7'd8;
    end else begin
      bits_q  <= shifted;
      count_q <= remain;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> (7'(pop_bits) <= count_q));
endmodule
