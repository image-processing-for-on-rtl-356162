// vga_clk_div: 25 MHz pixel rate from the 100 MHz board clock.
//
// A free-running modulo-DIV counter raises tick for one clock cycle in every
// DIV cycles (DIV = 4: 100 MHz / 4 = 25 MHz). The rest of the VGA logic runs
// on the board clock and advances only on tick, so the design has a single
// clock domain. The 100 MHz and 25 MHz figures are the design's; producing
// the pixel rate as a clock enable rather than a divided clock is this
// design's choice.
module vga_clk_div #(
  parameter int unsigned DIV = 4
) (
  input  logic clk,
  input  logic reset,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)                         cnt_q <= '0;
    else if (cnt_q == CW'(DIV - 1))    cnt_q <= '0;
    else                               cnt_q <= cnt_q + 1'b1;
  end

  assign tick = (cnt_q == CW'(DIV - 1));
endmodule
