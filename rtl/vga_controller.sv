// vga_controller: 640x480 VGA timing generator.
//
// A horizontal counter x runs over 0..H_TOTAL-1 at the pixel rate (one step
// per tick of vga_clk_div); at its wrap the vertical counter y steps over
// 0..V_TOTAL-1. Three comparators decode the counters:
//   video_on = x < 640 && y < 480            (visible area)
//   hsync    = x >= 640 && x < 752
//   vsync    = y >= 513 && y < 815
// The three outputs are registered, so they follow x and y by one board
// clock cycle (a fraction of a pixel). p_tick is the 25 MHz pixel enable.
// The comparator limits are the design's; the line and frame lengths
// (800 pixel clocks, 525 lines), the output polarity (a comparator's result
// is driven as it is, high inside its range) and the registering of the
// outputs are this design's choices. With 525 lines the vsync range ends at
// the end of the frame.
module vga_controller #(
  parameter int unsigned H_ACTIVE     = 640,
  parameter int unsigned V_ACTIVE     = 480,
  parameter int unsigned H_SYNC_START = 640,
  parameter int unsigned H_SYNC_END   = 752,
  parameter int unsigned V_SYNC_START = 513,
  parameter int unsigned V_SYNC_END   = 815,
  parameter int unsigned H_TOTAL      = 800,
  parameter int unsigned V_TOTAL      = 525,
  parameter int unsigned CLK_DIV      = 4
) (
  input  logic       clk,
  input  logic       reset,
  output logic       hsync,
  output logic       vsync,
  output logic       video_on,
  output logic       p_tick,
  output logic [9:0] x,
  output logic [9:0] y
);
  logic [9:0] h_q, v_q;
  logic       h_end, v_end;

  vga_clk_div #(.DIV(CLK_DIV)) u_div (.clk, .reset, .tick(p_tick));

  assign h_end = (h_q == 10'(H_TOTAL - 1));
  assign v_end = (v_q == 10'(V_TOTAL - 1));

  // Horizontal and vertical counters.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      h_q <= '0;
      v_q <= '0;
    end else if (p_tick) begin
      if (h_end) begin
        h_q <= '0;
        v_q <= v_end ? 10'd0 : v_q + 10'd1;
      end else begin
        h_q <= h_q + 10'd1;
      end
    end
  end

  // Comparators.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      video_on <= 1'b0;
      hsync    <= 1'b0;
      vsync    <= 1'b0;
    end else begin
      video_on <= (32'(h_q) < H_ACTIVE) && (32'(v_q) < V_ACTIVE);
      hsync    <= (32'(h_q) >= H_SYNC_START) && (32'(h_q) < H_SYNC_END);
      vsync    <= (32'(v_q) >= V_SYNC_START) && (32'(v_q) < V_SYNC_END);
    end
  end

  assign x = h_q;
  assign y = v_q;
endmodule
