// vga_test: VGA test design, the pixel generation circuit around
// vga_controller.
//
// The twelve switches select a colour (4 bits each of red, green, blue, as
// the board's 12-bit VGA port takes them). The switch value is registered on
// every board clock and drives rgb while the controller reports the visible
// area; outside it rgb is black, as the VGA blanking intervals require. The
// module is the top of the VGA design and instantiates vga_controller. The
// use of switches as the colour source and the 4:4:4-bit colour split are
// this design's choices, made to fit the board's VGA port.
module vga_test (
  input  logic        clk,
  input  logic        reset,
  input  logic [11:0] sw,
  output logic        hsync,
  output logic        vsync,
  output logic [11:0] rgb
);
  logic       video_on, p_tick;
  logic [9:0] x, y;
  logic [11:0] rgb_q;

  vga_controller u_vga (
    .clk, .reset, .hsync, .vsync, .video_on, .p_tick, .x, .y
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) rgb_q <= '0;
    else       rgb_q <= sw;
  end

  assign rgb = video_on ? rgb_q : 12'd0;

  logic unused;
  assign unused = ^{p_tick, x, y};
endmodule
