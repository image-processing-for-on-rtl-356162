// osd_top: the JPEG decoder and the VGA test design of the on-screen-display
// system, side by side.
//
// jpeg_core decodes a JPEG file arriving on a 32-bit AXI stream into RGB
// pixels with their X,Y position; vga_test drives a 640x480 VGA monitor with
// a switch-selected colour. The two are independent designs with their own
// clock, reset and ports: no path from decoded pixels to the screen (a frame
// buffer) is part of this design.
module osd_top (
  // JPEG decoder
  input  logic        jpeg_clk_i,
  input  logic        jpeg_rst_i,
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
  output logic        idle_o,
  // VGA test design
  input  logic        vga_clk_i,
  input  logic        vga_reset_i,
  input  logic [11:0] sw_i,
  output logic        hsync_o,
  output logic        vsync_o,
  output logic [11:0] rgb_o
);
  jpeg_core u_jpeg (
    .clk_i (jpeg_clk_i), .rst_i (jpeg_rst_i),
    .inport_valid_i, .inport_data_i, .inport_strb_i, .inport_last_i,
    .inport_accept_o, .outport_valid_o, .outport_width_o, .outport_height_o,
    .outport_pixel_x_o, .outport_pixel_y_o, .outport_pixel_r_o,
    .outport_pixel_g_o, .outport_pixel_b_o, .outport_accept_i, .idle_o
  );

  vga_test u_vga (
    .clk (vga_clk_i), .reset (vga_reset_i), .sw (sw_i),
    .hsync (hsync_o), .vsync (vsync_o), .rgb (rgb_o)
  );
endmodule
