// vga_top: the two VGA test-pattern designs, side by side.
//
// Each design is a complete 640 x 480, 60 Hz VGA source for one monitor: a
// vga_controller produces the horizontal and vertical sync pulses and the
// current pixel position, and a pattern generator turns the position into a
// 12-bit colour (4 bits per gun, each gun fully on or off).
//   Part 1 (p1_*): colour_bars, eight 80-pixel-wide vertical bars in the
//                  eight 3-bit colours.
//   Part 2 (p2_*): colour_grid, the same bars with the leftmost one split
//                  into eight 80 x 60 blocks in the eight colours.
// The two parts were built as separate designs; here they share the pixel
// clock and reset but have independent controllers and ports, and each
// port connects directly to the 4+4+4 colour resistor network and the two
// sync lines of a VGA connector.
//
// Interface and timing: clk is the 25 MHz pixel clock (800 x 521 x 60 Hz =
// 25.0 MHz); rst is synchronous and active high. All outputs are registered.
// After reset each controller starts at the beginning of a frame: the sync
// pulses start one clock after reset is released, and the first visible
// pixel appears 31 lines + 144 clocks after that.
module vga_top
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // Part 1 VGA port
  output logic       p1_hsync_n,
  output logic       p1_vsync_n,
  output logic [3:0] p1_red,
  output logic [3:0] p1_green,
  output logic [3:0] p1_blue,
  // Part 2 VGA port
  output logic       p2_hsync_n,
  output logic       p2_vsync_n,
  output logic [3:0] p2_red,
  output logic [3:0] p2_green,
  output logic [3:0] p2_blue
);

  // ---------------- Part 1: vertical colour bars ----------------
  logic               p1_video_on;
  logic [COORD_W-1:0] p1_x;
  rgb12_t             p1_rgb;

  vga_controller u_p1_ctrl (
    .clk         (clk),
    .rst         (rst),
    .hsync_n     (p1_hsync_n),
    .vsync_n     (p1_vsync_n),
    .video_on    (p1_video_on),
    .x           (p1_x),
    .y           (),
    .hcount      (),
    .vcount      (),
    .frame_start ()
  );

  colour_bars u_p1_bars (
    .clk      (clk),
    .rst      (rst),
    .video_on (p1_video_on),
    .x        (p1_x),
    .rgb      (p1_rgb)
  );

  assign p1_red   = p1_rgb.red;
  assign p1_green = p1_rgb.green;
  assign p1_blue  = p1_rgb.blue;

  // ---------------- Part 2: bars with a column of blocks ----------------
  logic               p2_video_on;
  logic [COORD_W-1:0] p2_x, p2_y;
  rgb12_t             p2_rgb;

  vga_controller u_p2_ctrl (
    .clk         (clk),
    .rst         (rst),
    .hsync_n     (p2_hsync_n),
    .vsync_n     (p2_vsync_n),
    .video_on    (p2_video_on),
    .x           (p2_x),
    .y           (p2_y),
    .hcount      (),
    .vcount      (),
    .frame_start ()
  );

  colour_grid u_p2_grid (
    .clk      (clk),
    .rst      (rst),
    .video_on (p2_video_on),
    .x        (p2_x),
    .y        (p2_y),
    .rgb      (p2_rgb)
  );

  assign p2_red   = p2_rgb.red;
  assign p2_green = p2_rgb.green;
  assign p2_blue  = p2_rgb.blue;

endmodule
