// colour_bars: Part 1 test pattern, eight vertical colour bars.
//
// The 640-pixel visible line is cut into N_BARS = 8 bars of H_ACT / N_BARS
// = 80 pixels, each the full 480 lines high. Bar k (counting from the left)
// shows the 3-bit colour code k = {R,G,B}, so the bars run black, blue,
// green, cyan, red, magenta, yellow, white. Outside the visible window the
// output is blanked to black, as a VGA monitor requires during retrace.
//
// Eight bars of 80 x 480 pixels in the eight 3-bit colours are the
// document's; the left-to-right order (the colour-table order) and the
// one-clock output register are this design's choices.
//
// Interface and timing: x and video_on come from vga_controller in the same
// cycle; rgb is registered, one clock later, which lines it up with the
// controller's registered hsync_n / vsync_n.
module colour_bars
  import vga_pkg::*;
#(
  parameter int unsigned H_ACT  = H_ACTIVE,
  parameter int unsigned N_BARS = N_COLOURS,
  parameter int unsigned CW     = COORD_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          video_on,
  input  logic [CW-1:0] x,
  output rgb12_t        rgb
);

  localparam int unsigned BAR_W = H_ACT / N_BARS;

  colour_t bar_colour;

  always_comb begin
    bar_colour = colour_t'(3'(x / CW'(BAR_W)));
  end

  always_ff @(posedge clk) begin
    if (rst || !video_on) rgb <= RGB_BLANK;
    else                  rgb <= expand_colour(bar_colour);
  end

  initial begin
    assert (N_BARS == 8 && H_ACT % N_BARS == 0)
      else $fatal(1, "colour_bars: needs 8 bars that divide the line evenly");
  end

endmodule
