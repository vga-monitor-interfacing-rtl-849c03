// colour_grid: Part 2 test pattern, colour bars with the leftmost bar
// subdivided into a column of eight colour blocks.
//
// Columns 1..7 (x >= 80) are the Part 1 vertical bars, unchanged: colour
// code = x / 80. The leftmost bar (x < 80) is replaced by the same eight
// colours stacked vertically, each block 80 pixels wide and 480 / 8 = 60
// lines high: colour code = y / 60, black at the top and white at the
// bottom. The screen is thereby a grid of 8 x 8 = 64 cells of 80 x 60
// pixels. Outside the visible window the output is blank (black).
//
// The 80 x 60 block size, the leftmost bar as the one that is subdivided and
// the other bars left as in Part 1 are the document's; the top-to-bottom
// colour order and the one-clock output register are this design's choices.
//
// Interface and timing: x, y and video_on come from vga_controller in the
// same cycle; rgb is registered, one clock later, in step with the
// controller's registered syncs.
module colour_grid
  import vga_pkg::*;
#(
  parameter int unsigned H_ACT  = H_ACTIVE,
  parameter int unsigned V_ACT  = V_ACTIVE,
  parameter int unsigned N_BARS = N_COLOURS,
  parameter int unsigned CW     = COORD_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          video_on,
  input  logic [CW-1:0] x,
  input  logic [CW-1:0] y,
  output rgb12_t        rgb
);

  localparam int unsigned BAR_W   = H_ACT / N_BARS;  // 80
  localparam int unsigned BLOCK_H = V_ACT / N_BARS;  // 60

  logic    in_left_bar;
  colour_t cell_colour;

  always_comb begin
    in_left_bar = (x < CW'(BAR_W));
    if (in_left_bar) cell_colour = colour_t'(3'(y / CW'(BLOCK_H)));
    else             cell_colour = colour_t'(3'(x / CW'(BAR_W)));
  end

  always_ff @(posedge clk) begin
    if (rst || !video_on) rgb <= RGB_BLANK;
    else                  rgb <= expand_colour(cell_colour);
  end

  initial begin
    assert (N_BARS == 8 && H_ACT % N_BARS == 0 && V_ACT % N_BARS == 0)
      else $fatal(1, "colour_grid: needs 8 bars and blocks that divide the screen evenly");
  end

endmodule
