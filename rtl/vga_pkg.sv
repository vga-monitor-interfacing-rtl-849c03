// vga_pkg: shared timing constants, colour types and helpers for the
// 640 x 480, 60 Hz VGA controller and its two test-pattern generators.
//
// Timing (in pixel clocks of a 25 MHz pixel clock, and in lines):
//   horizontal: 800 clocks per line = 96 sync + 48 back porch
//               + 640 visible + 16 front porch   (32 us line, 3.84 us sync)
//   vertical:   521 lines per frame = 2 sync + 29 back porch
//               + 480 visible + 10 front porch   (16.7 ms frame, 64 us sync)
// These numbers are the published 640x480 timing table. Placing the sync
// pulse at count 0 (sync, back porch, visible, front porch) follows the
// controller structure in which a "zero detect" starts the sync pulse; the
// order of the other intervals is this design's choice.
//
// Colours: the display uses a 3-bit colour code {R,G,B}, one bit per gun,
// giving the eight colours black, blue, green, cyan, red, magenta, yellow and
// white. The board's VGA port carries 4 bits per channel (12 bits per
// pixel); a 3-bit code drives each channel fully on (4'hF) or off (4'h0).
package vga_pkg;

  // Horizontal timing, in pixel clocks.
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_FRONT  = 16;
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_BACK   = 48;
  localparam int unsigned H_TOTAL  = H_SYNC + H_BACK + H_ACTIVE + H_FRONT; // 800

  // Vertical timing, in lines.
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_FRONT  = 10;
  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_BACK   = 29;
  localparam int unsigned V_TOTAL  = V_SYNC + V_BACK + V_ACTIVE + V_FRONT; // 521

  // Width of a pixel coordinate and of the timing counters.
  localparam int unsigned COORD_W  = 10;

  // Number of colour bars / blocks per row or column.
  localparam int unsigned N_COLOURS = 8;

  // 3-bit colour code, one bit per gun: {red, green, blue}.
  typedef enum logic [2:0] {
    BLACK   = 3'b000,
    BLUE    = 3'b001,
    GREEN   = 3'b010,
    CYAN    = 3'b011,
    RED     = 3'b100,
    MAGENTA = 3'b101,
    YELLOW  = 3'b110,
    WHITE   = 3'b111
  } colour_t;

  // One pixel as driven onto the 12-bit VGA port.
  typedef struct packed {
    logic [3:0] red;
    logic [3:0] green;
    logic [3:0] blue;
  } rgb12_t;

  localparam rgb12_t RGB_BLANK = '{red: 4'h0, green: 4'h0, blue: 4'h0};

  // Expand a 3-bit colour code to the 12-bit port: each gun fully on or off.
  function automatic rgb12_t expand_colour(colour_t c);
    rgb12_t p;
    p.red   = {4{c[2]}};
    p.green = {4{c[1]}};
    p.blue  = {4{c[0]}};
    return p;
  endfunction

endpackage
