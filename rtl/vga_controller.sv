// vga_controller: 640 x 480 at 60 Hz VGA timing generator.
//
// Two sync_gen counters are chained: the horizontal counter runs on every
// pixel clock and counts the 800 clocks of a line; the vertical counter is
// clock-enabled once per line (when the horizontal counter wraps, i.e. at the
// start of each horizontal sync pulse) and counts the 521 lines of a frame.
// Each counter's zero detect and pulse-width detect set and reset its sync
// flip-flop, giving HS (96 clocks = 3.84 us) and VS (2 lines = 64 us). The
// same two counters locate the beam: the visible window is counts
// [SYNC+BACK, SYNC+BACK+ACTIVE) on each axis, and subtracting SYNC+BACK gives
// the pixel column x (0..639) and row y (0..479).
//
// The chained counters with zero / width detectors follow the controller
// block diagram; the interval lengths are the 640x480 timing table; the
// order sync, back porch, visible, front porch within each period and the
// active-low syncs are this design's choices.
//
// Interface and timing (clk is the 25 MHz pixel clock):
//   hcount, vcount  raw counter values (registered)
//   video_on, x, y  decoded combinationally from the counters in the same
//                   cycle; x and y are 0 outside the visible window
//   hsync_n, vsync_n registered, so they lag the counters by one clock. A
//                   pixel stage that registers its colour from x / y /
//                   video_on lines its output up with the syncs.
//   frame_start     combinational, high for the one clock where both
//                   counters are 0
module vga_controller
  import vga_pkg::*;
#(
  parameter int unsigned H_ACT  = H_ACTIVE,
  parameter int unsigned H_FP   = H_FRONT,
  parameter int unsigned H_SW   = H_SYNC,
  parameter int unsigned H_BP   = H_BACK,
  parameter int unsigned V_ACT  = V_ACTIVE,
  parameter int unsigned V_FP   = V_FRONT,
  parameter int unsigned V_SW   = V_SYNC,
  parameter int unsigned V_BP   = V_BACK,
  parameter int unsigned CW     = COORD_W
) (
  input  logic          clk,
  input  logic          rst,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          video_on,
  output logic [CW-1:0] x,
  output logic [CW-1:0] y,
  output logic [CW-1:0] hcount,
  output logic [CW-1:0] vcount,
  output logic          frame_start
);

  localparam int unsigned H_TOT   = H_SW + H_BP + H_ACT + H_FP;
  localparam int unsigned V_TOT   = V_SW + V_BP + V_ACT + V_FP;
  localparam int unsigned H_FIRST = H_SW + H_BP;   // first visible column count
  localparam int unsigned V_FIRST = V_SW + V_BP;   // first visible line count

  logic h_wrap, v_wrap_unused;
  logic h_vis, v_vis;

  sync_gen #(.TOTAL(H_TOT), .PULSE(H_SW), .W(CW)) u_hsync (
    .clk    (clk),
    .rst    (rst),
    .ce     (1'b1),
    .count  (hcount),
    .wrap   (h_wrap),
    .sync_n (hsync_n)
  );

  sync_gen #(.TOTAL(V_TOT), .PULSE(V_SW), .W(CW)) u_vsync (
    .clk    (clk),
    .rst    (rst),
    .ce     (h_wrap),
    .count  (vcount),
    .wrap   (v_wrap_unused),
    .sync_n (vsync_n)
  );

  assign h_vis    = (hcount >= CW'(H_FIRST)) && (hcount < CW'(H_FIRST + H_ACT));
  assign v_vis    = (vcount >= CW'(V_FIRST)) && (vcount < CW'(V_FIRST + V_ACT));
  assign video_on = h_vis && v_vis;
  assign x        = h_vis ? hcount - CW'(H_FIRST) : '0;
  assign y        = v_vis ? vcount - CW'(V_FIRST) : '0;
  assign frame_start = (hcount == '0) && (vcount == '0);

  initial begin
    assert (H_TOT <= (1 << CW) && V_TOT <= (1 << CW))
      else $fatal(1, "vga_controller: CW too narrow for the timing counters");
  end

endmodule
