// vga_monitor_model: behavioural model of a VGA monitor's input stage, for
// testbenches only.
//
// Like a real monitor it knows only the 640x480 video mode, not the source:
// it locks to the falling edges of the active-low syncs, counts clocks from
// each HS fall and lines from each VS fall, and treats clocks 144..783 of
// lines 31..510 (after 96 + 48 clocks and 2 + 29 lines of sync and back
// porch) as the visible picture. For each visible clock it emits the pixel
// with its coordinates (pix_valid, px, py, pix). It also checks what a
// monitor relies on: HS period 800 / width 96 clocks, VS period 416,800 /
// width 1,600 clocks, VS falling together with HS, and black colour outside
// the visible window, and counts pulses, frames and any errors. While
// `active` is low (source in reset) it ignores its inputs.
module vga_monitor_model (
  input  logic        clk,
  input  logic        active,   // low while the source is held in reset
  input  logic        hsync_n,
  input  logic        vsync_n,
  input  logic [11:0] rgb,
  output logic        pix_valid,
  output int          px,
  output int          py,
  output logic [11:0] pix,
  output int          hs_pulses,
  output int          vs_pulses,
  output int          frames_done,
  output int          blank_cycles,
  output int          timing_errors,
  output int          blank_errors
);
  logic hs_prev = 1'b1, vs_prev = 1'b1;
  bit   h_locked = 0, v_locked = 0;
  int   h = 0, line = 0;
  longint cyc = 0, hs_fall_at = 0, vs_fall_at = 0;
  int   hs_low = 0, vs_low = 0;

  initial begin
    pix_valid = 0; px = 0; py = 0; pix = '0;
    hs_pulses = 0; vs_pulses = 0; frames_done = 0; blank_cycles = 0;
    timing_errors = 0; blank_errors = 0;
  end

  always @(posedge clk) begin
    bit hs_fall, vs_fall, visible;
    if (!active) begin
      hs_prev = 1'b1; vs_prev = 1'b1; pix_valid <= 1'b0;
    end else begin
      cyc++;
      hs_fall = hs_prev && !hsync_n;
      vs_fall = vs_prev && !vsync_n;
      if (hs_fall) begin
        if (h_locked && cyc - hs_fall_at != 800) begin
          timing_errors++;
          $display("monitor: HS period %0d", cyc - hs_fall_at);
        end
        hs_fall_at = cyc; h_locked = 1; h = 0; hs_pulses++;
        if (v_locked && !vs_fall) line++;
      end else begin
        h++;
      end
      if (vs_fall) begin
        if (!hs_fall) begin timing_errors++; $display("monitor: VS fall without HS fall"); end
        if (v_locked) begin
          frames_done++;
          if (cyc - vs_fall_at != 416_800) begin
            timing_errors++;
            $display("monitor: VS period %0d", cyc - vs_fall_at);
          end
        end
        vs_fall_at = cyc; v_locked = 1; line = 0; vs_pulses++;
      end
      // pulse widths
      if (!hsync_n) hs_low++;
      if (!hs_prev && hsync_n) begin
        if (hs_low != 96) begin timing_errors++; $display("monitor: HS width %0d", hs_low); end
        hs_low = 0;
      end
      if (!vsync_n) vs_low++;
      if (!vs_prev && vsync_n) begin
        if (vs_low != 1_600) begin timing_errors++; $display("monitor: VS width %0d", vs_low); end
        vs_low = 0;
      end
      hs_prev = hsync_n; vs_prev = vsync_n;
      // picture
      visible = h_locked && v_locked && h >= 144 && h < 784 && line >= 31 && line < 511;
      pix_valid <= visible;
      px  <= h - 144;
      py  <= line - 31;
      pix <= rgb;
      if (h_locked && v_locked && !visible) begin
        blank_cycles++;
        if (rgb != 12'h000) blank_errors++;
      end
    end
  end
endmodule
