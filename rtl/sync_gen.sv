// sync_gen: one axis (horizontal or vertical) of the VGA timing generator.
//
// A free-running modulo-TOTAL counter advances on every clock in which the
// clock enable `ce` is high. Two decoders watch the count: a zero detect
// (count == 0) sets a sync flag, and a pulse-width detect (count == PULSE)
// resets it, so the flag is high for exactly PULSE counts at the start of
// every period. The controller uses this module twice, with TOTAL = 800,
// PULSE = 96 (3.84 us at 25 MHz) for the horizontal axis and TOTAL = 521,
// PULSE = 2 (64 us, two lines) for the vertical axis, the vertical instance
// enabled once per line by the horizontal one's `wrap` output.
//
// The counter, the two detectors and the set/reset sync flag follow the
// controller block diagram of the design; the active-low sync output (the
// standard polarity for 640x480) and the synchronous reset are this
// design's choices.
//
// Interface and timing:
//   count   current count, 0 .. TOTAL-1 (registered)
//   wrap    combinational: high in the cycle where count == TOTAL-1 and ce
//           is high, i.e. the count returns to 0 at the next edge
//   sync_n  registered set/reset flag, inverted: it follows the count by
//           one clock, low for PULSE counts starting one clock after the
//           count reaches 0
//   rst     synchronous, active high: count = 0, sync_n = 1
module sync_gen #(
  parameter int unsigned TOTAL = 800,
  parameter int unsigned PULSE = 96,
  parameter int unsigned W     = $clog2(TOTAL)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  output logic [W-1:0] count,
  output logic         wrap,
  output logic         sync_n
);

  logic zero_det;   // start of the sync pulse
  logic width_det;  // end of the sync pulse
  logic sync_flag;  // set/reset sync flip-flop

  assign wrap      = ce && (count == W'(TOTAL - 1));
  assign zero_det  = (count == '0);
  assign width_det = (count == W'(PULSE));

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
    end else if (ce) begin
      count <= wrap ? '0 : count + 1'b1;
    end
  end

  // Set has priority; the two detectors can never be true together because
  // PULSE is nonzero.
  always_ff @(posedge clk) begin
    if (rst)            sync_flag <= 1'b0;
    else if (zero_det)  sync_flag <= 1'b1;
    else if (width_det) sync_flag <= 1'b0;
  end

  assign sync_n = ~sync_flag;

  initial begin
    assert (PULSE > 0 && PULSE < TOTAL)
      else $fatal(1, "sync_gen: PULSE must lie in 1 .. TOTAL-1");
  end

endmodule
