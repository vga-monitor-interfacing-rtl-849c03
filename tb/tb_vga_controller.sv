// tb_vga_controller: self-checking testbench for vga_controller at the
// 640 x 480, 60 Hz default timing.
//
// The expected behaviour is written straight from the 640x480 timing table
// (800 clocks per line: 96 sync, 48 back porch, 640 visible, 16 front porch;
// 521 lines per frame: 2 sync, 29 back porch, 480 visible, 10 front porch),
// not from the controller's parameters. For a little over one frame the
// testbench checks every cycle: both counters, video_on, x, y, frame_start
// and the two syncs. It also measures, in clock cycles, the HS period (800)
// and width (96 = 3.84 us), the VS period (416,800 = 16.7 ms) and width
// (1,600 = 64 us), and the visible pixels per frame (307,200 = 640 x 480).
module tb_vga_controller;
  logic clk = 1'b0;
  logic rst;
  logic hsync_n, vsync_n, video_on, frame_start;
  logic [9:0] x, y, hcount, vcount;

  int checks = 0, failures = 0;

  vga_controller dut (
    .clk(clk), .rst(rst), .hsync_n(hsync_n), .vsync_n(vsync_n),
    .video_on(video_on), .x(x), .y(y), .hcount(hcount), .vcount(vcount),
    .frame_start(frame_start));

  always #20 clk = ~clk;  // 25 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h, v, ph, pv;
  longint cyc;
  longint hs_fall, vs_fall, hs_len, vs_len, n_vis, n_hs, n_vs;
  bit     hs_seen, vs_seen;
  logic   hs_prev, vs_prev;
  bit     exp_vis;

  initial begin
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    check(hcount == 0 && vcount == 0 && hsync_n && vsync_n, "reset state");
    rst = 1'b0;
    h = 0; v = 0; cyc = 0;
    hs_seen = 0; vs_seen = 0; hs_prev = 1; vs_prev = 1;
    hs_len = 0; vs_len = 0; n_vis = 0; n_hs = 0; n_vs = 0;
    for (int i = 0; i < 800 * 521 + 800 * 40; i++) begin
      // decoded outputs in this cycle
      exp_vis = (h >= 144 && h < 784) && (v >= 31 && v < 511);
      check(hcount == 10'(h) && vcount == 10'(v), $sformatf("counters %0d/%0d exp %0d/%0d", hcount, vcount, h, v));
      check(video_on == exp_vis, "video_on");
      check(x == ((h >= 144 && h < 784) ? 10'(h - 144) : 10'd0), "x");
      check(y == ((v >= 31 && v < 511) ? 10'(v - 31) : 10'd0), "y");
      check(frame_start == (h == 0 && v == 0), "frame_start");
      if (exp_vis && i < 416_800) n_vis++;
      ph = h; pv = v;
      h = h + 1;
      if (h == 800) begin
        h = 0;
        v = (v == 520) ? 0 : v + 1;
      end
      @(posedge clk);
      #1;
      cyc++;
      check(hsync_n == !(ph < 96), "hsync_n");
      check(vsync_n == !(pv < 2), "vsync_n");
      // period / width measurement
      if (hs_prev && !hsync_n) begin
        if (hs_seen) check(cyc - hs_fall == 800, $sformatf("HS period %0d", cyc - hs_fall));
        hs_seen = 1; hs_fall = cyc; hs_len = 0; n_hs++;
      end
      if (!hsync_n) hs_len++;
      if (!hs_prev && hsync_n) check(hs_len == 96, $sformatf("HS width %0d", hs_len));
      if (vs_prev && !vsync_n) begin
        if (vs_seen) check(cyc - vs_fall == 416_800, $sformatf("VS period %0d", cyc - vs_fall));
        vs_seen = 1; vs_fall = cyc; vs_len = 0; n_vs++;
      end
      if (!vsync_n) vs_len++;
      if (!vs_prev && vsync_n) check(vs_len == 1_600, $sformatf("VS width %0d", vs_len));
      hs_prev = hsync_n; vs_prev = vsync_n;
    end
    check(n_vs == 2, $sformatf("VS pulses %0d", n_vs));
    check(n_hs == 521 + 40, $sformatf("HS pulses %0d", n_hs));
    check(n_vis == 307_200, $sformatf("visible pixels %0d", n_vis));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
