// tb_vga_top: end-to-end testbench of vga_top at its default (full) size.
//
// Both VGA ports are watched by a vga_monitor_model, which decodes the syncs
// like a monitor and hands back every visible pixel with its coordinates.
// Two complete 640 x 480 frames are received from each port and every pixel
// is compared with the expected picture, computed here from the eight-colour
// table: Part 1 shows bar x / 80; Part 2 shows block y / 60 in the leftmost
// 80 columns and bar x / 80 elsewhere. The monitors also check the sync
// timing (800-clock lines with 96-clock HS, 521-line frames with 2-line VS)
// and that the picture is black during blanking.
//
// Mechanisms that must each occur at least once, counted and reported:
// horizontal sync pulses, vertical sync pulses, blanking cycles, complete
// frames, each of the eight bars on Part 1, and each of the eight left-column
// blocks and seven remaining bars on Part 2. Frame rate: with a 25 MHz clock
// the measured frame period of 416,800 clocks is 16.67 ms (60 Hz).
module tb_vga_top;
  logic clk = 1'b0;
  logic rst;

  logic       p1_hs_n, p1_vs_n, p2_hs_n, p2_vs_n;
  logic [3:0] p1_r, p1_g, p1_b, p2_r, p2_g, p2_b;

  int checks = 0, failures = 0;

  localparam bit [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                      3'b100, 3'b101, 3'b110, 3'b111};

  vga_top dut (
    .clk(clk), .rst(rst),
    .p1_hsync_n(p1_hs_n), .p1_vsync_n(p1_vs_n),
    .p1_red(p1_r), .p1_green(p1_g), .p1_blue(p1_b),
    .p2_hsync_n(p2_hs_n), .p2_vsync_n(p2_vs_n),
    .p2_red(p2_r), .p2_green(p2_g), .p2_blue(p2_b));

  always #20 clk = ~clk;  // 25 MHz pixel clock

  logic        m1_valid, m2_valid;
  int          m1_x, m1_y, m2_x, m2_y;
  logic [11:0] m1_pix, m2_pix;
  int          m1_hs, m1_vs, m1_frames, m1_blank, m1_terr, m1_berr;
  int          m2_hs, m2_vs, m2_frames, m2_blank, m2_terr, m2_berr;

  vga_monitor_model mon1 (
    .clk(clk), .active(!rst), .hsync_n(p1_hs_n), .vsync_n(p1_vs_n), .rgb({p1_r, p1_g, p1_b}),
    .pix_valid(m1_valid), .px(m1_x), .py(m1_y), .pix(m1_pix),
    .hs_pulses(m1_hs), .vs_pulses(m1_vs), .frames_done(m1_frames),
    .blank_cycles(m1_blank), .timing_errors(m1_terr), .blank_errors(m1_berr));

  vga_monitor_model mon2 (
    .clk(clk), .active(!rst), .hsync_n(p2_hs_n), .vsync_n(p2_vs_n), .rgb({p2_r, p2_g, p2_b}),
    .pix_valid(m2_valid), .px(m2_x), .py(m2_y), .pix(m2_pix),
    .hs_pulses(m2_hs), .vs_pulses(m2_vs), .frames_done(m2_frames),
    .blank_cycles(m2_blank), .timing_errors(m2_terr), .blank_errors(m2_berr));

  function automatic logic [11:0] to_rgb(bit [2:0] c);
    return {{4{c[2]}}, {4{c[1]}}, {4{c[0]}}};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  int p1_bar_px [8];
  int p2_cell_px [8];
  int p2_bar_px [8];
  int p1_pixels = 0, p2_pixels = 0;

  // Pixel comparison, on every pixel the monitors deliver.
  always @(posedge clk) begin
    if (m1_valid) begin
      logic [11:0] e;
      e = to_rgb(TABLE[m1_x / 80]);
      check(m1_pix == e, $sformatf("part1 (%0d,%0d) %03h exp %03h", m1_x, m1_y, m1_pix, e));
      if (m1_pix == e) p1_bar_px[m1_x / 80]++;
      p1_pixels++;
    end
    if (m2_valid) begin
      logic [11:0] e;
      e = (m2_x < 80) ? to_rgb(TABLE[m2_y / 60]) : to_rgb(TABLE[m2_x / 80]);
      check(m2_pix == e, $sformatf("part2 (%0d,%0d) %03h exp %03h", m2_x, m2_y, m2_pix, e));
      if (m2_pix == e) begin
        if (m2_x < 80) p2_cell_px[m2_y / 60]++;
        else           p2_bar_px[m2_x / 80]++;
      end
      p2_pixels++;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (p1_bar_px[i]) begin p1_bar_px[i] = 0; p2_cell_px[i] = 0; p2_bar_px[i] = 0; end
    rst = 1'b1;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    // Wait for two complete frames after the monitors lock, then one line.
    wait (m1_frames == 2 && m2_frames == 2);
    repeat (800) @(posedge clk);
    #1;
    check(m1_terr == 0 && m2_terr == 0, $sformatf("sync timing errors %0d/%0d", m1_terr, m2_terr));
    check(m1_berr == 0 && m2_berr == 0, $sformatf("colour during blanking %0d/%0d", m1_berr, m2_berr));
    check(p1_pixels == 2 * 307_200, $sformatf("part1 pixels %0d", p1_pixels));
    check(p2_pixels == 2 * 307_200, $sformatf("part2 pixels %0d", p2_pixels));
    // mechanisms
    $display("HS pulses %0d/%0d, VS pulses %0d/%0d, frames %0d/%0d, blank cycles %0d/%0d",
             m1_hs, m2_hs, m1_vs, m2_vs, m1_frames, m2_frames, m1_blank, m2_blank);
    check(m1_hs > 0 && m2_hs > 0, "HS pulses occurred");
    check(m1_vs > 0 && m2_vs > 0, "VS pulses occurred");
    check(m1_blank > 0 && m2_blank > 0, "blanking occurred");
    check(m1_frames > 0 && m2_frames > 0, "complete frames occurred");
    foreach (p1_bar_px[i])
      check(p1_bar_px[i] == 2 * 80 * 480, $sformatf("part1 bar %0d pixels %0d", i, p1_bar_px[i]));
    foreach (p2_cell_px[i])
      check(p2_cell_px[i] == 2 * 80 * 60, $sformatf("part2 left block %0d pixels %0d", i, p2_cell_px[i]));
    for (int i = 1; i < 8; i++)
      check(p2_bar_px[i] == 2 * 80 * 480, $sformatf("part2 bar %0d pixels %0d", i, p2_bar_px[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
