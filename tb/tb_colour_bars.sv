// tb_colour_bars: self-checking testbench for colour_bars.
//
// Drives every visible column x = 0..639 on a set of rows with video_on
// high, plus random positions with video_on low, and checks the registered
// 12-bit output one clock later. The expected colour of bar k = x / 80 is
// the k-th entry of the eight-colour table (black, blue, green, cyan, red,
// magenta, yellow, white), written out here as separate R, G, B bits; each
// bit drives its 4-bit channel fully on or off. Blanked positions must be
// black. Also counts the pixels seen of each colour (80 per bar per row).
module tb_colour_bars;
  import vga_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic video_on;
  logic [9:0] x;
  rgb12_t rgb;

  int checks = 0, failures = 0;

  // Table of the eight colours, index = bar number: {R, G, B}
  localparam bit [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                      3'b100, 3'b101, 3'b110, 3'b111};

  colour_bars dut (.clk(clk), .rst(rst), .video_on(video_on), .x(x), .rgb(rgb));

  always #20 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] expect_px(int xx, bit on);
    bit [2:0] c;
    if (!on) return 12'h000;
    c = TABLE[xx / 80];
    return {{4{c[2]}}, {4{c[1]}}, {4{c[0]}}};
  endfunction

  int per_colour [8];
  logic [11:0] exp_q;

  initial begin
    rst = 1'b1; video_on = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1;
    check(rgb == 12'h000, "reset output black");
    rst = 1'b0;
    foreach (per_colour[i]) per_colour[i] = 0;
    for (int row = 0; row < 4; row++) begin
      for (int xx = 0; xx < 640; xx++) begin
        x = 10'(xx); video_on = 1'b1;
        exp_q = expect_px(xx, 1'b1);
        @(posedge clk); #1;
        check(rgb == exp_q, $sformatf("x=%0d rgb=%03h exp %03h", xx, rgb, exp_q));
        if (rgb == exp_q) per_colour[xx / 80]++;
      end
    end
    for (int i = 0; i < 500; i++) begin
      x = 10'($urandom_range(0, 799)); video_on = 1'b0;
      @(posedge clk); #1;
      check(rgb == 12'h000, "blanked output black");
    end
    foreach (per_colour[i]) check(per_colour[i] == 4 * 80, $sformatf("colour %0d seen %0d", i, per_colour[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
