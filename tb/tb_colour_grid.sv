// tb_colour_grid: self-checking testbench for colour_grid.
//
// Sweeps the whole visible frame (x = 0..639, y = 0..479) with video_on
// high, then random blanked positions, and checks the registered 12-bit
// output one clock later. Expected image: for x < 80 the colour is entry
// y / 60 of the eight-colour table, otherwise entry x / 80, each table bit
// driving its 4-bit channel fully on or off; blanked positions are black.
// Counts the pixels of every 80 x 60 cell of the left column (4,800 each)
// and of every bar to its right.
module tb_colour_grid;
  import vga_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic video_on;
  logic [9:0] x, y;
  rgb12_t rgb;

  int checks = 0, failures = 0;

  localparam bit [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                      3'b100, 3'b101, 3'b110, 3'b111};

  colour_grid dut (.clk(clk), .rst(rst), .video_on(video_on), .x(x), .y(y), .rgb(rgb));

  always #20 clk = ~clk;

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

  function automatic logic [11:0] expect_px(int xx, int yy, bit on);
    bit [2:0] c;
    if (!on) return 12'h000;
    c = (xx < 80) ? TABLE[yy / 60] : TABLE[xx / 80];
    return {{4{c[2]}}, {4{c[1]}}, {4{c[0]}}};
  endfunction

  int left_cells [8];
  int bars [8];
  logic [11:0] exp_q;
  int bad_before;

  initial begin
    rst = 1'b1; video_on = 1'b0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    #1;
    check(rgb == 12'h000, "reset output black");
    rst = 1'b0;
    foreach (left_cells[i]) begin left_cells[i] = 0; bars[i] = 0; end
    for (int yy = 0; yy < 480; yy++) begin
      for (int xx = 0; xx < 640; xx++) begin
        x = 10'(xx); y = 10'(yy); video_on = 1'b1;
        exp_q = expect_px(xx, yy, 1'b1);
        @(posedge clk); #1;
        bad_before = failures;
        check(rgb == exp_q, $sformatf("x=%0d y=%0d rgb=%03h exp %03h", xx, yy, rgb, exp_q));
        if (failures == bad_before) begin
          if (xx < 80) left_cells[yy / 60]++;
          else         bars[xx / 80]++;
        end
      end
    end
    for (int i = 0; i < 500; i++) begin
      x = 10'($urandom_range(0, 799)); y = 10'($urandom_range(0, 520)); video_on = 1'b0;
      @(posedge clk); #1;
      check(rgb == 12'h000, "blanked output black");
    end
    foreach (left_cells[i]) check(left_cells[i] == 80 * 60, $sformatf("left cell %0d seen %0d", i, left_cells[i]));
    for (int i = 1; i < 8; i++) check(bars[i] == 80 * 480, $sformatf("bar %0d seen %0d", i, bars[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
