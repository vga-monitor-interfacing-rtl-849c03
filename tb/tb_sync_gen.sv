// tb_sync_gen: self-checking testbench for sync_gen.
//
// Two instances run side by side: the horizontal configuration (TOTAL = 800,
// PULSE = 96) with the clock enable always high, and a short vertical-like
// configuration (TOTAL = 13, PULSE = 2) whose enable is driven randomly.
// Every cycle the counts are compared against a reference counter kept in
// the testbench, wrap against "enabled and at TOTAL-1", and sync_n against
// "the count one clock earlier was below PULSE". The horizontal pulse width
// (96 clocks) and period (800 clocks) are also measured directly.
module tb_sync_gen;
  localparam int unsigned TA = 800, PA = 96;
  localparam int unsigned TB = 13,  PB = 2;

  logic clk = 1'b0;
  logic rst;
  logic ce_b;
  logic [9:0] cnt_a;
  logic [3:0] cnt_b;
  logic wrap_a, wrap_b, sync_a_n, sync_b_n;

  int checks = 0, failures = 0;

  sync_gen #(.TOTAL(TA), .PULSE(PA), .W(10)) dut_a (
    .clk(clk), .rst(rst), .ce(1'b1), .count(cnt_a), .wrap(wrap_a), .sync_n(sync_a_n));
  sync_gen #(.TOTAL(TB), .PULSE(PB), .W(4)) dut_b (
    .clk(clk), .rst(rst), .ce(ce_b), .count(cnt_b), .wrap(wrap_b), .sync_n(sync_b_n));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  int unsigned ref_a, ref_b, prev_a, prev_b;
  int unsigned low_len, last_fall, n_pulses;
  bit          have_fall;
  logic        prev_sync_a;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst  = 1'b1;
    ce_b = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(cnt_a == 0 && cnt_b == 0 && sync_a_n && sync_b_n, "reset values");
    rst = 1'b0;
    ref_a = 0; ref_b = 0; prev_a = 0; prev_b = 0;
    low_len = 0; n_pulses = 0; have_fall = 0; prev_sync_a = 1'b1;
    ce_b = 1'($urandom_range(0, 1));
    #1;
    for (int cyc = 0; cyc < 4 * TA + 17; cyc++) begin
      // combinational outputs before the edge
      check(wrap_a == (ref_a == TA - 1), "wrap_a");
      check(wrap_b == (ce_b && ref_b == TB - 1), "wrap_b");
      prev_a = ref_a;
      prev_b = ref_b;
      // reference counters
      ref_a = (ref_a == TA - 1) ? 0 : ref_a + 1;
      if (ce_b) ref_b = (ref_b == TB - 1) ? 0 : ref_b + 1;
      @(posedge clk);
      #1;
      check(cnt_a == ref_a, $sformatf("cnt_a %0d exp %0d", cnt_a, ref_a));
      check(cnt_b == ref_b, $sformatf("cnt_b %0d exp %0d", cnt_b, ref_b));
      check(sync_a_n == !(prev_a < PA), $sformatf("sync_a_n after count %0d", prev_a));
      check(sync_b_n == !(prev_b < PB), $sformatf("sync_b_n after count %0d", prev_b));
      // measure horizontal pulse width and period
      if (prev_sync_a && !sync_a_n) begin
        if (have_fall) check(cyc + 1 - last_fall == TA, $sformatf("period %0d", cyc + 1 - last_fall));
        last_fall = cyc + 1; have_fall = 1; low_len = 0;
      end
      if (!sync_a_n) low_len++;
      if (!prev_sync_a && sync_a_n) begin
        check(low_len == PA, $sformatf("pulse width %0d", low_len));
        n_pulses++;
      end
      prev_sync_a = sync_a_n;
      ce_b = 1'($urandom_range(0, 1));
      #1;
    end
    check(n_pulses >= 3, "horizontal pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
