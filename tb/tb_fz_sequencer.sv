// tb_fz_sequencer: self-checking test of the up-counter and phase control.
//
// Checks that one evaluation runs 16 fetch cycles with corners 0..15, then 16
// multiply cycles with corners 0..15, then one sum cycle, that done pulses 33
// cycles after the accepting edge, that start is ignored while busy, and that
// a held start gives one result every 34 cycles.
module tb_fz_sequencer;

  logic clk = 0, rst_n = 0, start = 0;
  logic capture, fetch_en, mac_en, sum_en, busy, done;
  fz_pkg::corner_t corner;

  int checks = 0, failures = 0;

  fz_sequencer dut (
    .clk(clk), .rst_n(rst_n), .start(start), .capture(capture), .corner(corner),
    .fetch_en(fetch_en), .mac_en(mac_en), .sum_en(sum_en), .busy(busy), .done(done));

  always #5 clk = ~clk;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Follows one evaluation from the cycle after the accepting edge.
  task automatic follow_one(bit poke_start);
    for (int k = 0; k < 16; k++) begin
      if (poke_start) start = 1;
      #1;
      expect_true(fetch_en && !mac_en && !sum_en && busy && !capture, "fetch phase");
      expect_true(corner == 4'(k), "fetch corner order");
      @(negedge clk);
    end
    for (int k = 0; k < 16; k++) begin
      #1;
      expect_true(mac_en && !fetch_en && !sum_en && busy && !capture, "mac phase");
      expect_true(corner == 4'(k), "mac corner order");
      @(negedge clk);
    end
    #1;
    expect_true(sum_en && !done && busy, "sum phase");
    @(negedge clk);
    #1;
    expect_true(done && !busy, "done pulse after 33 cycles");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    #1 expect_true(!busy && !done && !capture, "idle after reset");
    // Idle without start stays idle.
    repeat (3) @(negedge clk);
    #1 expect_true(!busy && !done, "stays idle");
    // One evaluation, start raised for one cycle; later pokes are ignored.
    start = 1;
    #1 expect_true(capture, "capture when idle and start");
    @(negedge clk);
    start = 0;
    follow_one(1'b1);     // start held high while busy: must be ignored
    start = 0;
    #1 expect_true(!capture, "no capture with start low");
    @(negedge clk);
    #1 expect_true(!done && !busy, "done is one cycle");
    // Continuous operation: held start re-accepts in the done cycle.
    start = 1;
    @(negedge clk);
    follow_one(1'b0);
    #1 expect_true(capture, "re-accept in done cycle");
    @(negedge clk);
    follow_one(1'b0);
    start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
