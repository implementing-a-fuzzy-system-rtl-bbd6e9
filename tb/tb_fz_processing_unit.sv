// tb_fz_processing_unit: self-checking test of the multiply-and-sum unit.
//
// Loads random table values and a consistent set of 16 corner weights (built
// from random fine fields, as the weighting block would), runs the 16
// multiply cycles in a random corner order and one sum cycle, and compares y
// with (sum of value x weight) >> 4 computed in the testbench. Also checks
// that y holds while sum_en is low.
module tb_fz_processing_unit;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned WGT_W  = 12;
  localparam int unsigned OUT_W  = 16;

  logic clk = 0, rst_n = 0, mac_en = 0, sum_en = 0;
  fz_pkg::corner_t corner = '0;
  logic [15:0][DATA_W-1:0] lut_vals = '0;
  logic [15:0][WGT_W-1:0]  weights  = '0;
  logic [OUT_W-1:0] y;

  int checks = 0, failures = 0;

  fz_processing_unit #(.DATA_W(DATA_W), .WGT_W(WGT_W), .OUT_W(OUT_W)) dut (
    .clk(clk), .rst_n(rst_n), .mac_en(mac_en), .sum_en(sum_en), .corner(corner),
    .lut_vals(lut_vals), .weights(weights), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int order [16];
      longint total;
      logic [OUT_W-1:0] exp_y;
      logic [3:0][2:0] w;
      total = 0;
      w = 12'($urandom);
      @(negedge clk);
      for (int c = 0; c < 16; c++) begin
        int p;
        p = 1;
        for (int i = 0; i < 4; i++) p *= c[i] ? int'(w[i]) : 7 - int'(w[i]);
        weights[c]  = WGT_W'(p);
        lut_vals[c] = (n == 0) ? 8'hFF : DATA_W'($urandom);
        total += longint'(p) * longint'(lut_vals[c]);
        order[c] = c;
      end
      order.shuffle();
      exp_y = OUT_W'(total >> 4);
      for (int c = 0; c < 16; c++) begin
        mac_en = 1; corner = 4'(order[c]);
        @(negedge clk);
      end
      mac_en = 0; sum_en = 1;
      @(negedge clk);
      sum_en = 0;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL run %0d y=%0d exp=%0d", n, y, exp_y);
      end
      // Output must hold while sum_en is low, even if the inputs change.
      lut_vals = '0;
      mac_en = 1; corner = 4'd3;
      @(negedge clk);
      mac_en = 0;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL y did not hold: %0d exp %0d", y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
