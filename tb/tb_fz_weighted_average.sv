// tb_fz_weighted_average: self-checking test of the weighting block.
//
// For random fine fields it writes the weights of all 16 corners and checks
// each against f_A*f_B*f_C*f_D computed in the testbench (f = w when the
// corner bit is 1, 7 - w when it is 0), and that the 16 weights add up to
// 7^4 = 2401.
module tb_fz_weighted_average;

  localparam int unsigned LSB_W = 3;

  logic clk = 0, rst_n = 0, we = 0;
  fz_pkg::corner_t corner = '0;
  logic [3:0][LSB_W-1:0] lsb = '0;
  logic [15:0][4*LSB_W-1:0] weights;

  int checks = 0, failures = 0;

  fz_weighted_average #(.LSB_W(LSB_W)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .corner(corner), .lsb(lsb), .weights(weights));

  always #5 clk = ~clk;

  function automatic int ref_weight(logic [3:0][LSB_W-1:0] w, int c);
    int p = 1;
    for (int i = 0; i < 4; i++)
      p *= c[i] ? int'(w[i]) : (7 - int'(w[i]));
    return p;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int total;
      total = 0;
      @(negedge clk);
      lsb = $urandom;
      if (n == 0) lsb = '0;
      if (n == 1) lsb = '1;
      for (int c = 0; c < 16; c++) begin
        we = 1; corner = 4'(c);
        @(negedge clk);
      end
      we = 0;
      for (int c = 0; c < 16; c++) begin
        checks++;
        total += int'(weights[c]);
        if (int'(weights[c]) != ref_weight(lsb, c)) begin
          failures++;
          if (failures < 10)
            $display("FAIL lsb=%h corner=%0d w=%0d exp=%0d", lsb, c, weights[c], ref_weight(lsb, c));
        end
      end
      checks++;
      if (total != 2401) begin
        failures++;
        $display("FAIL weight total %0d for lsb=%h", total, lsb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
