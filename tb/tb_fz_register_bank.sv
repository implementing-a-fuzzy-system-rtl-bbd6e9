// tb_fz_register_bank: self-checking test of the 16-entry register bank.
//
// Checks the reset clear, random writes against a model array, that a cycle
// with we low changes nothing, and that a write reaches only the indexed
// entry.
module tb_fz_register_bank;

  localparam int unsigned WIDTH = 12;
  localparam int unsigned DEPTH = 16;

  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] idx = '0;
  logic [WIDTH-1:0] d = '0;
  logic [DEPTH-1:0][WIDTH-1:0] q;
  logic [WIDTH-1:0] model [DEPTH];

  int checks = 0, failures = 0;

  fz_register_bank #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .idx(idx), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int e = 0; e < int'(DEPTH); e++) begin
      checks++;
      if (q[e] !== model[e]) begin
        failures++;
        if (failures < 10) $display("FAIL %s entry %0d q=%h exp=%h", what, e, q[e], model[e]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[e]) model[e] = '0;
    #12;
    compare("reset");
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 3) != 0);
      idx = 4'($urandom);
      d   = WIDTH'($urandom);
      @(posedge clk); #1;
      if (we) model[idx] = d;
      compare(we ? "write" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
