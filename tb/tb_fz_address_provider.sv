// tb_fz_address_provider: self-checking test of the corner address former.
//
// Drives random and edge-case coarse fields (including the all-ones field,
// where the +1 path saturates) for every corner index and compares the
// address with a reference built field by field in the testbench.
module tb_fz_address_provider;

  localparam int unsigned MSB_W = 4;

  logic [3:0][MSB_W-1:0] msb;
  fz_pkg::corner_t       corner;
  logic [4*MSB_W-1:0]    addr;

  int checks = 0, failures = 0;

  fz_address_provider #(.MSB_W(MSB_W)) dut (.msb(msb), .corner(corner), .addr(addr));

  function automatic logic [4*MSB_W-1:0] ref_addr(logic [3:0][MSB_W-1:0] m, logic [3:0] c);
    logic [4*MSB_W-1:0] a;
    for (int i = 0; i < 4; i++) begin
      int v = int'(m[i]) + int'(c[i]);
      if (v > (1 << MSB_W) - 1) v = (1 << MSB_W) - 1;
      a[i*MSB_W +: MSB_W] = MSB_W'(v);
    end
    return a;
  endfunction

  task automatic check_all_corners();
    for (int c = 0; c < 16; c++) begin
      corner = 4'(c);
      #1;
      checks++;
      if (addr !== ref_addr(msb, corner)) begin
        failures++;
        if (failures < 10)
          $display("FAIL msb=%h corner=%0d addr=%h exp=%h", msb, c, addr, ref_addr(msb, corner));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hand-worked cases.
    msb = {4'h1, 4'h2, 4'h3, 4'h4}; corner = 4'b1010; #1;
    checks++; if (addr !== 16'h2244) begin failures++; $display("FAIL hand case 1 %h", addr); end
    msb = {4'hF, 4'hE, 4'h0, 4'hF}; corner = 4'b1111; #1;
    checks++; if (addr !== 16'hFF1F) begin failures++; $display("FAIL hand case 2 %h", addr); end
    msb = {4'hF, 4'hE, 4'h0, 4'hF}; corner = 4'b0000; #1;
    checks++; if (addr !== 16'hFE0F) begin failures++; $display("FAIL hand case 3 %h", addr); end
    // Random coverage.
    for (int n = 0; n < 2000; n++) begin
      msb = $urandom;
      if (n % 7 == 0) msb[$urandom_range(0, 3)] = '1;
      check_all_corners();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
