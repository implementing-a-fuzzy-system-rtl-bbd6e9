// tb_fz_surface_workload: renders the four-variable test surface through the
// controller and compares it with a plain table lookup.
//
// The ROM model holds the surface
//     f = 5 sin(r) / sqrt(r^2 + 2) * sqrt(1 + 0.5 w^3 (v - 9)^2),
//     r = sqrt((x + 10)^2 + (y - 3.3)^2),
// sampled on the 16^4 grid of the coarse fields and scaled to 8 bits. The
// test sweeps inputs A and B over all 128 x 128 values for several fixed
// values of C and D. Each output is checked against the weighted-average
// reference computed from the ROM contents. It also measures the largest
// step between neighbouring outputs along A and compares it with the step of
// a plain lookup that uses only the coarse fields (table value x 7^4 / 16,
// the same scale): the interpolated surface must have the smaller steps, and
// no step may exceed the table's largest step along A times 7^3 / 16.
module tb_fz_surface_workload;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [6:0]  in_a = '0, in_b = '0, in_c = '0, in_d = '0;
  logic [15:0] lut_addr, y;
  logic [7:0]  lut_data;
  logic        busy, done;

  int checks = 0, failures = 0;

  fuzzy_controller dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .in_a(in_a), .in_b(in_b), .in_c(in_c), .in_d(in_d),
    .lut_addr(lut_addr), .lut_data(lut_data),
    .y(y), .busy(busy), .done(done));

  fz_lut_rom_model #(.MODE(1)) rom (.addr(lut_addr), .data(lut_data));

  always #5 clk = ~clk;

  function automatic int ref_y(logic [3:0][6:0] v);
    longint total;
    total = 0;
    for (int k = 0; k < 16; k++) begin
      int addr, wgt;
      addr = 0; wgt = 1;
      for (int i = 3; i >= 0; i--) begin
        int m, l;
        m = int'(v[i][6:3]);
        l = int'(v[i][2:0]);
        if (k[i]) begin
          m = (m == 15) ? 15 : m + 1;
          wgt *= l;
        end else begin
          wgt *= 7 - l;
        end
        addr = addr * 16 + m;
      end
      total += longint'(rom.mem[addr]) * wgt;
    end
    return int'(total >> 4);
  endfunction

  function automatic int plain_lookup(logic [3:0][6:0] v);
    return int'(rom.mem[{v[3][6:3], v[2][6:3], v[1][6:3], v[0][6:3]}]) * 2401 / 16;
  endfunction

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cd [4][2] = '{'{0, 64}, '{100, 64}, '{127, 0}, '{127, 127}};
    int max_step, max_plain_step, max_table_step, bound;
    #12 rst_n = 1;
    max_step = 0; max_plain_step = 0; max_table_step = 0;
    // Largest table difference between neighbours along A.
    for (int i = 0; i < 65536 - 4096; i++)
      if (iabs(int'(rom.mem[i + 4096]) - int'(rom.mem[i])) > max_table_step)
        max_table_step = iabs(int'(rom.mem[i + 4096]) - int'(rom.mem[i]));
    for (int s = 0; s < 4; s++) begin
      for (int b = 0; b < 128; b++) begin
        int prev, prev_plain;
        for (int a = 0; a < 128; a++) begin
          logic [3:0][6:0] v;
          v = {7'(a), 7'(b), 7'(cd[s][0]), 7'(cd[s][1])};
          @(negedge clk);
          in_a = v[3]; in_b = v[2]; in_c = v[1]; in_d = v[0];
          start = 1;
          @(negedge clk);
          start = 0;
          while (!done) @(negedge clk);
          checks++;
          if (int'(y) != ref_y(v)) begin
            failures++;
            if (failures < 10) $display("FAIL at %h: y=%0d exp=%0d", v, y, ref_y(v));
          end
          if (a > 0) begin
            if (iabs(int'(y) - prev) > max_step) max_step = iabs(int'(y) - prev);
            if (iabs(plain_lookup(v) - prev_plain) > max_plain_step)
              max_plain_step = iabs(plain_lookup(v) - prev_plain);
          end
          prev = int'(y);
          prev_plain = plain_lookup(v);
        end
      end
    end
    bound = (max_table_step * 343 + 15) / 16 + 1;
    $display("largest step along A: interpolated %0d, plain lookup %0d, bound %0d",
             max_step, max_plain_step, bound);
    checks++;
    if (!(max_step < max_plain_step)) begin
      failures++;
      $display("FAIL interpolated surface is not smoother than the plain lookup");
    end
    checks++;
    if (max_step > bound) begin
      failures++;
      $display("FAIL interpolated step exceeds the bound");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
