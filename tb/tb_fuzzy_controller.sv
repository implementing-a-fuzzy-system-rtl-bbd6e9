// tb_fuzzy_controller: end-to-end test of the whole controller at its
// default sizes (four 7-bit inputs, 64K x 8 table, 16-bit output).
//
// The controller reads a behavioural ROM model filled with a non-separable
// integer pattern. Every result is compared with a reference computed in the
// testbench from the ROM contents:
//     y = (sum over 16 corners of table[corner] * prod_i f_i) >> 4,
//     f_i = w_i if the corner uses coarse_i + 1 (saturated at 15), else 7 - w_i.
// The test also checks the 33-cycle latency, the 16 table reads per
// evaluation, and makes each mechanism of the design happen, counting it:
// exact grid points, interpolation between points, the saturated "+1" at the
// top of an input's range, equality across a cell boundary (fine field 7 in
// one cell against fine field 0 in the next), start ignored while busy, and
// back-to-back evaluations with start held high.
module tb_fuzzy_controller;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [6:0]  in_a = '0, in_b = '0, in_c = '0, in_d = '0;
  logic [15:0] lut_addr, y;
  logic [7:0]  lut_data;
  logic        busy, done;

  int checks = 0, failures = 0;
  int n_grid = 0, n_interp = 0, n_sat = 0, n_boundary = 0, n_ignored = 0, n_b2b = 0;
  int cycle = 0, fetches = 0;

  fuzzy_controller dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .in_a(in_a), .in_b(in_b), .in_c(in_c), .in_d(in_d),
    .lut_addr(lut_addr), .lut_data(lut_data),
    .y(y), .busy(busy), .done(done));

  fz_lut_rom_model #(.MODE(0)) rom (.addr(lut_addr), .data(lut_data));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (dut.fetch_en) fetches <= fetches + 1;

  function automatic int ref_y(logic [6:0] a, logic [6:0] b, logic [6:0] c, logic [6:0] d);
    logic [3:0][6:0] v;
    longint total;
    v = {a, b, c, d};
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

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One evaluation with a one-cycle start pulse; returns the output.
  task automatic evaluate(logic [6:0] a, b, c, d, output int result, input bit poke = 0);
    int t0, f0;
    @(negedge clk);
    in_a = a; in_b = b; in_c = c; in_d = d;
    start = 1;
    @(negedge clk);               // start was accepted on the edge just passed
    t0 = cycle; f0 = fetches;
    start = 0;
    if (poke) begin
      // Change the inputs and pulse start while busy: must have no effect.
      repeat (5) @(negedge clk);
      in_a = ~a; in_b = ~b; in_c = ~c; in_d = ~d;
      start = 1;
      @(negedge clk);
      start = 0;
    end
    while (!done) @(negedge clk);
    expect_eq(cycle - t0, 33, "latency start to done");
    expect_eq(fetches - f0, 16, "table reads per evaluation");
    result = int'(y);
    expect_eq(result, ref_y(a, b, c, d), $sformatf("y for %h %h %h %h", a, b, c, d));
    if (poke) n_ignored++;
    if ({a[2:0], b[2:0], c[2:0], d[2:0]} == '0) n_grid++;
    else n_interp++;
    if ((a[6:3] == 15 && a[2:0] != 0) || (b[6:3] == 15 && b[2:0] != 0) ||
        (c[6:3] == 15 && c[2:0] != 0) || (d[6:3] == 15 && d[2:0] != 0)) n_sat++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, r2;
    #12 rst_n = 1;

    // Exact grid points: output is the table value times 7^4, over 16.
    for (int n = 0; n < 40; n++) begin
      logic [3:0] m [4];
      foreach (m[i]) m[i] = 4'($urandom);
      evaluate({m[0], 3'd0}, {m[1], 3'd0}, {m[2], 3'd0}, {m[3], 3'd0}, r);
      expect_eq(r, int'(rom.mem[{m[0], m[1], m[2], m[3]}]) * 2401 / 16, "grid point value");
    end

    // Random points inside cells, some at the top of the range.
    for (int n = 0; n < 300; n++) begin
      logic [6:0] v [4];
      foreach (v[i]) v[i] = 7'($urandom);
      if (n % 5 == 0) v[$urandom_range(0, 3)][6:3] = 4'hF;
      evaluate(v[0], v[1], v[2], v[3], r);
    end

    // Cell boundaries: fine field 7 in cell m meets fine field 0 in cell m+1.
    for (int n = 0; n < 30; n++) begin
      logic [3:0] m;
      logic [6:0] b, c, d;
      m = 4'($urandom_range(0, 14));
      b = 7'($urandom); c = 7'($urandom); d = 7'($urandom);
      case (n % 4)
        0: begin evaluate({m, 3'd7}, b, c, d, r); evaluate({m + 4'd1, 3'd0}, b, c, d, r2); end
        1: begin evaluate(b, {m, 3'd7}, c, d, r); evaluate(b, {m + 4'd1, 3'd0}, c, d, r2); end
        2: begin evaluate(b, c, {m, 3'd7}, d, r); evaluate(b, c, {m + 4'd1, 3'd0}, d, r2); end
        default: begin evaluate(b, c, d, {m, 3'd7}, r); evaluate(b, c, d, {m + 4'd1, 3'd0}, r2); end
      endcase
      expect_eq(r, r2, "continuity across a cell boundary");
      n_boundary++;
    end

    // Start while busy is ignored.
    for (int n = 0; n < 10; n++)
      evaluate(7'($urandom), 7'($urandom), 7'($urandom), 7'($urandom), r, 1'b1);

    // Back-to-back: start held high, new inputs presented for each result.
    begin
      logic [6:0] v [4];
      int t_prev;
      @(negedge clk);
      foreach (v[i]) v[i] = 7'($urandom);
      in_a = v[0]; in_b = v[1]; in_c = v[2]; in_d = v[3];
      start = 1;
      t_prev = -1;
      for (int n = 0; n < 50; n++) begin
        logic [6:0] cur [4];
        cur = v;
        while (!done) @(negedge clk);
        // Next inputs are captured on the edge that ends this done cycle.
        foreach (v[i]) v[i] = 7'($urandom);
        in_a = v[0]; in_b = v[1]; in_c = v[2]; in_d = v[3];
        expect_eq(int'(y), ref_y(cur[0], cur[1], cur[2], cur[3]), "back-to-back result");
        if (t_prev >= 0) expect_eq(cycle - t_prev, 34, "result period with start held");
        t_prev = cycle;
        n_b2b++;
        @(negedge clk);
      end
      start = 0;
      while (busy) @(negedge clk);
    end

    $display("mechanisms: grid=%0d interpolated=%0d saturated_top=%0d boundary=%0d ignored_start=%0d back_to_back=%0d",
             n_grid, n_interp, n_sat, n_boundary, n_ignored, n_b2b);
    if (n_grid == 0 || n_interp == 0 || n_sat == 0 || n_boundary == 0 || n_ignored == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
