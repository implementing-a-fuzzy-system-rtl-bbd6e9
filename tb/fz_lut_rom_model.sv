// fz_lut_rom_model: behavioural model of the external lookup-table ROM.
//
// Not synthesizable logic of the controller: it stands in for the 64K x 8
// ROM chip on the board in simulation. The read is asynchronous (data follows
// the address with no clock), which is what the controller expects of the
// chip. The contents are computed at time zero from a formula chosen by MODE;
// the address is {A, B, C, D} coarse fields, A in the top bits.
//   MODE 0: integer test pattern
//           mem[a,b,c,d] = (29a + 53b + 17c(d+1) + abc + 7d) mod 256,
//           non-separable so that every corner matters.
//   MODE 1: the four-variable test surface
//           f = 5 sin(r) / sqrt(r^2 + 2) * sqrt(1 + 0.5 w^3 (v - 9)^2),
//           r = sqrt((x + 10)^2 + (y - 3.3)^2), with the four grid indices
//           0..15 mapped to x in [-20, 0], y in [-6.7, 13.3], w in [0, 1],
//           v in [0, 18], and f scaled linearly onto 0..255 over the table.
module fz_lut_rom_model #(
  parameter int unsigned MSB_W  = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned MODE   = 0
) (
  input  logic [4*MSB_W-1:0] addr,
  output logic [DATA_W-1:0]  data
);

  localparam int unsigned DEPTH = 1 << (4*MSB_W);
  localparam int unsigned TOP   = (1 << MSB_W) - 1;

  logic [DATA_W-1:0] mem [DEPTH];

  function automatic real surface(int ia, int ib, int ic, int id);
    real x, y, w, v, r;
    x = -20.0 + 20.0 * ia / TOP;
    y = -6.7  + 20.0 * ib / TOP;
    w = 1.0 * ic / TOP;
    v = 18.0 * id / TOP;
    r = $sqrt((x + 10.0) ** 2 + (y - 3.3) ** 2);
    return 5.0 * $sin(r) / $sqrt(r * r + 2.0) * $sqrt(1.0 + 0.5 * w ** 3 * (v - 9.0) ** 2);
  endfunction

  initial begin
    if (MODE == 0) begin
      for (int i = 0; i < int'(DEPTH); i++) begin
        int a, b, c, d;
        a = (i >> (3*MSB_W)) & TOP;
        b = (i >> (2*MSB_W)) & TOP;
        c = (i >> MSB_W) & TOP;
        d = i & TOP;
        mem[i] = DATA_W'(29*a + 53*b + 17*c*(d+1) + a*b*c + 7*d);
      end
    end else begin
      real lo, hi, f;
      lo = 1.0e9; hi = -1.0e9;
      for (int i = 0; i < int'(DEPTH); i++) begin
        f = surface((i >> (3*MSB_W)) & TOP, (i >> (2*MSB_W)) & TOP, (i >> MSB_W) & TOP, i & TOP);
        if (f < lo) lo = f;
        if (f > hi) hi = f;
      end
      for (int i = 0; i < int'(DEPTH); i++) begin
        f = surface((i >> (3*MSB_W)) & TOP, (i >> (2*MSB_W)) & TOP, (i >> MSB_W) & TOP, i & TOP);
        mem[i] = DATA_W'($rtoi((f - lo) / (hi - lo) * ((1 << DATA_W) - 1) + 0.5));
      end
    end
  end

  assign data = mem[addr];

endmodule
