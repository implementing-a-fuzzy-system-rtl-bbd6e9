// fz_weighted_average: the fine-control-surface (weighting) block.
//
// For corner k of the 16 lookup-table corners around the input point, the
// fine field (least significant bits) w of each input is either passed
// through (corner bit 1, the "+1" table neighbour) or bitwise inverted
// (corner bit 0, the table point itself). Inversion stands for 1 - w, so with
// 3-bit fields the two factors of one input add up to 7. The four factors are
// multiplied pairwise by two LSB_W-bit multipliers (A*B and C*D) and the two
// products by one 2*LSB_W-bit multiplier, giving the corner weight
//     w_k = f_A * f_B * f_C * f_D,   f_i = corner[i] ? w_i : ~w_i.
// The weight is written into a register bank at entry k. The pass/invert
// pattern and the 3-bit / 6-bit multiplier tree are the published structure.
//
// Interface: lsb[3] is input A's fine field ... lsb[0] is D's. Timing: the
// weight of the present corner is formed combinationally and written on the
// rising edge of clk when we is high; weights[k] holds it from then on.
module fz_weighted_average #(
  parameter int unsigned LSB_W = fz_pkg::LSB_W_DEF
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic                                         we,       // store weight of corner
  input  fz_pkg::corner_t                              corner,   // corner index
  input  logic [fz_pkg::N_IN-1:0][LSB_W-1:0]           lsb,      // fine fields, [3]=A
  output logic [fz_pkg::N_CORNERS-1:0][4*LSB_W-1:0]    weights   // stored corner weights
);

  localparam int unsigned WGT_W = 4 * LSB_W;

  logic [fz_pkg::N_IN-1:0][LSB_W-1:0] factor;
  logic [2*LSB_W-1:0]                 prod_ab, prod_cd;
  logic [WGT_W-1:0]                   weight;

  always_comb begin
    for (int i = 0; i < int'(fz_pkg::N_IN); i++)
      factor[i] = corner[i] ? lsb[i] : ~lsb[i];
    prod_ab = (2*LSB_W)'(factor[3]) * (2*LSB_W)'(factor[2]);   // 3-bit multiplier
    prod_cd = (2*LSB_W)'(factor[1]) * (2*LSB_W)'(factor[0]);   // 3-bit multiplier
    weight  = WGT_W'(prod_ab) * WGT_W'(prod_cd);               // 6-bit multiplier
  end

  fz_register_bank #(.WIDTH(WGT_W), .DEPTH(fz_pkg::N_CORNERS)) u_bank (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (we),
    .idx   (corner),
    .d     (weight),
    .q     (weights)
  );

endmodule
