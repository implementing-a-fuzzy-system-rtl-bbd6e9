// fz_processing_unit: multiplies each lookup-table value by its weight and
// sums the 16 products.
//
// A single shared multiplier is used sequentially: in each cycle with mac_en
// high, the up-counter value (corner) selects one stored table value and one
// stored weight through two multiplexers, and their product is written into
// a product register bank at the same entry. When all 16 products are in,
// a tree of 15 two-input adders (8 + 4 + 2 + 1) adds them, and on the cycle
// with sum_en high the sum is registered to the output. The one-multiplier
// structure, the product register bank and the 15-adder tree follow the
// published processing unit.
//
// Output scaling (this design's choice): with inverted fine fields as 1 - w,
// the 16 weights always add up to (2^LSB_W - 1)^4, so the sum is below
// 2^PROD_W. The output is the top OUT_W bits of that PROD_W-bit sum, i.e. the
// sum shifted right by PROD_W - OUT_W (4 at the default sizes). No division
// by the weight total is done.
//
// Timing: product written on the rising edge with mac_en; y updated on the
// rising edge with sum_en. rst_n (active low, asynchronous) clears all state.
module fz_processing_unit #(
  parameter int unsigned DATA_W = fz_pkg::DATA_W_DEF,
  parameter int unsigned WGT_W  = 4 * fz_pkg::LSB_W_DEF,
  parameter int unsigned OUT_W  = fz_pkg::OUT_W_DEF
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  logic                                       mac_en,    // form product of corner
  input  logic                                       sum_en,    // register the adder-tree sum
  input  fz_pkg::corner_t                            corner,
  input  logic [fz_pkg::N_CORNERS-1:0][DATA_W-1:0]   lut_vals,  // from the LUT register bank
  input  logic [fz_pkg::N_CORNERS-1:0][WGT_W-1:0]    weights,   // from the weighting block
  output logic [OUT_W-1:0]                           y
);

  localparam int unsigned PROD_W = DATA_W + WGT_W;
  localparam int unsigned SUM_W  = PROD_W + fz_pkg::N_IN;   // growth of 16 terms
  localparam int unsigned NC     = fz_pkg::N_CORNERS;

  if (OUT_W > PROD_W) begin : g_bad_width
    $error("fz_processing_unit: OUT_W must not exceed DATA_W + WGT_W");
  end

  // Shared multiplier behind two multiplexers.
  logic [DATA_W-1:0] lut_sel;
  logic [WGT_W-1:0]  wgt_sel;
  logic [PROD_W-1:0] product;

  always_comb begin
    lut_sel = lut_vals[corner];
    wgt_sel = weights[corner];
    product = PROD_W'(lut_sel) * PROD_W'(wgt_sel);
  end

  logic [NC-1:0][PROD_W-1:0] prods;

  fz_register_bank #(.WIDTH(PROD_W), .DEPTH(NC)) u_prod_bank (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (mac_en),
    .idx   (corner),
    .d     (product),
    .q     (prods)
  );

  // Adder tree: level 0 holds the 16 products, level l has 16 >> l sums.
  logic [SUM_W-1:0] lvl [fz_pkg::N_IN+1][NC];

  always_comb begin
    for (int j = 0; j < int'(NC); j++) lvl[0][j] = SUM_W'(prods[j]);
    for (int l = 1; l <= int'(fz_pkg::N_IN); l++) begin
      for (int j = 0; j < int'(NC); j++) begin
        if (j < (int'(NC) >> l)) lvl[l][j] = lvl[l-1][2*j] + lvl[l-1][2*j+1];
        else                     lvl[l][j] = '0;
      end
    end
  end

  logic [SUM_W-1:0] total;
  assign total = lvl[fz_pkg::N_IN][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y <= '0;
    else if (sum_en) y <= total[PROD_W-1 -: OUT_W];
  end

  // The weights never add up to 2^WGT_W, so the sum stays below 2^PROD_W.
  a_sum_range: assert property (@(posedge clk)
    sum_en |-> (total >> PROD_W) == '0);

endmodule
