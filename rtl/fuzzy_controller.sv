// fuzzy_controller: four-input fuzzy controller that interpolates a coarse
// lookup table by weighted averaging.
//
// Each 7-bit input is split into a 4-bit coarse field and a 3-bit fine field.
// The four coarse fields address an external 64K x 8 lookup-table ROM; the
// controller reads the 16 table points at the corners of the 4-D grid cell
// around the input (each coarse field or coarse field + 1). The fine fields
// weight those 16 values: the corner that uses field + 1 of an input gets
// that input's fine field w as a factor, the other corner gets its inverse
// ~w. The products of table value and weight are summed, which smooths the
// otherwise stepped control surface of a plain table lookup while keeping the
// table small.
//
// Structure (published): address provider with four "+1" multiplexers, a
// register bank for the fetched table values, the weighting block (two 3-bit
// and one 6-bit multiplier), a processing unit with one shared multiplier and
// a 15-adder tree, all steered by an up counter. This design's own choices:
// the inputs are registered when an evaluation starts, the start/busy/done
// handshake, the phase split and the output scaling (top 16 bits of the
// 20-bit sum); see the sub-module headers.
//
// External ROM timing: lut_addr is driven from registers and is stable for a
// whole cycle; lut_data must be valid by the next rising edge (an
// asynchronous ROM with access time below one clock period).
//
// Timing: start is sampled on a rising edge while idle; done pulses 33
// cycles later with y valid from that cycle on. y holds until the next done.
module fuzzy_controller #(
  parameter int unsigned MSB_W  = fz_pkg::MSB_W_DEF,
  parameter int unsigned LSB_W  = fz_pkg::LSB_W_DEF,
  parameter int unsigned DATA_W = fz_pkg::DATA_W_DEF,
  parameter int unsigned OUT_W  = fz_pkg::OUT_W_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MSB_W+LSB_W-1:0] in_a,
  input  logic [MSB_W+LSB_W-1:0] in_b,
  input  logic [MSB_W+LSB_W-1:0] in_c,
  input  logic [MSB_W+LSB_W-1:0] in_d,
  output logic [4*MSB_W-1:0]     lut_addr,   // to the lookup-table ROM
  input  logic [DATA_W-1:0]      lut_data,   // from the lookup-table ROM
  output logic [OUT_W-1:0]       y,
  output logic                   busy,
  output logic                   done
);

  import fz_pkg::*;

  localparam int unsigned IN_W  = MSB_W + LSB_W;
  localparam int unsigned WGT_W = 4 * LSB_W;

  // ---------------------------------------------------------------- control
  logic    capture, fetch_en, mac_en, sum_en;
  corner_t corner;

  fz_sequencer u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .capture  (capture),
    .corner   (corner),
    .fetch_en (fetch_en),
    .mac_en   (mac_en),
    .sum_en   (sum_en),
    .busy     (busy),
    .done     (done)
  );

  // ---------------------------------------------------------- input register
  logic [N_IN-1:0][IN_W-1:0]  in_q;    // [3]=A ... [0]=D
  logic [N_IN-1:0][MSB_W-1:0] msb;
  logic [N_IN-1:0][LSB_W-1:0] lsb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       in_q <= '0;
    else if (capture) in_q <= {in_a, in_b, in_c, in_d};
  end

  always_comb begin
    for (int i = 0; i < int'(N_IN); i++) begin
      msb[i] = in_q[i][IN_W-1 -: MSB_W];
      lsb[i] = in_q[i][LSB_W-1:0];
    end
  end

  // ------------------------------------------------------- address provider
  fz_address_provider #(.MSB_W(MSB_W)) u_addr (
    .msb    (msb),
    .corner (corner),
    .addr   (lut_addr)
  );

  // ------------------------------------------- store data (table values)
  logic [N_CORNERS-1:0][DATA_W-1:0] lut_vals;

  fz_register_bank #(.WIDTH(DATA_W), .DEPTH(N_CORNERS)) u_lut_bank (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (fetch_en),
    .idx   (corner),
    .d     (lut_data),
    .q     (lut_vals)
  );

  // ------------------------------------------------------ weighting block
  logic [N_CORNERS-1:0][WGT_W-1:0] weights;

  fz_weighted_average #(.LSB_W(LSB_W)) u_wavg (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (fetch_en),
    .corner  (corner),
    .lsb     (lsb),
    .weights (weights)
  );

  // ------------------------------------------------------ processing unit
  fz_processing_unit #(.DATA_W(DATA_W), .WGT_W(WGT_W), .OUT_W(OUT_W)) u_pu (
    .clk      (clk),
    .rst_n    (rst_n),
    .mac_en   (mac_en),
    .sum_en   (sum_en),
    .corner   (corner),
    .lut_vals (lut_vals),
    .weights  (weights),
    .y        (y)
  );

endmodule
