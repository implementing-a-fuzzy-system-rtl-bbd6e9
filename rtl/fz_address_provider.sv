// fz_address_provider: forms the lookup-table address of one grid corner.
//
// The coarse fields (most significant bits) of the four inputs are each
// passed through a small multiplexer that selects the field or the field + 1.
// The corner index from the up-counter steers the four multiplexers, one bit
// each, and their outputs are concatenated into the table address with input A
// in the most significant slice: ADDRESS[15:12] = A, [11:8] = B, [7:4] = C,
// [3:0] = D at the default width. This slice order and the four-multiplexer
// split are the published structure; which counter bit drives which input is
// this design's choice (bit 3 -> A ... bit 0 -> D).
//
// Interface: msb[3] is input A's coarse field ... msb[0] is D's. Purely
// combinational: the address follows the corner index in the same cycle.
module fz_address_provider #(
  parameter int unsigned MSB_W = fz_pkg::MSB_W_DEF
) (
  input  logic [fz_pkg::N_IN-1:0][MSB_W-1:0] msb,     // coarse fields, [3]=A
  input  fz_pkg::corner_t                    corner,  // corner index
  output logic [fz_pkg::N_IN*MSB_W-1:0]      addr     // LUT address
);

  for (genvar i = 0; i < fz_pkg::N_IN; i++) begin : g_mux
    fz_nibble_mux #(.MSB_W(MSB_W)) u_mux (
      .field  (msb[i]),
      .sel_up (corner[i]),
      .addr   (addr[i*MSB_W +: MSB_W])
    );
  end

endmodule
