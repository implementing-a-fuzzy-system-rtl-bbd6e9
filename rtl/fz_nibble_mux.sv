// fz_nibble_mux: one of the four small multiplexers of the address provider.
//
// It passes either the coarse field of one input or that field plus one,
// selected by one bit of the corner counter. The "+1" path and the split of
// the big address multiplexer into four small ones follow the published
// structure. At the top of the range (all ones) the +1 path saturates instead
// of wrapping to zero: this is this design's choice, so that an input at the
// very top of its range interpolates towards the last table row rather than
// towards the first one.
//
// Purely combinational; no clock.
module fz_nibble_mux #(
  parameter int unsigned MSB_W = fz_pkg::MSB_W_DEF
) (
  input  logic [MSB_W-1:0] field,   // coarse field of one input
  input  logic             sel_up,  // 1: field + 1 (saturating), 0: field
  output logic [MSB_W-1:0] addr     // address slice for this input
);

  logic [MSB_W-1:0] field_inc;

  always_comb begin
    field_inc = (field == {MSB_W{1'b1}}) ? field : field + MSB_W'(1);
    addr      = sel_up ? field_inc : field;
  end

endmodule
