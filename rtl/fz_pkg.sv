// fz_pkg: constants and types shared by the weighted-average fuzzy controller.
//
// The controller has four inputs. Each input is split into a coarse field
// (its most significant bits, used to address the lookup table) and a fine
// field (its least significant bits, used as an interpolation weight). With
// four inputs there are 2^4 = 16 lookup-table corners around the input point,
// and one 4-bit up-counter value names each corner: bit 3 belongs to input A,
// bit 2 to B, bit 1 to C and bit 0 to D. A corner bit of 1 means "use the
// coarse field + 1 and weight it by the fine field"; 0 means "use the coarse
// field itself and weight it by the inverted fine field". The four-input size
// and the field widths are the published design's; the bit-to-input order of
// the corner index is this design's own choice.
package fz_pkg;

  // Number of controller inputs and of lookup-table corners.
  localparam int unsigned N_IN      = 4;
  localparam int unsigned N_CORNERS = 1 << N_IN;
  localparam int unsigned CORNER_W  = N_IN;

  // Default field widths: 7-bit inputs = 4 coarse bits + 3 fine bits,
  // 8-bit lookup-table data, 16-bit output.
  localparam int unsigned MSB_W_DEF  = 4;
  localparam int unsigned LSB_W_DEF  = 3;
  localparam int unsigned DATA_W_DEF = 8;
  localparam int unsigned OUT_W_DEF  = 16;

  typedef logic [CORNER_W-1:0] corner_t;

  // Phases of one evaluation.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,   // waiting for start
    PH_FETCH = 2'd1,   // read one LUT value and form one weight per cycle
    PH_MAC   = 2'd2,   // one LUT value x weight product per cycle
    PH_SUM   = 2'd3    // adder tree result is registered to the output
  } phase_e;

endpackage
