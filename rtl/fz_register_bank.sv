// fz_register_bank: a bank of DEPTH registers with decoded write enables.
//
// The up-counter value (idx) is decoded into one enable per entry, so that on
// each clock edge with we high exactly the entry idx takes d. All entries are
// visible in parallel on q, which the processing unit reads through a
// multiplexer (one entry per cycle) or all at once (adder tree). The same
// bank is used three times in the controller: for the lookup-table values
// ("store data"), for the corner weights and for the products. The decoded
// enables follow the published block diagrams; the asynchronous clear is this
// design's choice.
//
// Timing: write on the rising edge of clk; q shows the new value one cycle
// later. rst_n (active low, asynchronous) clears every entry.
module fz_register_bank #(
  parameter int unsigned WIDTH = fz_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH = fz_pkg::N_CORNERS
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             we,
  input  logic [$clog2(DEPTH)-1:0]         idx,
  input  logic [WIDTH-1:0]                 d,
  output logic [DEPTH-1:0][WIDTH-1:0]      q
);

  logic [DEPTH-1:0] en;   // one enable per entry

  always_comb begin
    en = '0;
    if (we) en[idx] = 1'b1;
  end

  for (genvar e = 0; e < DEPTH; e++) begin : g_entry
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     q[e] <= '0;
      else if (en[e]) q[e] <= d;
    end
  end

endmodule
