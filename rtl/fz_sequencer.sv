// fz_sequencer: the up-counter and phase control of the controller.
//
// One evaluation runs through three phases, each driven by the same 4-bit up
// counter that names the 16 lookup-table corners:
//   FETCH (16 cycles) - corner k's address is on the table address lines; its
//                       table value and its weight are stored at entry k;
//   MAC   (16 cycles) - the shared multiplier forms table value x weight of
//                       corner k into the product bank;
//   SUM   (1 cycle)   - the adder-tree sum is registered to the output.
// The published design names the up counter that steers every multiplexer and
// register-bank enable, and uses its LUT fetch and its multipliers one value
// at a time; the exact phase split (weights formed during the fetch, products
// in a second pass) and the start/busy/done handshake are this design's own.
//
// Handshake: start is accepted in IDLE (capture is high in that cycle, for
// the input register). done is a one-cycle pulse, 33 cycles after the
// accepting edge, in the cycle the new output is first visible. start may be
// held high to evaluate continuously: a new evaluation is accepted in the
// done cycle, giving one result every 34 cycles.
module fz_sequencer (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            capture,    // start accepted: latch the inputs
  output fz_pkg::corner_t corner,     // up-counter value = corner index
  output logic            fetch_en,   // FETCH phase
  output logic            mac_en,     // MAC phase
  output logic            sum_en,     // SUM phase
  output logic            busy,
  output logic            done
);

  import fz_pkg::*;

  phase_e phase;
  logic   last;   // counter at its final value

  assign last     = (corner == corner_t'(N_CORNERS - 1));
  assign capture  = (phase == PH_IDLE) && start;
  assign fetch_en = (phase == PH_FETCH);
  assign mac_en   = (phase == PH_MAC);
  assign sum_en   = (phase == PH_SUM);
  assign busy     = (phase != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      corner <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          corner <= '0;
          if (start) phase <= PH_FETCH;
        end
        PH_FETCH: begin
          corner <= corner + 1'b1;          // wraps to 0 after the last corner
          if (last) phase <= PH_MAC;
        end
        PH_MAC: begin
          corner <= corner + 1'b1;
          if (last) phase <= PH_SUM;
        end
        PH_SUM: begin
          done  <= 1'b1;
          phase <= PH_IDLE;
        end
      endcase
    end
  end

  a_one_phase: assert property (@(posedge clk)
    $onehot0({fetch_en, mac_en, sum_en}));

endmodule
