// manager: common timing and reset for the switch.
//
// The manager produces the signals every other unit shares. The external
// reset is asserted asynchronously and released through a two-flop
// synchroniser. A cycle counter divides the byte clock into cell slots of
// SLOT_CYCLES cycles (54: one local-header byte plus the 53-byte ATM cell),
// and pulses slot_start on the first cycle of every slot. A TS_W-bit slot
// counter advances at every slot boundary; its value is the time stamp that
// the cell processing units write into the local header and the reference
// against which the reorder buffers age their cells.
//
// The design description says only that this unit generates the controlling
// signals (clock, reset, ...). The clock itself comes from outside; the slot
// length and time-stamp width are this design's choices.
//
// Timing: slot_start is high in the first cycle after reset release and then
// every SLOT_CYCLES cycles; ts changes in the cycle slot_start is high.
module manager
  import atm_pkg::*;
#(
  parameter int unsigned SLOT_LEN = SLOT_CYCLES,
  parameter int unsigned STAMP_W  = TS_W
) (
  input  logic                        clk,
  input  logic                        rst_n_ext,   // asynchronous, active low
  output logic                        rst_n,       // synchronised reset
  output logic                        slot_start,  // first cycle of a slot
  output logic [$clog2(SLOT_LEN)-1:0] slot_cyc,    // cycle within the slot
  output logic [STAMP_W-1:0]          ts           // current slot number
);

  logic [1:0] rst_sync;

  always_ff @(posedge clk or negedge rst_n_ext) begin
    if (!rst_n_ext) rst_sync <= '0;
    else            rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_cyc <= '0;
      ts       <= '0;
    end else if (slot_cyc == ($clog2(SLOT_LEN))'(SLOT_LEN - 1)) begin
      slot_cyc <= '0;
      ts       <= ts + 1'b1;
    end else begin
      slot_cyc <= slot_cyc + 1'b1;
    end
  end

  assign slot_start = rst_n && (slot_cyc == '0);

endmodule
