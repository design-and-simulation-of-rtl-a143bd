// cell_processor: entrance unit of one switch input.
//
// Takes 53-byte ATM cells (UNI header format), one byte per clock, and emits
// them into the fabric prefixed by the 8-bit local header
// {dest[2:0], prio, ts[3:0]}. The fields come from the 5-byte ATM header:
//   dest - looked up in a 256-entry routing table indexed by the cell's VPI;
//          an entry holds an enable bit and the output port. A cell whose VPI
//          has no enabled entry is discarded (no_route pulses).
//   prio - the inverse of the CLP bit: cells with CLP = 0 win contention.
//   ts   - the slot number from the manager at the cell's arrival.
// The design description specifies a local 8-bit header with destination,
// time stamp and priority bit computed from the 5-byte ATM header; the table
// lookup on VPI, the CLP-to-priority rule and the discard of unknown VPIs
// are this design's own reading of how the fields are computed.
//
// Timing: the first byte of a cell (in_sop) must arrive on the first cycle
// of a slot (slot_start). VPI and CLP are known once byte 3 has arrived, so
// the local header leaves in cycle 4 of the slot and ATM byte i in cycle
// 5 + i: a fixed latency of 5 cycles and a 54-byte cell on the output link.
// The routing table is written through tbl_we/tbl_addr/tbl_en/tbl_port and
// is cleared by reset.
module cell_processor
  import atm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   slot_start,
  input  ts_t    ts,
  // ATM cell input
  input  logic   in_valid,
  input  logic   in_sop,
  input  byte_t  in_data,
  // routing-table write port
  input  logic   tbl_we,
  input  byte_t  tbl_addr,   // VPI
  input  logic   tbl_en,
  input  port_t  tbl_port,
  // fabric output
  output link_t  out,
  output logic   no_route    // one-cycle pulse per discarded cell
);

  localparam int unsigned CNT_W = $clog2(SLOT_CYCLES + 1);

  typedef struct packed {
    logic  en;
    port_t port;
  } route_t;

  route_t     table_q [256];
  byte_t      dly [4];       // dly[j] holds the input byte of j+1 cycles ago
  byte_t      byte0, byte1;
  ts_t        ts_q;
  logic       in_busy, out_busy;
  logic [CNT_W-1:0] in_cnt, out_cnt;

  // Header is formed while byte 3 (VCI low, PT, CLP) is on the input.
  logic       hdr_now;
  byte_t      vpi;
  route_t     route;
  local_hdr_t hdr;

  assign hdr_now = in_busy && (in_cnt == CNT_W'(3));
  assign vpi     = {byte0[3:0], byte1[7:4]};
  assign route   = table_q[vpi];
  assign hdr     = '{dest: route.port, prio: ~in_data[0], ts: ts_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 256; i++) table_q[i] <= '0;
    end else if (tbl_we) begin
      table_q[tbl_addr] <= '{en: tbl_en, port: tbl_port};
    end
  end

  always_ff @(posedge clk) begin
    dly[0] <= in_data;
    for (int j = 1; j < 4; j++) dly[j] <= dly[j-1];
  end

  // Input side: count the bytes of the arriving cell, keep bytes 0 and 1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_busy <= 1'b0;
      in_cnt  <= '0;
      byte0   <= '0;
      byte1   <= '0;
      ts_q    <= '0;
    end else if (in_valid && in_sop) begin
      in_busy <= 1'b1;
      in_cnt  <= CNT_W'(1);
      byte0   <= in_data;
      ts_q    <= ts;
    end else if (in_busy) begin
      in_cnt <= in_cnt + 1'b1;
      if (in_cnt == CNT_W'(1)) byte1 <= in_data;
      if (in_cnt == CNT_W'(ATM_BYTES - 1)) in_busy <= 1'b0;
    end
  end

  // Output side: local header, then the 53 delayed ATM bytes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out      <= LINK_IDLE;
      out_busy <= 1'b0;
      out_cnt  <= '0;
      no_route <= 1'b0;
    end else begin
      no_route <= hdr_now && !route.en;
      if (hdr_now && route.en) begin
        out      <= '{valid: 1'b1, sop: 1'b1, mark: 1'b0, data: hdr};
        out_busy <= 1'b1;
        out_cnt  <= CNT_W'(1);
      end else if (out_busy) begin
        out     <= '{valid: 1'b1, sop: 1'b0, mark: 1'b0, data: dly[3]};
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt == CNT_W'(ATM_BYTES)) out_busy <= 1'b0;
      end else begin
        out <= LINK_IDLE;
      end
    end
  end

  // A cell must start on a slot boundary so all inputs of a banyan stage
  // see their headers in the same cycle.
  a_sop_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                  (in_valid && in_sop) |-> slot_start);

endmodule
