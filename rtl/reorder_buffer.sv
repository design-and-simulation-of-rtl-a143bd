// reorder_buffer: output queue of one switch port.
//
// Receives cells for its port from the input controllers of all K banyan
// stages at once (one write port per stage) and sends them out, one at a
// time, in the order of their time stamps, so cells that took a longer path
// through the tandem leave in the order in which they entered the switch.
//
// Storage is DEPTH cell slots of ATM_BYTES bytes in one memory. A cell's
// local header is not stored: its time stamp and priority go to a small
// descriptor per slot, and the 53 bytes that follow are written, one byte
// per cycle per write port, into a free slot chosen when the header
// arrives. A cell that finds no free slot is dropped (drop[k] pulses).
// The read side chooses among all occupied slots the one with the greatest
// age (current slot number minus time stamp, modulo 2^TS_W), then high
// priority, then a completely written cell, then the lowest slot number; it
// starts reading once that cell is completely written, so reading and
// writing go on at the same time in different slots. Ages must stay below
// 2^TS_W slots, which holds because a full buffer drains at one cell per
// 53 cycles: DEPTH = 8 cells wait at most 8 slots.
//
// The design description gives the function (time-stamp sorting, a cell
// queue with simultaneous read and write, one per output port, mapped into
// on-chip SRAM); the slot-based store, the selection order, DEPTH and the
// drop policy are this design's choices.
//
// Output: out_valid/out_sop/out_data carry the 53-byte ATM cell, sop on
// its first byte. The first byte leaves 2 cycles after the cell's last byte
// was written (store and forward); consecutive cells leave back to back,
// one every 53 cycles.
module reorder_buffer
  import atm_pkg::*;
#(
  parameter int unsigned K     = 4,   // banyan stages feeding this buffer
  parameter int unsigned DEPTH = 8    // cell slots
) (
  input  logic   clk,
  input  logic   rst_n,
  input  ts_t    now_ts,
  input  link_t  in [K],
  output logic   out_valid,
  output logic   out_sop,
  output byte_t  out_data,
  output logic [K-1:0] drop,
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);

  localparam int unsigned SLOT_W = $clog2(DEPTH);
  localparam int unsigned BYTE_W = $clog2(ATM_BYTES);
  localparam int unsigned ADDR_W = $clog2(DEPTH * ATM_BYTES);

  typedef logic [SLOT_W-1:0] slot_t;
  typedef logic [BYTE_W-1:0] bidx_t;
  typedef logic [ADDR_W-1:0] addr_t;

  function automatic addr_t addr_of(slot_t s, bidx_t b);
    return addr_t'(s) * addr_t'(ATM_BYTES) + addr_t'(b);
  endfunction

  byte_t mem [DEPTH * ATM_BYTES];

  // slot descriptors
  logic [DEPTH-1:0] occ, done;
  ts_t              d_ts   [DEPTH];
  logic [DEPTH-1:0] d_prio;

  // write ports
  logic [K-1:0] wr_busy;
  slot_t        wr_slot [K];
  bidx_t        wr_cnt  [K];

  // allocation of free slots to arriving headers
  logic [K-1:0] alloc_ok, new_cell;
  slot_t        alloc_slot [K];

  always_comb begin
    logic [DEPTH-1:0] free;
    free = ~occ;
    for (int k = 0; k < K; k++) begin
      new_cell[k]   = in[k].valid && in[k].sop;
      alloc_ok[k]   = 1'b0;
      alloc_slot[k] = '0;
      if (new_cell[k]) begin
        for (int s = DEPTH - 1; s >= 0; s--) begin
          if (free[s]) begin
            alloc_ok[k]   = 1'b1;
            alloc_slot[k] = slot_t'(s);
          end
        end
        if (alloc_ok[k]) free[alloc_slot[k]] = 1'b0;
      end
    end
  end

  // read side
  logic  rd_busy, rd_last;
  slot_t rd_slot;
  bidx_t rd_cnt;
  logic  sel_found, sel_done;
  slot_t sel_slot;

  assign rd_last = rd_busy && (rd_cnt == bidx_t'(ATM_BYTES - 1));

  always_comb begin
    logic [DEPTH-1:0] cand;
    logic [TS_W+1:0]  best_key, key;
    cand = occ;
    if (rd_busy) cand[rd_slot] = 1'b0;
    sel_found = 1'b0;
    sel_slot  = '0;
    best_key  = '0;
    for (int s = 0; s < DEPTH; s++) begin
      key = {ts_age(now_ts, d_ts[s]), d_prio[s], done[s]};
      if (cand[s] && (!sel_found || key > best_key)) begin
        sel_found = 1'b1;
        sel_slot  = slot_t'(s);
        best_key  = key;
      end
    end
    sel_done = sel_found && done[sel_slot];
  end

  logic start_rd;
  assign start_rd = (!rd_busy || rd_last) && sel_done;

  // memory: K write ports, one read port
  always_ff @(posedge clk) begin
    for (int k = 0; k < K; k++) begin
      if (wr_busy[k] && in[k].valid && !in[k].sop)
        mem[addr_of(wr_slot[k], wr_cnt[k])] <= in[k].data;
    end
    if (rd_busy) out_data <= mem[addr_of(rd_slot, rd_cnt)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ       <= '0;
      done      <= '0;
      d_prio    <= '0;
      wr_busy   <= '0;
      drop      <= '0;
      rd_busy   <= 1'b0;
      rd_slot   <= '0;
      rd_cnt    <= '0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      for (int s = 0; s < DEPTH; s++) d_ts[s] <= '0;
      for (int k = 0; k < K; k++) begin
        wr_slot[k] <= '0;
        wr_cnt[k]  <= '0;
      end
    end else begin
      // read
      out_valid <= rd_busy;
      out_sop   <= rd_busy && (rd_cnt == '0);
      if (rd_last) begin
        occ[rd_slot]  <= 1'b0;
        done[rd_slot] <= 1'b0;
      end
      if (start_rd) begin
        rd_busy <= 1'b1;
        rd_slot <= sel_slot;
        rd_cnt  <= '0;
      end else if (rd_last) begin
        rd_busy <= 1'b0;
      end else if (rd_busy) begin
        rd_cnt <= rd_cnt + 1'b1;
      end
      // write
      for (int k = 0; k < K; k++) begin
        drop[k] <= new_cell[k] && !alloc_ok[k];
        if (new_cell[k]) begin
          wr_busy[k] <= alloc_ok[k];
          if (alloc_ok[k]) begin
            local_hdr_t h;
            h = local_hdr_t'(in[k].data);
            occ[alloc_slot[k]]    <= 1'b1;
            done[alloc_slot[k]]   <= 1'b0;
            d_ts[alloc_slot[k]]   <= h.ts;
            d_prio[alloc_slot[k]] <= h.prio;
            wr_slot[k]            <= alloc_slot[k];
            wr_cnt[k]             <= '0;
          end
        end else if (wr_busy[k] && in[k].valid) begin
          wr_cnt[k] <= wr_cnt[k] + 1'b1;
          if (wr_cnt[k] == bidx_t'(ATM_BYTES - 1)) begin
            wr_busy[k]          <= 1'b0;
            done[wr_slot[k]]    <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    occupancy = '0;
    for (int s = 0; s < DEPTH; s++) occupancy += ($clog2(DEPTH+1))'(occ[s]);
  end

  // A new cell may only start on a write port once the previous one is
  // complete (cells on one link never overlap).
  for (genvar k = 0; k < K; k++) begin : g_chk
    a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
        new_cell[k] |-> !wr_busy[k]);
  end

endmodule
