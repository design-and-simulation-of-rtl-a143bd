// atm_pkg: types and constants shared by the tandem banyan ATM switch.
//
// The switch moves cells one byte per clock. Inside the fabric every cell is
// 54 bytes long: an 8-bit local header followed by the 53-byte ATM cell. A
// byte-wide link carries, beside the data byte, three side-band bits: valid
// (high for every byte of a cell), sop (high on the local-header byte) and
// mark (high for the whole cell once it has lost a contention in the current
// banyan stage). The 8-bit byte width, the 8 ports, the 53-byte cell and the
// local header made of destination, time stamp and priority follow the
// design description; the field order inside the header, the 4-bit time
// stamp and the side-band bits are this design's own choices.
package atm_pkg;

  localparam int unsigned N_PORTS      = 8;   // 8x8 switch
  localparam int unsigned PORT_W       = 3;   // log2(N_PORTS)
  localparam int unsigned DATA_W       = 8;   // internal byte width
  localparam int unsigned ATM_BYTES    = 53;  // 5-byte header + 48-byte payload
  localparam int unsigned SLOT_CYCLES  = ATM_BYTES + 1; // local header + ATM cell
  localparam int unsigned TS_W         = 4;   // time-stamp width
  localparam int unsigned BANYAN_COLS  = PORT_W; // SE columns per banyan network

  typedef logic [PORT_W-1:0] port_t;
  typedef logic [TS_W-1:0]   ts_t;
  typedef logic [DATA_W-1:0] byte_t;

  // Local header, the first byte of a cell inside the switch.
  typedef struct packed {
    port_t dest;   // [7:5] destination output port
    logic  prio;   // [4]   1 = high priority (wins contention)
    ts_t   ts;     // [3:0] entrance slot number
  } local_hdr_t;

  // One byte-wide link of the fabric.
  typedef struct packed {
    logic  valid;
    logic  sop;
    logic  mark;
    byte_t data;
  } link_t;

  localparam link_t LINK_IDLE = '{valid: 1'b0, sop: 1'b0, mark: 1'b0, data: '0};

  // Wrap-around age of a time stamp relative to the current slot number.
  function automatic ts_t ts_age(ts_t now, ts_t ts);
    return ts_t'(now - ts);
  endfunction

endpackage
