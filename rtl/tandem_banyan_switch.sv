// tandem_banyan_switch: 8x8 output-buffered ATM switch made of K cascaded
// banyan networks.
//
// A single banyan network blocks internally: two cells that need the same
// internal link cannot both pass. The tandem banyan switch puts K banyan
// networks in a row. Cells that reach their output in banyan stage k are
// taken out by that stage's input controller and written into the reorder
// buffer of their output port; cells that were blocked in stage k carry a
// mark, and the input controller hands them, unmarked again, to the same
// input of stage k+1 for another try. Each output port therefore collects
// cells from all K stages; its reorder buffer sorts them by the time stamp
// the cell processing unit wrote at the entrance, so they leave in order.
// Cells still blocked after stage K-1 are lost (counted in cnt_fabric_loss).
//
// Data path, one byte per clock and one cell every 54-cycle slot per port:
//   in[i] -> cell_processor[i] -> banyan8[0] -> input_controller[0] -> ...
//         -> banyan8[K-1] -> input_controller[K-1]
//   input_controller[k].to_buf[j] -> reorder_buffer[j] -> out[j]
// The manager provides the synchronised reset, slot timing and time stamp.
//
// Follows the design description: the unit set, the 8-bit internal width,
// the 8x8 size, K = 4 stages as in its simulated configuration and one
// reorder buffer per output. This design's own choices: blocked cells after
// the last stage are dropped (the description leaves lost / recirculated
// open), the slot timing and all widths not given there.
//
// Interface: ATM cells enter as 53 consecutive bytes with in_sop on the
// first, which must fall in the cycle slot_start is high. tbl_* writes the
// VPI routing table of input tbl_in. out_* carry 53-byte ATM cells.
// Timing: an unblocked cell's first byte enters in slot cycle 0, its local
// header reaches the stage-k output buffer in cycle 8 + 4k, and the cell
// leaves the output buffer, if that is idle, 2 cycles after it is stored.
module tandem_banyan_switch
  import atm_pkg::*;
#(
  parameter int unsigned K         = 4,  // banyan stages
  parameter int unsigned BUF_DEPTH = 8   // cells per reorder buffer
) (
  input  logic  clk,
  input  logic  rst_n,                   // asynchronous, active low
  // slot timing for the cell sources
  output logic  slot_start,
  output ts_t   slot_ts,
  // ATM cell inputs
  input  logic  in_valid [N_PORTS],
  input  logic  in_sop   [N_PORTS],
  input  byte_t in_data  [N_PORTS],
  // routing-table write port
  input  logic  tbl_we,
  input  port_t tbl_in,
  input  byte_t tbl_addr,
  input  logic  tbl_en,
  input  port_t tbl_port,
  // ATM cell outputs
  output logic  out_valid [N_PORTS],
  output logic  out_sop   [N_PORTS],
  output byte_t out_data  [N_PORTS],
  // statistics
  output logic [31:0] cnt_no_route,     // cells with no routing-table entry
  output logic [31:0] cnt_deflect,      // contentions lost inside banyan networks
  output logic [31:0] cnt_fabric_loss,  // cells still blocked after stage K-1
  output logic [31:0] cnt_buffer_drop   // cells refused by a full reorder buffer
);

  logic sys_rst_n;
  logic [$clog2(SLOT_CYCLES)-1:0] slot_cyc;

  manager u_manager (
    .clk        (clk),
    .rst_n_ext  (rst_n),
    .rst_n      (sys_rst_n),
    .slot_start (slot_start),
    .slot_cyc   (slot_cyc),
    .ts         (slot_ts)
  );

  // stage_in[k]: links into banyan stage k; stage_in[K]: lost cells
  link_t stage_in  [K+1][N_PORTS];
  link_t stage_out [K][N_PORTS];
  link_t to_buf    [K][N_PORTS];
  logic [N_PORTS-1:0] no_route;
  logic [N_PORTS-1:0] delivered [K];
  logic [N_PORTS-1:0] forwarded [K];
  logic [BANYAN_COLS-1:0] deflect [K];
  logic [K-1:0] drop [N_PORTS];

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    cell_processor u_cp (
      .clk        (clk),
      .rst_n      (sys_rst_n),
      .slot_start (slot_start),
      .ts         (slot_ts),
      .in_valid   (in_valid[i]),
      .in_sop     (in_sop[i]),
      .in_data    (in_data[i]),
      .tbl_we     (tbl_we && (tbl_in == port_t'(i))),
      .tbl_addr   (tbl_addr),
      .tbl_en     (tbl_en),
      .tbl_port   (tbl_port),
      .out        (stage_in[0][i]),
      .no_route   (no_route[i])
    );
  end

  for (genvar k = 0; k < K; k++) begin : g_stage
    banyan8 u_banyan (
      .clk     (clk),
      .rst_n   (sys_rst_n),
      .in      (stage_in[k]),
      .out     (stage_out[k]),
      .deflect (deflect[k])
    );
    input_controller u_ic (
      .clk       (clk),
      .rst_n     (sys_rst_n),
      .in        (stage_out[k]),
      .to_buf    (to_buf[k]),
      .to_next   (stage_in[k+1]),
      .delivered (delivered[k]),
      .forwarded (forwarded[k])
    );
  end

  for (genvar j = 0; j < N_PORTS; j++) begin : g_out
    link_t rb_in [K];
    logic [$clog2(BUF_DEPTH+1)-1:0] occupancy;
    for (genvar k = 0; k < K; k++) begin : g_k
      assign rb_in[k] = to_buf[k][j];
    end
    reorder_buffer #(.K(K), .DEPTH(BUF_DEPTH)) u_rb (
      .clk       (clk),
      .rst_n     (sys_rst_n),
      .now_ts    (slot_ts),
      .in        (rb_in),
      .out_valid (out_valid[j]),
      .out_sop   (out_sop[j]),
      .out_data  (out_data[j]),
      .drop      (drop[j]),
      .occupancy (occupancy)
    );
  end

  // statistics counters
  function automatic logic [31:0] popcount(logic [N_PORTS*K-1:0] v);
    logic [31:0] n;
    n = '0;
    for (int b = 0; b < N_PORTS * K; b++) n += 32'(v[b]);
    return n;
  endfunction

  logic [N_PORTS*K-1:0] drop_flat;
  logic [N_PORTS*K-1:0] defl_flat;
  always_comb begin
    drop_flat = '0;
    defl_flat = '0;
    for (int j = 0; j < N_PORTS; j++)
      for (int k = 0; k < K; k++) drop_flat[j*K + k] = drop[j][k];
    for (int k = 0; k < K; k++)
      for (int c = 0; c < BANYAN_COLS; c++) defl_flat[k*BANYAN_COLS + c] = deflect[k][c];
  end

  always_ff @(posedge clk or negedge sys_rst_n) begin
    if (!sys_rst_n) begin
      cnt_no_route    <= '0;
      cnt_deflect     <= '0;
      cnt_fabric_loss <= '0;
      cnt_buffer_drop <= '0;
    end else begin
      cnt_no_route    <= cnt_no_route    + popcount((N_PORTS*K)'(no_route));
      cnt_deflect     <= cnt_deflect     + popcount(defl_flat);
      cnt_fabric_loss <= cnt_fabric_loss + popcount((N_PORTS*K)'(forwarded[K-1]));
      cnt_buffer_drop <= cnt_buffer_drop + popcount(drop_flat);
    end
  end

endmodule
