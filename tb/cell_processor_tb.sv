// cell_processor_tb: self-checking test of the entrance unit.
//
// Programs a few VPI routing entries, then offers 60 ATM cells, one per
// test slot of two 54-cycle slots (some empty), with random VPIs (mostly programmed,
// some not), random CLP bits and random payload. For every cell it checks
// that the local header leaves in slot cycle 4 with the destination from
// the table, priority = not CLP and the slot's time stamp, that the 53 ATM
// bytes follow unchanged in cycles 5..57, and that a cell with an unknown
// VPI produces no output and one no_route pulse.
module cell_processor_tb;
  import atm_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n, slot_start;
  ts_t   ts;
  logic  in_valid, in_sop;
  byte_t in_data;
  logic  tbl_we, tbl_en;
  byte_t tbl_addr;
  port_t tbl_port;
  link_t out;
  logic  no_route;
  int    checks = 0, failures = 0;
  int    cyc;

  always #5 clk = ~clk;

  cell_processor dut (.clk(clk), .rst_n(rst_n), .slot_start(slot_start), .ts(ts),
                      .in_valid(in_valid), .in_sop(in_sop), .in_data(in_data),
                      .tbl_we(tbl_we), .tbl_addr(tbl_addr), .tbl_en(tbl_en),
                      .tbl_port(tbl_port), .out(out), .no_route(no_route));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference routing table: VPI -> port, -1 = none
  int ref_tbl [256];

  initial begin
    byte_t atm [ATM_BYTES];
    int    vpi, n_routed, n_dropped;
    bit    present, clp;
    for (int i = 0; i < 256; i++) ref_tbl[i] = -1;
    in_valid = 0; in_sop = 0; in_data = '0; tbl_we = 0; tbl_en = 0; tbl_addr = '0; tbl_port = '0;
    slot_start = 0; ts = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // program VPIs 0x00..0x0F and 0xA5 -> pseudo-random ports
    for (int i = 0; i < 17; i++) begin
      @(negedge clk);
      tbl_we   = 1;
      tbl_en   = 1;
      tbl_addr = (i == 16) ? 8'hA5 : byte_t'(i);
      tbl_port = port_t'((i * 5 + 3) % 8);
      ref_tbl[tbl_addr] = int'(tbl_port);
    end
    // enable then disable VPI 0x0C again
    @(negedge clk); tbl_we = 1; tbl_en = 0; tbl_addr = 8'h0C; ref_tbl[8'h0C] = -1;
    @(negedge clk); tbl_we = 0;
    n_routed = 0; n_dropped = 0;
    for (int s = 0; s < 60; s++) begin
      present = (s % 7) != 3;
      vpi = ($urandom % 5 == 0) ? int'($urandom % 256) : (($urandom % 9 == 0) ? 32'hA5 : int'($urandom % 16));
      clp = $urandom_range(1, 0) == 1;
      for (int b = 0; b < ATM_BYTES; b++) atm[b] = byte_t'($urandom);
      atm[0][3:0] = vpi[7:4];
      atm[1][7:4] = vpi[3:0];
      atm[3][0] = clp;
      // slot of 54 cycles; outputs of this cell run into cycle 57 = next slot's 3
      for (int c = 0; c < SLOT_CYCLES + 4; c++) begin
        if (c < SLOT_CYCLES) begin
          slot_start = (c == 0);
          ts         = ts_t'(s);
          in_valid   = present && c < ATM_BYTES;
          in_sop     = present && c == 0;
          in_data    = (c < ATM_BYTES) ? atm[c] : byte_t'($urandom);
        end else begin
          slot_start = 1'b0;
          in_valid   = 1'b0;
          in_sop     = 1'b0;
        end
        @(negedge clk);
        // the outputs now visible were registered at the end of cycle c and
        // belong to cycle c + 1 of the slot
        cyc = c + 1;
        if (present && ref_tbl[vpi] >= 0) begin
          if (cyc == 4) begin
            local_hdr_t h;
            h = local_hdr_t'(out.data);
            check(out.valid && out.sop && !out.mark, "header valid/sop");
            check(int'(h.dest) == ref_tbl[vpi], "destination from table");
            check(h.prio == !clp, "priority = not CLP");
            check(h.ts == ts_t'(s), "time stamp = slot number");
          end else if (cyc >= 5 && cyc < 5 + ATM_BYTES) begin
            check(out.valid && !out.sop && out.data == atm[cyc-5], "ATM byte in place");
          end else begin
            check(!out.valid, "idle after cell");
          end
          if (cyc == 4) n_routed++;
        end else begin
          check(!out.valid, "no output for absent or unroutable cell");
        end
        if (cyc == 4) check(no_route == (present && ref_tbl[vpi] < 0), "no_route pulse");
        if (cyc == 4 && present && ref_tbl[vpi] < 0) n_dropped++;
        if (cyc != 4 && cyc < SLOT_CYCLES) check(!no_route, "no stray no_route");
      end
      // idle gap so that each test slot is checked on its own
      for (int c = 4; c < SLOT_CYCLES; c++) begin
        slot_start = 1'b0;
        @(negedge clk);
      end
    end
    check(n_routed > 20 && n_dropped > 0, "routed and unroutable cells seen");
    $display("routed %0d, unroutable %0d", n_routed, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
