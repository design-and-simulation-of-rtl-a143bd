// tandem_banyan_switch_tb: end-to-end test of the 8x8 tandem banyan switch
// at its default size (4 banyan stages, 8-cell reorder buffers).
//
// Programs each input's routing table with VPI v -> output v (v = 0..7),
// then offers ATM cells slot by slot in three phases:
//   1. cyclic-shift permutations at full load: nothing may block; every
//      cell must leave from stage 0, 64 cycles after its first byte entered
//      (5 entrance + 3 banyan + 1 filter + 53 store + 2 read), and each
//      output must carry one cell per slot;
//   2. random destinations at 90 % load with random CLP bits and a few
//      cells for an unprogrammed VPI;
//   3. a hot spot, all inputs to output 3, which overloads both the fabric
//      (cells still blocked after stage 3 are lost) and the reorder buffer.
// Every cell carries its input number and sequence number. The scoreboard
// checks that each output cell is intact, went to the output its VPI maps
// to, was sent and is seen once, and that cells of one input-output flow
// keep their order. At the end, delivered + lost in fabric + dropped by a
// buffer + unroutable must equal the number of cells offered, with the
// last three taken from the switch's counters and checked for plausibility
// against what the test can work out itself (unroutable count exactly).
// Mechanisms counted, each of which must occur: deflection inside a banyan,
// delivery from a later stage, loss after the last stage, buffer overflow,
// unroutable cell, and a cell leaving its buffer ahead of one that arrived
// earlier (priority overtaking in the reorder buffer).
module tandem_banyan_switch_tb;
  import atm_pkg::*;

  localparam int NP = N_PORTS;
  localparam int KS = 4;              // the switch's default stage count
  localparam int MAXSEQ = 1024;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  slot_start;
  ts_t   slot_ts;
  logic  in_valid [NP], in_sop [NP];
  byte_t in_data  [NP];
  logic  tbl_we, tbl_en;
  port_t tbl_in, tbl_port;
  byte_t tbl_addr;
  logic  out_valid [NP], out_sop [NP];
  byte_t out_data  [NP];
  logic [31:0] cnt_no_route, cnt_deflect, cnt_fabric_loss, cnt_buffer_drop;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tandem_banyan_switch dut (
    .clk(clk), .rst_n(rst_n), .slot_start(slot_start), .slot_ts(slot_ts),
    .in_valid(in_valid), .in_sop(in_sop), .in_data(in_data),
    .tbl_we(tbl_we), .tbl_in(tbl_in), .tbl_addr(tbl_addr), .tbl_en(tbl_en), .tbl_port(tbl_port),
    .out_valid(out_valid), .out_sop(out_sop), .out_data(out_data),
    .cnt_no_route(cnt_no_route), .cnt_deflect(cnt_deflect),
    .cnt_fabric_loss(cnt_fabric_loss), .cnt_buffer_drop(cnt_buffer_drop));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ATM cell contents: header bytes 0..4, id in bytes 5..7, pattern after
  function automatic byte_t gen(int i, int seq, int vpi, bit clp, int b);
    case (b)
      0: return byte_t'(vpi >> 4);
      1: return byte_t'(((vpi & 15) << 4) | 1);
      2: return byte_t'(seq * 3);
      3: return byte_t'(8'h20 | {7'd0, clp});
      4: return 8'h55;
      5: return byte_t'(i);
      6: return byte_t'(seq);
      7: return byte_t'(seq >> 8);
      default: return byte_t'(i * 31 + seq * 7 + b);
    endcase
  endfunction

  // scoreboard
  int  sb_vpi   [NP][MAXSEQ];
  bit  sb_clp   [NP][MAXSEQ];
  int  sb_sent_t[NP][MAXSEQ];
  bit  sb_seen  [NP][MAXSEQ];
  int  sb_arr   [NP][MAXSEQ];     // arrival index at its reorder buffer
  int  sb_ph    [NP][MAXSEQ];     // traffic phase the cell was sent in
  int  seq_next [NP];
  int  last_seq [NP][NP];         // per flow, last sequence number seen
  int  cyc = 0;

  int  n_sent = 0, n_unroutable = 0, n_delivered = 0;
  int  n_reorder = 0;
  int  stage_del [KS];
  int  phase = 0;
  int  lat_checked = 0;

  // traffic generator state, one cell per input per slot
  bit  cur_on  [NP];
  int  cur_seq [NP], cur_vpi [NP];
  bit  cur_clp [NP];
  int  slot_no = -1, scyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // deliveries per stage (peeking at the input controllers' pulses)
  for (genvar k = 0; k < KS; k++) begin : g_mon_stage
    always @(posedge clk) if (rst_n) stage_del[k] += $countones(dut.g_stage[k].u_ic.delivered);
  end

  // arrival order at each reorder buffer: the cell id sits at internal
  // byte offsets 6..8 (local header + ATM bytes 5..7)
  int arr_cnt [NP];
  for (genvar j = 0; j < NP; j++) begin : g_mon_arr
    for (genvar k = 0; k < KS; k++) begin : g_k
      int off, id_i, id_s;
      always @(posedge clk) begin
        link_t l;
        l = dut.g_out[j].rb_in[k];
        if (l.valid && l.sop) off = 0;
        else if (l.valid) off++;
        if (l.valid && off == 6) id_i = int'(l.data);
        if (l.valid && off == 7) id_s = int'(l.data);
        if (l.valid && off == 8) begin
          id_s |= int'(l.data) << 8;
          if (id_i < NP && id_s < MAXSEQ) sb_arr[id_i][id_s] = arr_cnt[j];
          arr_cnt[j]++;
        end
      end
    end
  end

  // output side
  int rx_b [NP];
  byte_t rx_buf [NP][ATM_BYTES];
  int rx_sop_t [NP];
  int max_arr_out [NP];
  int last_sop_t [NP];
  int full_rate_gaps = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < NP; j++) begin
        if (out_valid[j]) begin
          if (out_sop[j]) begin
            rx_b[j] = 0;
            rx_sop_t[j] = cyc;
          end
          if (rx_b[j] < ATM_BYTES) rx_buf[j][rx_b[j]] = out_data[j];
          rx_b[j]++;
          if (rx_b[j] == ATM_BYTES) begin
            int i, s;
            bit ok;
            i = int'(rx_buf[j][5]);
            s = int'(rx_buf[j][6]) | (int'(rx_buf[j][7]) << 8);
            check(i < NP && s < MAXSEQ && s < seq_next[i], "output cell was sent");
            if (i < NP && s < MAXSEQ) begin
              ok = 1;
              for (int b = 0; b < ATM_BYTES; b++)
                if (rx_buf[j][b] != gen(i, s, sb_vpi[i][s], sb_clp[i][s], b)) ok = 0;
              check(ok, "cell contents intact");
              check(sb_vpi[i][s] == j, "cell left on the output of its VPI");
              check(!sb_seen[i][s], "cell delivered once");
              check(s > last_seq[i][j], "flow order kept");
              sb_seen[i][s] = 1;
              last_seq[i][j] = s;
              n_delivered++;
              if (sb_arr[i][s] < max_arr_out[j]) n_reorder++;
              if (sb_arr[i][s] > max_arr_out[j]) max_arr_out[j] = sb_arr[i][s];
              if (sb_ph[i][s] == 1) begin
                check(rx_sop_t[j] - sb_sent_t[i][s] == 64, "unblocked latency 64 cycles");
                if (last_sop_t[j] >= 0)
                  check(rx_sop_t[j] - last_sop_t[j] == SLOT_CYCLES,
                        $sformatf("one cell per slot per output (%0d)", rx_sop_t[j] - last_sop_t[j]));
                lat_checked++;
              end
              last_sop_t[j] = rx_sop_t[j];
            end
          end
        end
      end
    end
  end

  initial begin
    int pst;
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = 0; in_sop[i] = 0; in_data[i] = '0;
      seq_next[i] = 0; arr_cnt[i] = 0; rx_b[i] = ATM_BYTES; max_arr_out[i] = -1;
      last_sop_t[i] = -1;
      for (int j = 0; j < NP; j++) last_seq[i][j] = -1;
    end
    for (int k = 0; k < KS; k++) stage_del[k] = 0;
    tbl_we = 0; tbl_en = 0; tbl_in = '0; tbl_port = '0; tbl_addr = '0;
    rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    // the switch leaves reset two clock edges after rst_n rises
    repeat (3) @(negedge clk);
    // routing tables: VPI v -> output v for v = 0..7 on every input
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NP; v++) begin
        @(negedge clk);
        tbl_we = 1; tbl_en = 1; tbl_in = port_t'(i); tbl_addr = byte_t'(v); tbl_port = port_t'(v);
      end
    @(negedge clk);
    tbl_we = 0;
    // align with the next slot
    while (!slot_start) @(negedge clk);
    // slots: phase 1 = 0..19, phase 2 = 20..169, phase 3 = 170..199, drain after
    for (int s = 0; s < 260; s++) begin
      phase = (s < 20) ? 1 : (s < 170) ? 2 : (s < 200) ? 3 : 0;
      // choose this slot's cells
      for (int i = 0; i < NP; i++) begin
        cur_on[i] = 0;
        if (phase == 1) begin
          cur_on[i] = 1; cur_vpi[i] = (i + s) % NP; cur_clp[i] = 0;
        end else if (phase == 2) begin
          cur_on[i] = ($urandom % 10) != 0;
          cur_vpi[i] = (($urandom % 40) == 0) ? 238 : int'($urandom % NP);
          cur_clp[i] = $urandom_range(1, 0) == 1;
        end else if (phase == 3) begin
          cur_on[i] = 1; cur_vpi[i] = 3; cur_clp[i] = $urandom_range(1, 0) == 1;
        end
        if (cur_on[i]) begin
          cur_seq[i] = seq_next[i]++;
          sb_vpi[i][cur_seq[i]] = cur_vpi[i];
          sb_ph[i][cur_seq[i]] = phase;
          sb_clp[i][cur_seq[i]] = cur_clp[i];
          sb_sent_t[i][cur_seq[i]] = cyc;
          sb_seen[i][cur_seq[i]] = 0;
          sb_arr[i][cur_seq[i]] = -1;
          n_sent++;
          if (cur_vpi[i] >= NP) n_unroutable++;
        end
      end
      for (int c = 0; c < SLOT_CYCLES; c++) begin
        if (c == 0) check(slot_start, "slot boundary where expected");
        for (int i = 0; i < NP; i++) begin
          in_valid[i] = cur_on[i] && c < ATM_BYTES;
          in_sop[i]   = cur_on[i] && c == 0;
          in_data[i]  = (cur_on[i] && c < ATM_BYTES) ? gen(i, cur_seq[i], cur_vpi[i], cur_clp[i], c) : 8'h00;
        end
        @(negedge clk);
      end
    end
    for (int i = 0; i < NP; i++) in_valid[i] = 0;
    repeat (100) @(negedge clk);
    $display("sent %0d delivered %0d fabric loss %0d buffer drop %0d unroutable %0d (test %0d)",
             n_sent, n_delivered, cnt_fabric_loss, cnt_buffer_drop, cnt_no_route, n_unroutable);
    $display("deflections %0d, deliveries per stage %0d %0d %0d %0d, reordered %0d",
             cnt_deflect, stage_del[0], stage_del[1], stage_del[2], stage_del[3], n_reorder);
    check(lat_checked == 20 * NP, "all phase-1 cells checked for latency");
    check(int'(cnt_no_route) == n_unroutable, "unroutable count");
    check(n_delivered + int'(cnt_fabric_loss) + int'(cnt_buffer_drop) + int'(cnt_no_route) == n_sent,
          "cells conserved");
    check(stage_del[0] + stage_del[1] + stage_del[2] + stage_del[3] ==
          n_delivered + int'(cnt_buffer_drop), "stage deliveries = buffered + dropped");
    // the hot spot: at most one cell per stage reaches output 3 in a slot
    check(int'(cnt_fabric_loss) >= 30 * (NP - KS), "hot spot loses at least N-K cells per slot");
    // mechanisms
    check(cnt_deflect > 0,     "mechanism: deflection in a banyan");
    check(stage_del[1] > 0 && stage_del[KS-1] > 0, "mechanism: delivery from later stages");
    check(cnt_fabric_loss > 0, "mechanism: loss after the last stage");
    check(cnt_buffer_drop > 0, "mechanism: reorder buffer overflow");
    check(cnt_no_route > 0,    "mechanism: unroutable cell");
    check(n_reorder > 0,       "mechanism: cell overtaking in the reorder buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
