// reorder_buffer_tb: self-checking test of the output reorder buffer
// (K = 4 write ports, 8 cell slots).
//
// Scenario A: a cell with a newer time stamp arrives first, an older one 10
//   cycles later on another port; the older one must leave first, and its
//   first byte must appear two clock edges after its last byte is written.
// Scenario B: two cells with the same time stamp; the high-priority one,
//   although it arrives later, leaves first.
// Scenario C: all four ports deliver back-to-back cells for five slots,
//   more than the buffer can hold; cells refused must be signalled as drops,
//   accepted cells must all come out intact in time-stamp order, back to
//   back at one cell per 53 cycles while a backlog exists.
// Scenario D: random cells on all ports for 40 slots (30 % per port), with time stamps up
//   to two slots old and random priorities. Whenever a cell starts to
//   leave, no other accepted cell that had been completely written by then
//   and is still waiting may have a greater (age, priority); all accepted
//   cells come out intact and exactly once.
module reorder_buffer_tb;
  import atm_pkg::*;

  localparam int K = 4;
  localparam int DEPTH = 8;

  logic  clk = 1'b0;
  logic  rst_n;
  ts_t   now_ts;
  link_t in [K];
  logic  out_valid, out_sop;
  byte_t out_data;
  logic [K-1:0] drop;
  logic [$clog2(DEPTH+1)-1:0] occupancy;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  reorder_buffer #(.K(K), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .now_ts(now_ts), .in(in), .out_valid(out_valid),
    .out_sop(out_sop), .out_data(out_data), .drop(drop), .occupancy(occupancy));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  function automatic byte_t pay(int id, int b);
    return (b == 1) ? byte_t'(id) : byte_t'(id * 13 + b);
  endfunction

  // per-port schedule
  typedef struct { int start; int ts; bit prio; int id; } job_t;
  job_t jobs [K][$];
  int   cur_id [K], cur_b [K];
  int   job_ts [256];
  int   job_last [256];          // iteration in which the last byte was driven
  int   job_prio [256];
  int   job_port [256];
  bit   job_drop [256];
  int   job_out  [256];          // iteration of its first output byte, -1 = not yet
  int   start_id [K];            // cell whose header was driven last on port k
  int   now_hist [4000];

  // output monitor results
  int   out_ids [$];
  int   out_sop_t [$];
  int   rx_id, rx_b, rx_bad;
  int   n_drop;

  initial begin
    int t;
    for (int k = 0; k < K; k++) begin in[k] = LINK_IDLE; cur_id[k] = -1; start_id[k] = -1; end
    for (int i = 0; i < 256; i++) begin job_out[i] = -1; job_drop[i] = 0; job_last[i] = 1 << 30; end
    now_ts = 4'd6;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // A: newer first, older 10 cycles later
    jobs[0].push_back('{start: 0,  ts: 6, prio: 0, id: 1});
    jobs[1].push_back('{start: 10, ts: 5, prio: 0, id: 2});
    // B: same time stamp, high priority arrives later
    jobs[2].push_back('{start: 200, ts: 6, prio: 0, id: 3});
    jobs[3].push_back('{start: 204, ts: 6, prio: 1, id: 4});
    // C: five slots of four back-to-back cells, time stamp = slot number
    for (int r = 0; r < 5; r++)
      for (int k = 0; k < K; k++)
        jobs[k].push_back('{start: 400 + r * SLOT_CYCLES + 3 * k, ts: 8 + r, prio: 0,
                            id: 10 + 4 * r + k});
    // D: random traffic, 30 % per port and slot, stamps 0..2 slots old
    for (int r = 0; r < 40; r++)
      for (int k = 0; k < K; k++)
        if ($urandom_range(9, 0) < 3)
          jobs[k].push_back('{start: 1200 + r * SLOT_CYCLES + 5 * k,
                              ts: (20 + r - int'($urandom_range(2, 0))) % 16,
                              prio: $urandom_range(1, 0) == 1, id: 40 + 4 * r + k});
    rx_id = -1; n_drop = 0;
    for (t = 0; t < 3700; t++) begin
      @(negedge clk);
      // sample what the last edge produced
      if (t < 1200) n_drop += $countones(drop);
      for (int k = 0; k < K; k++) if (drop[k] && start_id[k] >= 0) job_drop[start_id[k]] = 1;
      if (out_valid && out_sop) begin
        check(rx_id < 0, "new cell only after the previous one ended");
        rx_id = int'(out_data); rx_b = 1; rx_bad = 0;
        out_ids.push_back(rx_id);
        out_sop_t.push_back(t);
        check(job_out[rx_id] < 0 && !job_drop[rx_id], "cell leaves once and was accepted");
        job_out[rx_id] = t;
        if (rx_id >= 40) begin
          // the choice was made with the slot number of iteration t-3
          int now, key_c, key_o;
          now = now_hist[t-3];
          key_c = 2 * ((now - job_ts[rx_id]) & 15) + job_prio[rx_id];
          for (int o = 40; o < 256; o++)
            if (o != rx_id && job_out[o] < 0 && !job_drop[o] && job_last[o] <= t - 4) begin
              key_o = 2 * ((now - job_ts[o]) & 15) + job_prio[o];
              check(key_o <= key_c, $sformatf("cell %0d left before older/higher cell %0d", rx_id, o));
            end
        end
      end else if (out_valid) begin
        rx_b++;
        if (out_data != pay(rx_id, rx_b)) rx_bad++;
        if (rx_b == ATM_BYTES) begin
          check(rx_bad == 0, $sformatf("payload of cell %0d intact", rx_id));
          rx_id = -1;
        end
      end
      // time stamp of the current slot in scenario C
      if (t >= 1200)     now_ts = ts_t'(20 + (t - 1200) / SLOT_CYCLES);
      else if (t >= 400) now_ts = ts_t'(8 + (t - 400) / SLOT_CYCLES);
      now_hist[t] = int'(now_ts);
      // drive
      for (int k = 0; k < K; k++) begin
        in[k] = LINK_IDLE;
        if (cur_id[k] < 0 && jobs[k].size() > 0 && jobs[k][0].start == t) begin
          job_t j;
          j = jobs[k].pop_front();
          cur_id[k] = j.id; cur_b[k] = 0;
          job_ts[j.id] = j.ts;
          job_prio[j.id] = int'(j.prio);
          job_port[j.id] = k;
          start_id[k] = j.id;
          in[k] = '{valid: 1'b1, sop: 1'b1, mark: 1'b0,
                    data: byte_t'(local_hdr_t'{dest: 3'd2, prio: j.prio, ts: ts_t'(j.ts)})};
        end else if (cur_id[k] >= 0) begin
          cur_b[k]++;
          in[k] = '{valid: 1'b1, sop: 1'b0, mark: 1'b0, data: pay(cur_id[k], cur_b[k])};
          if (cur_b[k] == ATM_BYTES) begin
            job_last[cur_id[k]] = t;
            cur_id[k] = -1;
          end
        end
      end
    end
    // A
    check(out_ids.size() >= 4, "scenario A/B cells out");
    check(out_ids[0] == 2 && out_ids[1] == 1, "older time stamp leaves first");
    check(out_sop_t[0] == job_last[2] + 3, "store-and-forward latency: 2 edges after last write");
    // B
    check(out_ids[2] == 4 && out_ids[3] == 3, "high priority first on equal time stamps");
    // C
    begin
      int n_c, prev_ts, back_to_back;
      n_c = 0;
      foreach (out_ids[i]) if (out_ids[i] >= 10 && out_ids[i] < 40) n_c++;
      check(n_drop > 0, "overflow produced drops");
      check(n_c + n_drop == 20, $sformatf("accepted + dropped = offered (%0d + %0d)", n_c, n_drop));
      check(n_c >= DEPTH, "buffer filled");
      prev_ts = 0; back_to_back = 0;
      for (int i = 4; i < 4 + n_c; i++) begin
        check(job_ts[out_ids[i]] >= prev_ts, "time-stamp order");
        prev_ts = job_ts[out_ids[i]];
        if (i > 4) begin
          check(out_sop_t[i] - out_sop_t[i-1] >= ATM_BYTES, "no overlap");
          if (out_sop_t[i] - out_sop_t[i-1] == ATM_BYTES) back_to_back++;
        end
      end
      check(back_to_back >= n_c - 2, "back-to-back at 53 cycles per cell under backlog");
      $display("scenario C: %0d out, %0d dropped, %0d back to back", n_c, n_drop, back_to_back);
    end
    begin
      int n_d, n_dd;
      n_d = 0; n_dd = 0;
      for (int o = 40; o < 256; o++)
        if (job_last[o] < (1 << 30)) begin
          if (job_drop[o]) n_dd++;
          else begin
            n_d++;
            check(job_out[o] >= 0, $sformatf("accepted cell %0d left", o));
          end
        end
      check(n_d > 20, "scenario D carried traffic");
      $display("scenario D: %0d cells accepted, %0d dropped", n_d, n_dd);
    end
    check(occupancy == 0, "buffer empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
