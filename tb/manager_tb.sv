// manager_tb: self-checking test of the timing and reset unit.
//
// Checks that the synchronised reset follows the external one
// asynchronously on assertion and two clock edges late on release, that
// slot_start comes every 54 cycles with slot_cyc counting 0..53 in between,
// and that the time stamp advances by one per slot and wraps at 16.
module manager_tb;
  import atm_pkg::*;

  logic clk = 1'b0;
  logic rst_n_ext, rst_n, slot_start;
  logic [$clog2(SLOT_CYCLES)-1:0] slot_cyc;
  ts_t  ts;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  manager dut (.clk(clk), .rst_n_ext(rst_n_ext), .rst_n(rst_n), .slot_start(slot_start),
               .slot_cyc(slot_cyc), .ts(ts));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  initial begin
    int exp_cyc, exp_ts, last_start, n_start;
    rst_n_ext = 1'b0;
    repeat (3) @(negedge clk);
    check(!rst_n && !slot_start, "in reset");
    rst_n_ext = 1'b1;
    @(negedge clk); check(!rst_n, "release delayed, edge 1");
    @(negedge clk); check(rst_n, "released after two edges");
    exp_cyc = 0; exp_ts = 0; last_start = -1; n_start = 0;
    for (int t = 0; t < 20 * SLOT_CYCLES; t++) begin
      check(int'(slot_cyc) == exp_cyc, "slot cycle count");
      check(int'(ts) == exp_ts, "time stamp");
      check(slot_start == (exp_cyc == 0), "slot_start on cycle 0");
      if (slot_start) begin
        if (last_start >= 0) check(t - last_start == SLOT_CYCLES, "54-cycle slot");
        last_start = t;
        n_start++;
      end
      @(negedge clk);
      exp_cyc++;
      if (exp_cyc == SLOT_CYCLES) begin
        exp_cyc = 0;
        exp_ts  = (exp_ts + 1) % 16;
      end
    end
    check(n_start == 20, "20 slots seen");
    // asynchronous assertion in the middle of a cycle
    #2 rst_n_ext = 1'b0;
    #1 check(!rst_n && !slot_start, "reset asserted asynchronously");
    @(negedge clk);
    check(slot_cyc == '0 && ts == '0, "counters cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
