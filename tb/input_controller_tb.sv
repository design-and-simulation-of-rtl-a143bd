// input_controller_tb: self-checking test of the packet filter behind one
// banyan stage.
//
// Drives random short cells (header + 3 bytes) on all eight inputs with
// random destination and mark bits and checks one cycle later that a cell
// goes to the output buffer link exactly when it is unmarked and addressed
// to its port, and otherwise to the next-stage link with its mark cleared,
// with the bytes and pulses that go with it.
module input_controller_tb;
  import atm_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  link_t in      [N_PORTS];
  link_t to_buf  [N_PORTS];
  link_t to_next [N_PORTS];
  logic [N_PORTS-1:0] delivered, forwarded;
  int    checks = 0, failures = 0;
  int    n_buf = 0, n_next = 0;

  always #5 clk = ~clk;

  input_controller dut (.clk(clk), .rst_n(rst_n), .in(in), .to_buf(to_buf),
                        .to_next(to_next), .delivered(delivered), .forwarded(forwarded));

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

  initial begin
    bit    v [N_PORTS], mk [N_PORTS], keep [N_PORTS];
    int    d [N_PORTS];
    link_t drv [N_PORTS];
    for (int p = 0; p < N_PORTS; p++) in[p] = LINK_IDLE;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      for (int p = 0; p < N_PORTS; p++) begin
        v[p]  = ($urandom % 5) != 0;
        mk[p] = ($urandom % 3) == 0;
        d[p]  = ($urandom_range(1, 0) == 1) ? p : int'($urandom % N_PORTS);
        keep[p] = !mk[p] && (d[p] == p);
      end
      for (int t = 0; t <= 4; t++) begin
        @(negedge clk);
        if (t > 0) begin
          for (int p = 0; p < N_PORTS; p++) begin
            if (!v[p]) begin
              check(!to_buf[p].valid && !to_next[p].valid, "idle port stays idle");
            end else if (keep[p]) begin
              check(to_buf[p] == drv[p] && !to_next[p].valid, "switched cell to buffer");
              if (t == 1) begin
                check(delivered[p] && !forwarded[p], "delivered pulse");
                n_buf++;
              end
            end else begin
              check(!to_buf[p].valid && to_next[p].valid && !to_next[p].mark &&
                    to_next[p].sop == drv[p].sop && to_next[p].data == drv[p].data,
                    "blocked cell to next stage, unmarked");
              if (t == 1) begin
                check(forwarded[p] && !delivered[p], "forwarded pulse");
                n_next++;
              end
            end
            if (t > 1) check(!delivered[p] && !forwarded[p], "pulses only on header");
          end
        end
        for (int p = 0; p < N_PORTS; p++) begin
          if (t < 4 && v[p])
            drv[p] = '{valid: 1'b1, sop: t == 0, mark: mk[p],
                       data: (t == 0) ? byte_t'(local_hdr_t'{dest: port_t'(d[p]), prio: 1'b0, ts: 4'h1})
                                      : byte_t'($urandom)};
          else
            drv[p] = LINK_IDLE;
          in[p] = drv[p];
        end
      end
    end
    check(n_buf > 0 && n_next > 0, "both directions exercised");
    $display("to buffer %0d, to next stage %0d", n_buf, n_next);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
