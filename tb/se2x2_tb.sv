// se2x2_tb: self-checking test of the 2x2 switching element.
//
// Sends short cells (header + 4 bytes) through one element that steers on
// header bit 5 (destination bit 0) and checks, one cycle later, which input
// appears on each output, the mark bits, the payload bytes held through the
// cell, and the deflect pulse. Cases: single cells, two cells without
// contention, contention decided by priority, by mark, and by the
// round-robin tie break on two successive ties.
module se2x2_tb;
  import atm_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  link_t in  [2];
  link_t out [2];
  logic  deflect;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  se2x2 #(.BIT(0)) dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out), .deflect(deflect));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte_t hdr(logic dbit, logic prio);
    local_hdr_t h;
    h = '{dest: {2'b10, dbit}, prio: prio, ts: 4'h5};
    return byte_t'(h);
  endfunction

  function automatic byte_t pay(int src, int b);
    return byte_t'(8'h10 * (src + 1) + b);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // exp_src[o] = input expected on output o (-1 = idle); exp_mark[o]
  task automatic run(logic v0, logic v1, logic d0, logic d1, logic p0, logic p1,
                     logic m0, logic m1, int e0, int e1, logic em0, logic em1,
                     logic exp_defl, string name);
    int esrc [2];
    logic emk [2];
    esrc[0] = e0; esrc[1] = e1; emk[0] = em0; emk[1] = em1;
    // byte b is driven at one falling edge and checked at the next
    for (int b = 0; b <= 5; b++) begin
      @(negedge clk);
      if (b > 0) begin
        int c;
        c = b - 1;
        for (int o = 0; o < 2; o++) begin
          if (esrc[o] < 0) begin
            check(!out[o].valid, $sformatf("%s out%0d idle", name, o));
          end else begin
            check(out[o].valid && out[o].sop == (c == 0),
                  $sformatf("%s out%0d valid/sop byte %0d", name, o, c));
            check(out[o].data == (c == 0 ? (esrc[o] == 0 ? hdr(d0, p0) : hdr(d1, p1))
                                         : pay(esrc[o], c)),
                  $sformatf("%s out%0d data byte %0d", name, o, c));
            check(out[o].mark == emk[o], $sformatf("%s out%0d mark byte %0d", name, o, c));
          end
        end
        if (c == 0) check(deflect == exp_defl, $sformatf("%s deflect", name));
      end
      if (b < 5) begin
        in[0] = '{valid: v0, sop: b == 0, mark: m0, data: b == 0 ? hdr(d0, p0) : pay(0, b)};
        in[1] = '{valid: v1, sop: b == 0, mark: m1, data: b == 0 ? hdr(d1, p1) : pay(1, b)};
      end else begin
        in[0] = LINK_IDLE;
        in[1] = LINK_IDLE;
      end
    end
    @(negedge clk);
  endtask

  initial begin
    in[0] = LINK_IDLE; in[1] = LINK_IDLE;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    //    v0 v1 d0 d1 p0 p1 m0 m1  out0 out1 mk0 mk1 defl
    run(1, 0, 0, 0, 0, 0, 0, 0,   0, -1,  0, 0, 0, "single in0->0");
    run(1, 0, 1, 0, 0, 0, 0, 0,  -1,  0,  0, 0, 0, "single in0->1");
    run(0, 1, 0, 0, 0, 0, 0, 0,   1, -1,  0, 0, 0, "single in1->0");
    run(0, 1, 0, 1, 0, 0, 0, 0,  -1,  1,  0, 0, 0, "single in1->1");
    run(1, 1, 0, 1, 0, 0, 0, 0,   0,  1,  0, 0, 0, "straight");
    run(1, 1, 1, 0, 0, 0, 0, 0,   1,  0,  0, 0, 0, "cross");
    run(1, 1, 0, 0, 0, 1, 0, 0,   1,  0,  0, 1, 1, "prio in1 wins");
    run(1, 1, 1, 1, 1, 0, 0, 0,   1,  0,  1, 0, 1, "prio in0 wins");
    run(1, 1, 1, 1, 1, 1, 1, 0,   0,  1,  1, 0, 1, "unmarked in1 beats marked prio");
    run(1, 1, 0, 0, 1, 0, 1, 1,   0,  1,  1, 1, 1, "both marked, prio in0");
    run(1, 1, 0, 0, 0, 0, 0, 0,   0,  1,  0, 1, 1, "tie 1: in0 wins");
    run(1, 1, 0, 0, 0, 0, 0, 0,   1,  0,  0, 1, 1, "tie 2: in1 wins");
    run(1, 1, 1, 1, 0, 0, 0, 0,   1,  0,  1, 0, 1, "tie 3: in0 wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
