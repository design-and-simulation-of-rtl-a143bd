// banyan8_tb: self-checking test of the 8x8 banyan network.
//
// Sends slots of short cells (header + 4 payload bytes naming the input)
// through the network and checks, for every slot:
//   - the header leaves exactly 3 cycles after it entered;
//   - every input cell leaves on exactly one output, payload intact;
//   - an unmarked cell leaves on the output equal to its destination;
//   - a cell whose ideal path (worked out here from the shuffle-exchange
//     routing rule) shares no internal link with another cell's ideal path
//     arrives unmarked;
//   - cyclic-shift and identity permutations pass without any blocking;
//   - of two cells fighting for one link, the high-priority one passes.
module banyan8_tb;
  import atm_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  link_t in  [N_PORTS];
  link_t out [N_PORTS];
  logic [BANYAN_COLS-1:0] deflect;
  int    checks = 0, failures = 0;
  int    blocked_slots = 0;

  always #5 clk = ~clk;

  banyan8 dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out), .deflect(deflect));

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

  // link position of a cell from input p to destination d after column c
  function automatic int pos_after(int p, int d, int c);
    int pos;
    pos = p;
    for (int i = 0; i <= c; i++) begin
      pos = ((pos << 1) | (pos >> 2)) & 7;          // perfect shuffle
      pos = (pos & 6) | ((d >> (2 - i)) & 1);       // exchange by dest bit
    end
    return pos;
  endfunction

  // one slot; returns number of marked cells seen at the outputs
  task automatic slot(bit v [N_PORTS], int d [N_PORTS], bit pr [N_PORTS], output int nmarked);
    link_t obs [9][N_PORTS];
    bit    clean [N_PORTS];
    int    seen  [N_PORTS];
    // ideal-path conflict analysis
    for (int p = 0; p < N_PORTS; p++) begin
      clean[p] = 1'b1;
      seen[p]  = 0;
      for (int q = 0; q < N_PORTS; q++)
        if (q != p && v[p] && v[q])
          for (int c = 0; c < 3; c++)
            if (pos_after(p, d[p], c) == pos_after(q, d[q], c)) clean[p] = 1'b0;
    end
    for (int t = 0; t < 9; t++) begin
      @(negedge clk);
      obs[t] = out;
      for (int p = 0; p < N_PORTS; p++) begin
        if (t < 5 && v[p]) begin
          in[p].valid = 1'b1;
          in[p].sop   = (t == 0);
          in[p].mark  = 1'b0;
          in[p].data  = (t == 0) ? byte_t'(local_hdr_t'{dest: port_t'(d[p]), prio: pr[p], ts: 4'h3})
                                 : byte_t'({p[3:0], t[3:0]});
        end else begin
          in[p] = LINK_IDLE;
        end
      end
    end
    @(negedge clk);
    nmarked = 0;
    for (int o = 0; o < N_PORTS; o++) begin
      check(!obs[2][o].valid, "nothing before 3 cycles");
      if (obs[3][o].valid) begin
        local_hdr_t h;
        int src;
        h   = local_hdr_t'(obs[3][o].data);
        src = int'(obs[4][o].data[7:4]);
        check(obs[3][o].sop, "sop on header");
        check(src < N_PORTS && v[src], "output carries a real cell");
        if (src < N_PORTS) begin
          seen[src]++;
          check(int'(h.dest) == d[src], "header belongs to payload source");
        end
        for (int b = 1; b < 5; b++)
          check(obs[3+b][o].valid && !obs[3+b][o].sop &&
                obs[3+b][o].data == byte_t'({src[3:0], b[3:0]}) &&
                obs[3+b][o].mark == obs[3][o].mark, "payload follows header");
        if (!obs[3][o].mark) check(int'(h.dest) == o, "unmarked cell at its destination");
        else nmarked++;
        if (src < N_PORTS && clean[src]) check(!obs[3][o].mark, "conflict-free cell unmarked");
      end
    end
    for (int p = 0; p < N_PORTS; p++) check(seen[p] == (v[p] ? 1 : 0), "each cell leaves once");
  endtask

  initial begin
    bit v [N_PORTS];
    int d [N_PORTS];
    bit pr [N_PORTS];
    int nm;
    for (int p = 0; p < N_PORTS; p++) in[p] = LINK_IDLE;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // cyclic shifts (identity included) are passed by the omega network
    for (int s = 0; s < N_PORTS; s++) begin
      for (int p = 0; p < N_PORTS; p++) begin
        v[p] = 1; d[p] = (p + s) % N_PORTS; pr[p] = 0;
      end
      slot(v, d, pr, nm);
      check(nm == 0, $sformatf("shift %0d unblocked", s));
    end
    // inputs 0 and 4 both to output 0 share the first link: priority decides
    for (int hp = 0; hp < 2; hp++) begin
      for (int p = 0; p < N_PORTS; p++) begin v[p] = 0; d[p] = 0; pr[p] = 0; end
      v[0] = 1; v[4] = 1; pr[hp == 0 ? 0 : 4] = 1;
      slot(v, d, pr, nm);
      check(nm == 1, "one of two cells blocked");
    end
    // random traffic
    for (int n = 0; n < 300; n++) begin
      for (int p = 0; p < N_PORTS; p++) begin
        v[p] = ($urandom % 4) != 0; d[p] = $urandom % N_PORTS; pr[p] = $urandom_range(1, 0) == 1;
      end
      slot(v, d, pr, nm);
      if (nm > 0) blocked_slots++;
    end
    check(blocked_slots > 0, "random traffic produced blocking");
    $display("random slots with blocking: %0d of 300", blocked_slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
