// cell_loss_tb: cell loss against the number of banyan stages.
//
// Four 8x8 switches with K = 1, 2, 3 and 4 banyan stages receive the same
// uniform random traffic, first at full load (every input sends a cell in
// every slot, destinations uniform) and then at 40 % load. Because a banyan
// stage never depends on the stages after it, the first stages of all four
// switches behave identically, so the cells lost after the last stage must
// fall strictly as K grows (every stage delivers at least one of the cells
// it is given) and must be fewer at the lower load. For every switch the
// cells offered must equal cells delivered + lost in the fabric + dropped
// by a full output buffer. The loss ratios are printed per K and load,
// the 8-port counterpart of loss-against-stages curves for larger switches.
// The full-load loss of the single banyan (K = 1) is also held against the
// usual independent-link estimate for a 3-column banyan, about 48 %.
module cell_loss_tb;
  import atm_pkg::*;

  localparam int NP = N_PORTS;
  localparam int NSW = 4;
  localparam int SLOTS = 1000;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  slot_start [NSW];
  ts_t   slot_ts    [NSW];
  logic  in_valid [NP], in_sop [NP];
  byte_t in_data  [NP];
  logic  tbl_we, tbl_en;
  port_t tbl_in, tbl_port;
  byte_t tbl_addr;
  logic  out_valid [NSW][NP], out_sop [NSW][NP];
  byte_t out_data  [NSW][NP];
  logic [31:0] c_nr [NSW], c_df [NSW], c_fl [NSW], c_bd [NSW];
  int    n_out [NSW];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar w = 0; w < NSW; w++) begin : g_sw
    tandem_banyan_switch #(.K(w + 1)) dut (
      .clk(clk), .rst_n(rst_n), .slot_start(slot_start[w]), .slot_ts(slot_ts[w]),
      .in_valid(in_valid), .in_sop(in_sop), .in_data(in_data),
      .tbl_we(tbl_we), .tbl_in(tbl_in), .tbl_addr(tbl_addr), .tbl_en(tbl_en), .tbl_port(tbl_port),
      .out_valid(out_valid[w]), .out_sop(out_sop[w]), .out_data(out_data[w]),
      .cnt_no_route(c_nr[w]), .cnt_deflect(c_df[w]),
      .cnt_fabric_loss(c_fl[w]), .cnt_buffer_drop(c_bd[w]));
    always @(posedge clk)
      if (rst_n) for (int j = 0; j < NP; j++) if (out_valid[w][j] && out_sop[w][j]) n_out[w]++;
  end

  initial begin : watchdog
    repeat (3 * SLOTS * SLOT_CYCLES) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int loss [2][NSW];
    int sent [2];
    int pct;
    bit on [NP];
    int vpi [NP];
    for (int w = 0; w < NSW; w++) n_out[w] = 0;
    for (int i = 0; i < NP; i++) begin in_valid[i] = 0; in_sop[i] = 0; in_data[i] = '0; end
    tbl_we = 0; tbl_en = 0; tbl_in = '0; tbl_port = '0; tbl_addr = '0;
    rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NP; v++) begin
        @(negedge clk);
        tbl_we = 1; tbl_en = 1; tbl_in = port_t'(i); tbl_addr = byte_t'(v); tbl_port = port_t'(v);
      end
    @(negedge clk);
    tbl_we = 0;
    while (!slot_start[0]) @(negedge clk);
    for (int ph = 0; ph < 2; ph++) begin
      int base [NSW];
      pct = (ph == 0) ? 100 : 40;
      for (int w = 0; w < NSW; w++) base[w] = int'(c_fl[w]);
      sent[ph] = 0;
      for (int s = 0; s < SLOTS; s++) begin
        for (int i = 0; i < NP; i++) begin
          on[i]  = int'($urandom % 100) < pct;
          vpi[i] = int'($urandom % NP);
          if (on[i]) sent[ph]++;
        end
        for (int c = 0; c < SLOT_CYCLES; c++) begin
          for (int i = 0; i < NP; i++) begin
            in_valid[i] = on[i] && c < ATM_BYTES;
            in_sop[i]   = on[i] && c == 0;
            in_data[i]  = (c == 0) ? byte_t'(vpi[i] >> 4) :
                          (c == 1) ? byte_t'((vpi[i] & 15) << 4) : byte_t'(c + i);
          end
          @(negedge clk);
        end
      end
      // let the last cells clear the fabric
      for (int i = 0; i < NP; i++) in_valid[i] = 0;
      repeat (2 * SLOT_CYCLES) @(negedge clk);
      for (int w = 0; w < NSW; w++) loss[ph][w] = int'(c_fl[w]) - base[w];
      for (int w = 0; w < NSW; w++)
        $display("load %0d%%: K=%0d lost in fabric %0d of %0d cells (%0d per 10000)",
                 pct, w + 1, loss[ph][w], sent[ph], loss[ph][w] * 10000 / sent[ph]);
      for (int w = 1; w < NSW; w++)
        check(loss[ph][w] < loss[ph][w-1] || loss[ph][w-1] == 0,
              $sformatf("load %0d%%: loss falls from K=%0d to K=%0d", pct, w, w + 1));
      check(loss[ph][0] > 0, "a single banyan loses cells");
      // A single 8x8 banyan under uniform traffic: a link carries a cell with
      // probability p(c+1) = 1 - (1 - p(c)/2)^2 after each of the 3 columns,
      // so at full load 0.75, 0.609, 0.517: about 48 % of the cells are lost.
      if (ph == 0)
        check(loss[0][0] * 1000 >= 440 * sent[0] && loss[0][0] * 1000 <= 530 * sent[0],
              "single-banyan loss near the analytic 48 % at full load");
    end
    repeat (20 * SLOT_CYCLES) @(negedge clk);
    for (int w = 0; w < NSW; w++) begin
      check(loss[1][w] * sent[0] < loss[0][w] * sent[1] || loss[0][w] == 0,
            $sformatf("K=%0d: lower load, lower loss ratio", w + 1));
      check(n_out[w] + int'(c_fl[w]) + int'(c_bd[w]) == sent[0] + sent[1],
            $sformatf("K=%0d: cells conserved", w + 1));
      check(c_nr[w] == 0, "all cells routable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
