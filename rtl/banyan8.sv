// banyan8: 8x8 self-routing banyan network built from 2x2 elements.
//
// Three columns of four se2x2 elements, each column preceded by a perfect
// shuffle of the eight links (an omega network). Column c steers on
// destination bit 2-c of the local header, most significant bit first, so
// an unblocked cell leaves on the output whose number equals its
// destination whatever input it entered. Blocked cells leave on some other
// output with their mark bit set.
//
// The design description builds the 8x8 banyan network from 2x2 switching
// elements; the omega (shuffle-exchange) wiring is this design's choice of
// banyan topology.
//
// Timing: one register per column, so cells come out 3 cycles after they
// go in. deflect[c] pulses when some element in column c deflects a cell.
module banyan8
  import atm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in  [N_PORTS],
  output link_t out [N_PORTS],
  output logic [BANYAN_COLS-1:0] deflect
);

  // col_in[c] : links after the shuffle in front of column c
  // col_out[c]: links leaving column c
  link_t col_in  [BANYAN_COLS][N_PORTS];
  link_t col_out [BANYAN_COLS][N_PORTS];

  // perfect shuffle: link p goes to position rotate-left(p)
  function automatic int unsigned shuffle(int unsigned p);
    return ((p << 1) | (p >> (PORT_W - 1))) & (N_PORTS - 1);
  endfunction

  for (genvar c = 0; c < BANYAN_COLS; c++) begin : g_col
    logic [N_PORTS/2-1:0] se_defl;
    for (genvar p = 0; p < N_PORTS; p++) begin : g_shuf
      if (c == 0) begin : g_first
        assign col_in[c][shuffle(p)] = in[p];
      end else begin : g_next
        assign col_in[c][shuffle(p)] = col_out[c-1][p];
      end
    end
    for (genvar s = 0; s < N_PORTS/2; s++) begin : g_se
      se2x2 #(.BIT(PORT_W - 1 - c)) u_se (
        .clk     (clk),
        .rst_n   (rst_n),
        .in      (col_in[c][2*s +: 2]),
        .out     (col_out[c][2*s +: 2]),
        .deflect (se_defl[s])
      );
    end
    assign deflect[c] = |se_defl;
  end

  assign out = col_out[BANYAN_COLS-1];

endmodule
