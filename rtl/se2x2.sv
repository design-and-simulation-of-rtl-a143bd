// se2x2: self-routing 2x2 switching element of a banyan network.
//
// When the local headers of a new cell slot arrive (sop), each valid cell
// asks for output dest[BIT] of its header (0 = upper, 1 = lower). The element
// picks a straight or crossed setting and holds it for the rest of the cell.
// If both cells ask for the same output, one wins and the other is sent to
// the other output with its mark bit set: it is a blocked cell, which the
// input controller after this banyan network hands on to the next banyan
// network. The winner is chosen by, in this order: an unmarked cell beats a
// marked one, a high-priority cell beats a low-priority one, and between
// equals a round-robin bit that flips at every tie.
//
// The design description names the 2x2 element as the building block of the
// banyan network and describes blocked cells being passed on to the next
// stage; deflect-and-mark, the rank order and the round-robin tie break are
// this design's choices, following the usual tandem banyan scheme.
//
// Timing: one register stage; out follows in by one cycle. deflect pulses
// for one cycle (aligned with the output header) when a cell is deflected.
module se2x2
  import atm_pkg::*;
#(
  parameter int unsigned BIT = 0   // header destination bit that steers this element
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in  [2],
  output link_t out [2],
  output logic  deflect
);

  logic       new_cell;
  logic [1:0] req, rank0, rank1;
  logic       cross_new, cross_q, cross_c;
  logic [1:0] defl_new, defl_q, defl_c;   // per output: cell there was deflected
  logic       rr_q, tie;
  local_hdr_t h0, h1;

  assign h0       = local_hdr_t'(in[0].data);
  assign h1       = local_hdr_t'(in[1].data);
  assign new_cell = (in[0].valid && in[0].sop) || (in[1].valid && in[1].sop);
  assign req      = {h1.dest[BIT], h0.dest[BIT]};
  assign rank0    = {~in[0].mark, h0.prio};
  assign rank1    = {~in[1].mark, h1.prio};
  assign tie      = in[0].valid && in[1].valid && (req[0] == req[1]) && (rank0 == rank1);

  always_comb begin
    cross_new = 1'b0;
    defl_new  = 2'b00;
    if (in[0].valid && in[1].valid) begin
      if (req[0] != req[1]) begin
        cross_new = req[0];
      end else begin
        // contention for output req[0]
        if ((rank0 > rank1) || ((rank0 == rank1) && !rr_q)) begin
          cross_new = req[0];            // input 0 wins
        end else begin
          cross_new = ~req[1];           // input 1 wins
        end
        defl_new[~req[0]] = 1'b1;        // the loser leaves on the other output
      end
    end else if (in[0].valid) begin
      cross_new = req[0];
    end else if (in[1].valid) begin
      cross_new = ~req[1];
    end
  end

  assign cross_c = new_cell ? cross_new : cross_q;
  assign defl_c  = new_cell ? defl_new  : defl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cross_q <= 1'b0;
      defl_q  <= 2'b00;
      rr_q    <= 1'b0;
      out[0]  <= LINK_IDLE;
      out[1]  <= LINK_IDLE;
      deflect <= 1'b0;
    end else begin
      cross_q <= cross_c;
      defl_q  <= defl_c;
      if (new_cell && tie) rr_q <= ~rr_q;
      deflect <= new_cell && (defl_new != 2'b00);
      for (int o = 0; o < 2; o++) begin
        out[o]      <= in[o ^ int'(cross_c)];
        out[o].mark <= in[o ^ int'(cross_c)].mark | defl_c[o];
      end
    end
  end

  // Cells of one slot enter a banyan network together.
  a_sop_together: assert property (@(posedge clk) disable iff (!rst_n)
      (in[0].valid && in[1].valid) |-> (in[0].sop == in[1].sop));

endmodule
