// input_controller: packet filter behind one banyan network.
//
// Looks at the N_PORTS outputs of one banyan stage. A cell on output j that
// is unmarked and addressed to port j has been switched: it is sent to the
// reorder buffer of output j (to_buf[j]). Every other cell on output j was
// blocked somewhere in this banyan network: its mark is cleared and it is
// handed to input j of the next banyan network (to_next[j]); behind the last
// stage these are the cells the fabric loses. The decision is taken on the
// header byte and held for the rest of the cell.
//
// The design description gives the function (filter the switched cells of
// one banyan stage's output to the output buffers, forward blocked cells to
// the next stage); the mark test and the clearing of the mark are this
// design's implementation of it.
//
// Timing: one register stage. delivered[j] / forwarded[j] pulse with the
// header byte of a cell leaving on to_buf[j] / to_next[j].
module input_controller
  import atm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in      [N_PORTS],
  output link_t to_buf  [N_PORTS],
  output link_t to_next [N_PORTS],
  output logic [N_PORTS-1:0] delivered,
  output logic [N_PORTS-1:0] forwarded
);

  logic [N_PORTS-1:0] keep_q;   // current cell on port j goes to the buffer

  for (genvar j = 0; j < N_PORTS; j++) begin : g_port
    local_hdr_t hdr;
    logic       new_cell, ok, keep_c;

    assign hdr      = local_hdr_t'(in[j].data);
    assign new_cell = in[j].valid && in[j].sop;
    assign ok       = !in[j].mark && (hdr.dest == port_t'(j));
    assign keep_c   = new_cell ? ok : keep_q[j];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        keep_q[j]    <= 1'b0;
        to_buf[j]    <= LINK_IDLE;
        to_next[j]   <= LINK_IDLE;
        delivered[j] <= 1'b0;
        forwarded[j] <= 1'b0;
      end else begin
        keep_q[j]    <= keep_c;
        delivered[j] <= new_cell && ok;
        forwarded[j] <= new_cell && !ok;
        if (in[j].valid && keep_c) begin
          to_buf[j]  <= in[j];
          to_next[j] <= LINK_IDLE;
        end else if (in[j].valid) begin
          to_buf[j]  <= LINK_IDLE;
          to_next[j] <= '{valid: 1'b1, sop: in[j].sop, mark: 1'b0, data: in[j].data};
        end else begin
          to_buf[j]  <= LINK_IDLE;
          to_next[j] <= LINK_IDLE;
        end
      end
    end
  end

endmodule
