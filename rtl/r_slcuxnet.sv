// r_slcuxnet -- R-SLCUXnet, the router next to each node's SLCU.
//
// A couple of 4:1 demux/mux between the local SLCU and the four diagonal
// ports (0 = NW, 1 = NE, 2 = SE, 3 = SW). The demux puts the local word on the
// port given by the R-SLCUXnet column of the direction table; the mux takes
// the incoming word from the port opposite to the one the R-Xnet column names,
// which is where the word for this direction arrives. Each side has one
// arbiter (fixed priority, this design's choice), so the block has the four
// inputs, four outputs and two arbiters the document lists. Unselected
// outputs, and everything while the ports are closed, are driven to zero.
// Purely combinational.
//
// Interface: open, dir, local_tx (word from the node register), port_in /
// port_out (one LINK_W-bit link per port), local_rx (word to the node).
module r_slcuxnet
  import scac_pkg::*;
#(
  parameter int unsigned LINK_W = 17
) (
  input  logic              open,
  input  dir_e              dir,
  input  logic [LINK_W-1:0] local_tx,
  output logic [LINK_W-1:0] port_out [4],
  input  logic [LINK_W-1:0] port_in  [4],
  output logic [LINK_W-1:0] local_rx
);

  logic [3:0] tx_req, tx_gnt;   // demux side
  logic [3:0] rx_req, rx_gnt;   // mux side

  always_comb begin
    tx_req = '0;
    rx_req = '0;
    if (open) begin
      tx_req[slcu_tx_port(dir)] = 1'b1;
      rx_req[slcu_rx_port(dir)] = 1'b1;
    end
  end

  fixed_prio_arb #(.N(4)) u_tx_arb (.req(tx_req), .gnt(tx_gnt));
  fixed_prio_arb #(.N(4)) u_rx_arb (.req(rx_req), .gnt(rx_gnt));

  always_comb begin
    local_rx = '0;
    for (int p = 0; p < 4; p++) begin
      port_out[p] = tx_gnt[p] ? local_tx : '0;
      if (rx_gnt[p]) local_rx = port_in[p];
    end
  end

endmodule
