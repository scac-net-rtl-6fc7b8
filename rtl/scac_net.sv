// scac_net -- SCAC-Net, the reconfigurable neighbourhood network of SCAC.
//
// A ROWS x COLS grid of execution nodes, each with its SLCU-COM (COM-Control,
// R-SLCUXnet, R-Xnet). The routers form an X pattern: the R-SLCUXnet of node
// (r,c) connects diagonally to four R-Xnets, those of nodes (r-1,c-1) on its
// NW port, (r-1,c) on NE, (r,c) on SE and (r,c-1) on SW, each time to the
// R-Xnet port facing it. A hop to any of the eight neighbours therefore
// crosses exactly one R-SLCUXnet, one R-Xnet and one more R-SLCUXnet, all
// combinational, in one clock cycle.
//
// One broadcast micro-instruction (SEND or RECEIVE, direction, distance)
// starts every node's COM-Control in the same cycle. All words move one hop
// per cycle in the same direction, every node's register serving as a
// pipeline stage, so no buffering or congestion control is needed; after
// Dist hops each node stores the word that arrived in its R_COM (see
// com_control for the activity-bit rules). One transfer takes
// NSLICE * (Dist + 2) cycles, NSLICE = 1 for the default 16+1-bit links.
//
// Generic parameters, as in the document: topology and bus size. TOPO
// selects TORUS or MESH (2D) or RING or LINEAR (1D, ROWS must be 1); BUS_W
// is 16, 4 or 1. Defaults are the 4x4 torus with 16+1-bit links used for the
// document's 2D FIR and parallel-summing runs. The X wiring is always the
// wrapped one; for MESH and LINEAR the R-Xnets block paths across the
// column seam, and for every topology but TORUS across the row seam (for a
// 1D network this leaves only east and west moves). That seam mechanism is
// this design's own way of realising the four topologies.
//
// Interface: instr_valid / instr / instr_ready (node 0 speaks for all, they
// run in lockstep), per-node active, data_in, rcom, rcom_wr, node index
// r*COLS + c; done is high in the last cycle of a transfer.
module scac_net
  import scac_pkg::*;
#(
  parameter int unsigned ROWS   = 4,
  parameter int unsigned COLS   = 4,
  parameter topo_e       TOPO   = TOPO_TORUS,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned BUS_W  = 16,
  localparam int unsigned NODES  = ROWS * COLS,
  localparam int unsigned LINK_W = (BUS_W == 1) ? 1 : BUS_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              instr_valid,
  input  com_instr_t        instr,
  output logic              instr_ready,
  input  logic              active  [NODES],
  input  logic [DATA_W-1:0] data_in [NODES],
  output logic [DATA_W-1:0] rcom    [NODES],
  output logic              rcom_wr [NODES],
  output logic              done
);

  if ((TOPO == TOPO_LINEAR || TOPO == TOPO_RING) && ROWS != 1) begin : g_bad_1d
    $error("scac_net: a 1D topology needs ROWS == 1");
  end

  localparam logic CUT_ROW = (TOPO != TOPO_TORUS);
  localparam logic CUT_COL = (TOPO == TOPO_MESH) || (TOPO == TOPO_LINEAR);

  function automatic int unsigned node_at(int r, int c);
    return int'(((r + ROWS) % ROWS) * COLS + ((c + COLS) % COLS));
  endfunction

  logic [LINK_W-1:0] sx_out [NODES][4];
  logic [LINK_W-1:0] sx_in  [NODES][4];
  logic [LINK_W-1:0] xn_in  [NODES][4];
  logic [LINK_W-1:0] xn_out [NODES][4];
  logic              ready  [NODES];
  logic              ndone  [NODES];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned N = r * COLS + c;
      // R-Xnet ports whose SLCU lies across the row / column seam
      localparam logic [3:0] EROW = (r == ROWS - 1) ? 4'b1100 : 4'b0000;
      localparam logic [3:0] ECOL = (c == COLS - 1) ? 4'b0110 : 4'b0000;

      slcu_com #(
        .DATA_W(DATA_W), .BUS_W(BUS_W),
        .XN_EDGE_ROW(EROW), .XN_EDGE_COL(ECOL)
      ) u_node (
        .clk, .rst_n,
        .instr_valid, .instr,
        .instr_ready (ready[N]),
        .active      (active[N]),
        .data_in     (data_in[N]),
        .rcom        (rcom[N]),
        .rcom_wr     (rcom_wr[N]),
        .done        (ndone[N]),
        .cut_row     (CUT_ROW),
        .cut_col     (CUT_COL),
        .sx_out      (sx_out[N]),
        .sx_in       (sx_in[N]),
        .xn_in       (xn_in[N]),
        .xn_out      (xn_out[N])
      );

      // R-SLCUXnet ports of this node <- facing R-Xnet ports
      assign sx_in[N][PORT_NW] = xn_out[node_at(r - 1, c - 1)][PORT_SE];
      assign sx_in[N][PORT_NE] = xn_out[node_at(r - 1, c    )][PORT_SW];
      assign sx_in[N][PORT_SE] = xn_out[node_at(r,     c    )][PORT_NW];
      assign sx_in[N][PORT_SW] = xn_out[node_at(r,     c - 1)][PORT_NE];

      // R-Xnet ports of this node <- facing R-SLCUXnet ports
      assign xn_in[N][PORT_NW] = sx_out[node_at(r,     c    )][PORT_SE];
      assign xn_in[N][PORT_NE] = sx_out[node_at(r,     c + 1)][PORT_SW];
      assign xn_in[N][PORT_SE] = sx_out[node_at(r + 1, c + 1)][PORT_NW];
      assign xn_in[N][PORT_SW] = sx_out[node_at(r + 1, c    )][PORT_NE];
    end
  end

  assign instr_ready = ready[0];
  assign done        = ndone[0];

  // Every node runs the same instruction in the same cycles.
  for (genvar n = 1; n < NODES; n++) begin : g_lockstep
    a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
      (ndone[n] == ndone[0]) && (ready[n] == ready[0]));
  end

endmodule
