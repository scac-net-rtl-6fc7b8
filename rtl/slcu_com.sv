// slcu_com -- SLCU-COM, the communication module of one execution node.
//
// Holds the node's COM-Control and its couple of routers: the R-SLCUXnet,
// attached to the node's own SLCU, and the R-Xnet that sits south-east of
// it between four SLCUs (this node, its east, south and south-east
// neighbours). Both routers take their direction and their open signal from
// this node's COM-Control; since every node runs the same instruction in
// lockstep, the R-Xnet sees the same configuration as all four SLCUs around
// it. The composition follows the document; the placement of the R-Xnet
// south-east of its SLCU follows the network drawing.
//
// Interface: the instruction, local word, activity bit and R_COM signals of
// com_control; sx_out / sx_in are the four diagonal links of the R-SLCUXnet
// and xn_in / xn_out those of the R-Xnet (index 0 = NW, 1 = NE, 2 = SE,
// 3 = SW). cut_row / cut_col, and the XN_EDGE_* masks, tell the R-Xnet which
// of its paths cross a grid seam and must be blocked (see r_xnet).
// Timing: as com_control; both routers are combinational.
module slcu_com
  import scac_pkg::*;
#(
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned BUS_W       = 16,
  parameter logic [3:0]  XN_EDGE_ROW = 4'b0000,
  parameter logic [3:0]  XN_EDGE_COL = 4'b0000,
  localparam int unsigned LINK_W = (BUS_W == 1) ? 1 : BUS_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              instr_valid,
  input  com_instr_t        instr,
  output logic              instr_ready,
  input  logic              active,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] rcom,
  output logic              rcom_wr,
  output logic              done,
  input  logic              cut_row,
  input  logic              cut_col,
  output logic [LINK_W-1:0] sx_out [4],
  input  logic [LINK_W-1:0] sx_in  [4],
  input  logic [LINK_W-1:0] xn_in  [4],
  output logic [LINK_W-1:0] xn_out [4]
);

  logic              open;
  dir_e              dir;
  logic [LINK_W-1:0] tx_link, rx_link;

  com_control #(.DATA_W(DATA_W), .BUS_W(BUS_W)) u_ctrl (
    .clk, .rst_n,
    .instr_valid, .instr, .instr_ready,
    .active, .data_in, .rcom, .rcom_wr, .done,
    .open, .dir,
    .link_out (tx_link),
    .link_in  (rx_link)
  );

  r_slcuxnet #(.LINK_W(LINK_W)) u_rsx (
    .open, .dir,
    .local_tx (tx_link),
    .port_out (sx_out),
    .port_in  (sx_in),
    .local_rx (rx_link)
  );

  r_xnet #(.LINK_W(LINK_W), .EDGE_ROW(XN_EDGE_ROW), .EDGE_COL(XN_EDGE_COL)) u_rxn (
    .open, .dir, .cut_row, .cut_col,
    .in_link  (xn_in),
    .out_link (xn_out)
  );

endmodule
