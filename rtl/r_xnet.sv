// r_xnet -- R-Xnet, the 4x4 crossbar router of SCAC-Net.
//
// An R-Xnet sits between four SLCUs, one on each diagonal port (0 = NW,
// 1 = NE, 2 = SE, 3 = SW). For the broadcast direction it takes the word
// arriving on the port that faces the sender and puts it on the output port
// given by the R-Xnet column of the direction table; every other output is
// driven to zero. It has four data inputs, four data outputs and one arbiter
// per output, as the document describes; the arbiters are fixed-priority
// (this design's choice). The router is purely combinational: a word crosses
// it in the same cycle it leaves the sending node's register.
//
// Boundary cuts (this design's own mechanism): the X wiring of the whole grid
// is always the wrapped (torus) wiring. EDGE_ROW / EDGE_COL mark the ports
// whose SLCU lies across the row / column seam of the grid. When cut_row /
// cut_col is set (mesh, linear), a path that crosses a seam is not requested,
// so the word is lost at the edge and the receiver sees zeros, which includes
// a cleared activity bit.
//
// Interface: open (ports configured), dir (direction code), in_link/out_link
// (one LINK_W-bit link per port, index = port number). No clock.
module r_xnet
  import scac_pkg::*;
#(
  parameter int unsigned LINK_W   = 17,
  parameter logic [3:0]  EDGE_ROW = 4'b0000,
  parameter logic [3:0]  EDGE_COL = 4'b0000
) (
  input  logic              open,
  input  dir_e              dir,
  input  logic              cut_row,
  input  logic              cut_col,
  input  logic [LINK_W-1:0] in_link  [4],
  output logic [LINK_W-1:0] out_link [4]
);

  logic [3:0] req [4];   // req[o][i]: input i asks for output o
  logic [3:0] gnt [4];

  always_comb begin
    port_e ip, op;
    logic  crosses;
    ip = xnet_in_port(dir);
    op = xnet_out_port(dir);
    crosses = (cut_row && (EDGE_ROW[ip] != EDGE_ROW[op])) ||
              (cut_col && (EDGE_COL[ip] != EDGE_COL[op]));
    for (int o = 0; o < 4; o++) begin
      req[o] = '0;
      if (open && !crosses && (2'(o) == 2'(op))) req[o][ip] = 1'b1;
    end
  end

  for (genvar o = 0; o < 4; o++) begin : g_out
    fixed_prio_arb #(.N(4)) u_arb (.req(req[o]), .gnt(gnt[o]));

    always_comb begin
      out_link[o] = '0;
      for (int i = 0; i < 4; i++) begin
        if (gnt[o][i]) out_link[o] = in_link[i];
      end
    end
  end

endmodule
