// scac_pkg -- types and constants shared by the SCAC-Net blocks.
//
// SCAC-Net moves one word from every node to the node a fixed number of hops
// away in one of eight directions; all nodes use the same direction and the
// same distance. Each node owns two combinational routers wired as a MasPar
// style X-net: an R-SLCUXnet next to the node's SLCU and an R-Xnet that sits
// between four SLCUs. Both routers have four diagonal ports, numbered here
// 0 = NW, 1 = NE, 2 = SE, 3 = SW.
//
// The eight direction codes and, for each, the port the R-SLCUXnet sends on
// and the port the R-Xnet forwards to are those of the SCAC-Net direction
// table. The port numbering, the instruction encoding (op, 3-bit direction,
// distance field) and the distance width are this design's own choices.
package scac_pkg;

  // Direction codes, as numbered in the direction table.
  typedef enum logic [2:0] {
    DIR_NW = 3'd0,
    DIR_N  = 3'd1,
    DIR_NE = 3'd2,
    DIR_E  = 3'd3,
    DIR_SE = 3'd4,
    DIR_S  = 3'd5,
    DIR_SW = 3'd6,
    DIR_W  = 3'd7
  } dir_e;

  // Diagonal router ports.
  typedef enum logic [1:0] {
    PORT_NW = 2'd0,
    PORT_NE = 2'd1,
    PORT_SE = 2'd2,
    PORT_SW = 2'd3
  } port_e;

  // SEND: active nodes push their word. RECEIVE: every node pushes its word
  // and the active nodes keep what arrives.
  typedef enum logic {
    OP_SEND    = 1'b0,
    OP_RECEIVE = 1'b1
  } op_e;

  // Network topologies selectable at generation time.
  typedef enum logic [1:0] {
    TOPO_LINEAR = 2'd0,
    TOPO_RING   = 2'd1,
    TOPO_MESH   = 2'd2,
    TOPO_TORUS  = 2'd3
  } topo_e;

  // Width of the distance field of a communication micro-instruction.
  localparam int unsigned DIST_W = 4;

  // One communication micro-instruction as issued by the SLCU decoder.
  typedef struct packed {
    op_e               op;
    dir_e              dir;
    logic [DIST_W-1:0] distance;
  } com_instr_t;

  // Port on which the R-SLCUXnet sends the local word (direction table,
  // R-SLCUXnet column): two directions share each diagonal port.
  function automatic port_e slcu_tx_port(dir_e d);
    return port_e'(2'(3'(d) >> 1));
  endfunction

  // Port to which the R-Xnet forwards the word (direction table, R-Xnet
  // column): NW,N,NE,E,SE,S,SW,W -> 0,1,1,2,2,3,3,0.
  function automatic port_e xnet_out_port(dir_e d);
    return port_e'(2'((3'(d) + 3'd1) >> 1));
  endfunction

  // The word reaches an R-Xnet on the port facing the sending SLCU, which
  // is the port opposite the one it left the SLCU on.
  function automatic port_e xnet_in_port(dir_e d);
    return port_e'(2'(slcu_tx_port(d)) + 2'd2);
  endfunction

  // The word reaches the receiving SLCU on the port opposite the R-Xnet
  // output port.
  function automatic port_e slcu_rx_port(dir_e d);
    return port_e'(2'(xnet_out_port(d)) + 2'd2);
  endfunction

  // Row and column step of one hop in direction d (north is row - 1).
  function automatic int dir_drow(dir_e d);
    case (d)
      DIR_NW, DIR_N, DIR_NE: return -1;
      DIR_SW, DIR_S, DIR_SE: return 1;
      default:               return 0;
    endcase
  endfunction

  function automatic int dir_dcol(dir_e d);
    case (d)
      DIR_NW, DIR_W, DIR_SW: return -1;
      DIR_NE, DIR_E, DIR_SE: return 1;
      default:               return 0;
    endcase
  endfunction

endpackage
