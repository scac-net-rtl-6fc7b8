// com_control -- COM-Control, the communication controller of one node.
//
// A Mealy state machine with the four states of the document: Idle, Read,
// Transfer and Write. A communication micro-instruction (SEND or RECEIVE,
// direction, distance) moves it from Idle to Read. In Read the node's
// pipeline register is loaded with the local word and its activity bit and
// the routers are opened in the instruction's direction (one cycle). If the
// distance is above zero, Transfer follows and loops until the distance
// counter reaches zero: every cycle the pipeline register takes the word
// arriving from the neighbour, so the words of all nodes advance one hop per
// cycle and nodes that are not active simply act as pipeline stages (Dist
// cycles). In Write the routers are closed and the word that arrived is
// stored in R_COM (one cycle). One word therefore takes Dist + 2 cycles.
//
// Bus size: the network links are BUS_W data bits plus one activity bit
// (16+1 and 4+1 in the document), or a single wire when BUS_W = 1. A link
// narrower than the word carries it in slices, and the Read / Transfer /
// Write sequence is repeated once per slice, so a transfer takes
// NSLICE * (Dist + 2) cycles with NSLICE = DATA_W / BUS_W, or DATA_W + 1 for
// the 1-bit bus, where the activity bit travels as the first slice. Looping
// from Write back to Read for the next slice is this design's reading of the
// document's bus-size latency figure; the four states are the document's.
//
// Activity bit (this design's choice of semantics): for SEND the word leaves
// with the node's own activity bit and the destination stores it when that
// bit arrives set, whatever its own state; for RECEIVE every node sends with
// the bit set and only active nodes store. A word that falls off the edge of
// a mesh or linear network arrives as zero, activity bit cleared, and is not
// stored.
//
// Interface: instr_valid / instr are accepted when instr_ready (Idle) is
// high; data_in and active are sampled in that same cycle. link_out is the
// pipeline register (to the R-SLCUXnet), link_in the word the R-SLCUXnet
// delivers. open and dir configure both routers. done is high in the last
// Write cycle; rcom_wr pulses for one cycle together with the new rcom value.
// Synchronous active-low reset (reset style is this design's choice).
module com_control
  import scac_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned BUS_W  = 16,
  localparam int unsigned LINK_W = (BUS_W == 1) ? 1 : BUS_W + 1,
  localparam int unsigned NSLICE = (BUS_W == 1) ? DATA_W + 1 : DATA_W / BUS_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // micro-instruction from the SLCU decoder
  input  logic              instr_valid,
  input  com_instr_t        instr,
  output logic              instr_ready,
  // local node
  input  logic              active,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] rcom,
  output logic              rcom_wr,
  output logic              done,
  // routers
  output logic              open,
  output dir_e              dir,
  output logic [LINK_W-1:0] link_out,
  input  logic [LINK_W-1:0] link_in
);

  localparam int unsigned SLICE_W = (NSLICE > 1) ? $clog2(NSLICE) : 1;

  if (BUS_W != 1 && (DATA_W % BUS_W) != 0) begin : g_bad_bus
    $error("com_control: DATA_W must be a multiple of BUS_W");
  end

  typedef enum logic [1:0] {
    S_IDLE     = 2'd0,
    S_READ     = 2'd1,
    S_TRANSFER = 2'd2,
    S_WRITE    = 2'd3
  } state_e;

  state_e              state;
  op_e                 op_q;
  dir_e                dir_q;
  logic [DIST_W-1:0]   dist_q;
  logic [DIST_W-1:0]   cnt;
  logic [SLICE_W-1:0]  slice;
  logic                active_q;
  logic [DATA_W-1:0]   word_q;
  logic [LINK_W-1:0]   pipe;
  logic [DATA_W-1:0]   rx_word;
  logic                rx_act;

  logic                last_slice;
  logic                tx_act;
  logic [LINK_W-1:0]   tx_slice;
  logic [DATA_W-1:0]   rx_word_next;
  logic                rx_act_next;
  logic                store;

  assign last_slice = (32'(slice) == NSLICE - 1);
  // activity bit that leaves this node
  assign tx_act     = (op_q == OP_RECEIVE) ? 1'b1 : active_q;

  // Slice that leaves in this Read, and the received word after this Write.
  if (BUS_W == 1) begin : g_serial
    // slice 0 is the activity bit, slice k > 0 is data bit k - 1
    localparam int unsigned IDX_W = (DATA_W > 1) ? $clog2(DATA_W) : 1;
    logic [SLICE_W-1:0] slice_m1;
    logic [IDX_W-1:0]   bit_idx;
    assign slice_m1 = slice - 1'b1;
    assign bit_idx  = IDX_W'(slice_m1);
    assign tx_slice = (slice == '0) ? tx_act : word_q[bit_idx];
    always_comb begin
      rx_word_next = rx_word;
      rx_act_next  = rx_act;
      if (slice == '0) rx_act_next = pipe[0];
      else             rx_word_next[bit_idx] = pipe[0];
    end
  end else begin : g_parallel
    // every slice carries BUS_W data bits and the activity bit on top
    assign tx_slice = {tx_act, word_q[32'(slice) * BUS_W +: BUS_W]};
    always_comb begin
      rx_word_next = rx_word;
      rx_word_next[32'(slice) * BUS_W +: BUS_W] = pipe[LINK_W-2:0];
    end
    // the activity bit must arrive set with every slice
    assign rx_act_next = pipe[LINK_W-1] && ((slice == '0) || rx_act);
  end

  assign store = rx_act_next && ((op_q == OP_SEND) || active_q);

  // Mealy outputs
  assign instr_ready = (state == S_IDLE);
  assign open        = (state == S_READ) || (state == S_TRANSFER);
  assign dir         = dir_q;
  assign done        = (state == S_WRITE) && last_slice;
  assign link_out    = pipe;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      op_q     <= OP_SEND;
      dir_q    <= DIR_NW;
      dist_q   <= '0;
      cnt      <= '0;
      slice    <= '0;
      active_q <= 1'b0;
      word_q   <= '0;
      pipe     <= '0;
      rx_word  <= '0;
      rx_act   <= 1'b0;
      rcom     <= '0;
      rcom_wr  <= 1'b0;
    end else begin
      rcom_wr <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (instr_valid) begin
            op_q     <= instr.op;
            dir_q    <= instr.dir;
            dist_q   <= instr.distance;
            active_q <= active;
            word_q   <= data_in;
            slice    <= '0;
            rx_act   <= 1'b0;
            state    <= S_READ;
          end
        end
        S_READ: begin
          pipe  <= tx_slice;
          cnt   <= dist_q;
          state <= (dist_q != '0) ? S_TRANSFER : S_WRITE;
        end
        S_TRANSFER: begin
          pipe <= link_in;
          cnt  <= cnt - 1'b1;
          if (cnt == DIST_W'(1)) state <= S_WRITE;
        end
        S_WRITE: begin
          rx_word <= rx_word_next;
          rx_act  <= rx_act_next;
          if (last_slice) begin
            if (store) begin
              rcom    <= rx_word_next;
              rcom_wr <= 1'b1;
            end
            state <= S_IDLE;
          end else begin
            slice <= slice + 1'b1;
            state <= S_READ;
          end
        end
      endcase
    end
  end

  // The distance counter never runs below one inside Transfer.
  a_cnt_nonzero : assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_TRANSFER) |-> (cnt != '0));
  // Instructions are only issued to an idle controller.
  a_instr_idle : assert property (@(posedge clk) disable iff (!rst_n)
    instr_valid |-> instr_ready);

endmodule
