// scac_net_checker -- stimulus and reference model for one SCAC-Net instance.
//
// Drives a scac_net of the given size, topology and bus width through NTESTS
// random communication instructions (random SEND/RECEIVE, direction,
// distance 0..DMAX, activity bits and words) and checks, after each, every
// node's R_COM and write strobe against a reference model written here from
// the network's definition: node (r,c) receives the word of node
// (r - k*dr, c - k*dc) after k hops, wrapping rows only on a torus and
// columns on a torus or ring; a source outside the grid delivers nothing.
// SEND stores where the source was active, RECEIVE where the receiver is
// active. It also checks that done arrives NSLICE * (k + 2) cycles after
// the instruction.
//
// mech counts how often each mechanism happened:
//   0 SEND, 1 RECEIVE, 2 delivery across the wrap-around links,
//   3 word lost at a mesh/linear edge, 4 multi-hop word carried through an
//   inactive intermediate node, 5 distance 0, 6 word carried in several
//   slices, 7 1-bit link with the activity bit as a separate slice,
//   8 inactive node not storing on RECEIVE.
// dirs_seen has one bit per direction code that was exercised.
module scac_net_checker
  import scac_pkg::*;
#(
  parameter int unsigned ROWS   = 4,
  parameter int unsigned COLS   = 4,
  parameter topo_e       TOPO   = TOPO_TORUS,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned BUS_W  = 16,
  parameter int unsigned NTESTS = 50,
  parameter int unsigned DMAX   = 6,
  localparam int unsigned NODES = ROWS * COLS,
  localparam int unsigned NMECH = 9
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              instr_valid,
  output com_instr_t        instr,
  input  logic              instr_ready,
  output logic              active  [NODES],
  output logic [DATA_W-1:0] data_in [NODES],
  input  logic [DATA_W-1:0] rcom    [NODES],
  input  logic              rcom_wr [NODES],
  input  logic              done,
  output int                checks,
  output int                failures,
  output int                mech [NMECH],
  output logic [7:0]        dirs_seen,
  output logic              finished
);

  localparam int NSLICE = (BUS_W == 1) ? int'(DATA_W) + 1 : int'(DATA_W / BUS_W);
  localparam bit WRAP_R = (TOPO == TOPO_TORUS);
  localparam bit WRAP_C = (TOPO == TOPO_TORUS) || (TOPO == TOPO_RING);
  localparam int DROW [8] = '{-1, -1, -1, 0, 1, 1, 1, 0};
  localparam int DCOL [8] = '{-1, 0, 1, 1, 1, 0, -1, -1};

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %m %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [DATA_W-1:0] prev [NODES];
    int wr_count [NODES];
    checks = 0;
    failures = 0;
    finished = 0;
    dirs_seen = '0;
    for (int m = 0; m < int'(NMECH); m++) mech[m] = 0;
    rst_n = 0;
    instr_valid = 0;
    instr = '0;
    for (int n = 0; n < int'(NODES); n++) begin
      active[n] = 0;
      data_in[n] = '0;
      prev[n] = '0;
    end
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < int'(NODES); n++) check("rcom after reset", rcom[n], 0);

    for (int t = 0; t < int'(NTESTS); t++) begin
      int d, k, done_at;
      op_e op;
      d  = int'($urandom_range(0, 7));
      k  = (t < 3) ? t : int'($urandom_range(0, DMAX));
      op = op_e'(t % 2);
      for (int n = 0; n < int'(NODES); n++) begin
        active[n]  = ($urandom_range(0, 3) != 0);
        data_in[n] = DATA_W'($urandom);
        wr_count[n] = 0;
      end
      check("ready before issue", instr_ready, 1);
      instr.op = op;
      instr.dir = dir_e'(d);
      instr.distance = DIST_W'(k);
      instr_valid = 1;
      @(posedge clk);
      #1;
      instr_valid = 0;
      dirs_seen[d] = 1'b1;
      mech[op == OP_SEND ? 0 : 1]++;
      if (k == 0) mech[5]++;
      if (NSLICE > 1) mech[6]++;
      if (BUS_W == 1) mech[7]++;
      done_at = 0;
      for (int c = 1; c <= NSLICE * (k + 2) + 1; c++) begin
        if (done && done_at == 0) done_at = c;
        @(posedge clk);
        #1;
        for (int n = 0; n < int'(NODES); n++) if (rcom_wr[n]) wr_count[n]++;
      end
      check($sformatf("t%0d done cycle", t), done_at, NSLICE * (k + 2));

      for (int r = 0; r < int'(ROWS); r++) begin
        for (int c = 0; c < int'(COLS); c++) begin
          int sr, sc, n, s;
          bit in_grid, wrapped, thru_idle, st;
          n  = r * int'(COLS) + c;
          sr = r - k * DROW[d];
          sc = c - k * DCOL[d];
          wrapped = (sr < 0 || sr >= int'(ROWS) || sc < 0 || sc >= int'(COLS));
          in_grid = 1;
          if (sr < 0 || sr >= int'(ROWS)) begin
            if (WRAP_R) sr = ((sr % int'(ROWS)) + int'(ROWS)) % int'(ROWS);
            else in_grid = 0;
          end
          if (sc < 0 || sc >= int'(COLS)) begin
            if (WRAP_C) sc = ((sc % int'(COLS)) + int'(COLS)) % int'(COLS);
            else in_grid = 0;
          end
          s  = sr * int'(COLS) + sc;
          st = in_grid && ((op == OP_SEND) ? active[s] : active[n]);
          check($sformatf("t%0d node(%0d,%0d) dir%0d k%0d wr", t, r, c, d, k),
                wr_count[n], st ? 1 : 0);
          check($sformatf("t%0d node(%0d,%0d) dir%0d k%0d rcom", t, r, c, d, k),
                rcom[n], st ? data_in[s] : prev[n]);
          prev[n] = rcom[n];
          if (st && wrapped && k > 0) mech[2]++;
          if (!in_grid) mech[3]++;
          if (op == OP_RECEIVE && in_grid && !active[n]) mech[8]++;
          // an inactive node on the path between source and destination
          thru_idle = 0;
          for (int h = 1; h < k; h++) begin
            int ir, ic;
            ir = ((r - h * DROW[d]) % int'(ROWS) + int'(ROWS)) % int'(ROWS);
            ic = ((c - h * DCOL[d]) % int'(COLS) + int'(COLS)) % int'(COLS);
            if (!active[ir * int'(COLS) + ic]) thru_idle = 1;
          end
          if (st && op == OP_SEND && thru_idle) mech[4]++;
        end
      end
    end
    finished = 1;
  end
endmodule
