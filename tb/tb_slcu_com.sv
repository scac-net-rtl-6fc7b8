// tb_slcu_com -- self-checking test of one SLCU-COM node.
//
// The node's router ports are wired back onto each other the way a 1x1
// network wires them: every R-SLCUXnet port meets the facing R-Xnet port of
// the same node. A word sent in any direction therefore crosses R-SLCUXnet,
// R-Xnet and R-SLCUXnet and comes back to the node itself, once per hop. With
// the seam cuts off it must always return; with cuts on it must return only
// when no hop crosses a cut dimension (or the distance is zero). The test
// checks R_COM, its write strobe, and that done comes Dist + 2 cycles after
// the instruction, for all directions, cut settings and distances 0..15.
module tb_slcu_com;
  import scac_pkg::*;

  localparam int unsigned DW = 16;
  localparam int unsigned LW = 17;
  // row / column step of each direction code, written out here
  localparam int DROW [8] = '{-1, -1, -1, 0, 1, 1, 1, 0};
  localparam int DCOL [8] = '{-1, 0, 1, 1, 1, 0, -1, -1};

  int checks = 0, failures = 0;

  logic          clk = 0, rst_n = 0;
  logic          instr_valid = 0, instr_ready;
  com_instr_t    instr;
  logic          active = 1;
  logic [DW-1:0] data_in = '0, rcom;
  logic          rcom_wr, done;
  logic          cut_row = 0, cut_col = 0;
  logic [LW-1:0] sx_out [4], sx_in [4], xn_in [4], xn_out [4];

  always #5 clk = ~clk;

  slcu_com #(.DATA_W(DW), .BUS_W(16), .XN_EDGE_ROW(4'b1100), .XN_EDGE_COL(4'b0110)) dut (
    .clk, .rst_n, .instr_valid, .instr, .instr_ready, .active, .data_in,
    .rcom, .rcom_wr, .done, .cut_row, .cut_col, .sx_out, .sx_in, .xn_in, .xn_out);

  // 1x1 wiring: SLCU port p <-> R-Xnet port p+2
  assign sx_in[0] = xn_out[2];
  assign sx_in[1] = xn_out[3];
  assign sx_in[2] = xn_out[0];
  assign sx_in[3] = xn_out[1];
  assign xn_in[0] = sx_out[2];
  assign xn_in[1] = sx_out[3];
  assign xn_in[2] = sx_out[0];
  assign xn_in[3] = sx_out[1];

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] prev;
    instr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    prev = '0;
    for (int cuts = 0; cuts < 4; cuts++) begin
      for (int d = 0; d < 8; d++) begin
        for (int hops = 0; hops < 16; hops += ((hops < 3) ? 1 : 5)) begin
          int done_at, wr;
          bit ok;
          cut_row = cuts[0];
          cut_col = cuts[1];
          data_in = DW'($urandom);
          instr.op = OP_SEND;
          instr.dir = dir_e'(d);
          instr.distance = DIST_W'(hops);
          instr_valid = 1;
          @(posedge clk);
          #1;
          instr_valid = 0;
          done_at = 0;
          wr = 0;
          for (int k = 1; k <= hops + 3; k++) begin
            if (done && done_at == 0) done_at = k;
            @(posedge clk);
            #1;
            if (rcom_wr) wr++;
          end
          ok = (hops == 0) ||
               ((DROW[d] == 0 || !cut_row) && (DCOL[d] == 0 || !cut_col));
          check($sformatf("cuts=%0d dir=%0d hops=%0d done", cuts, d, hops), done_at, hops + 2);
          check($sformatf("cuts=%0d dir=%0d hops=%0d wr", cuts, d, hops), wr, ok ? 1 : 0);
          check($sformatf("cuts=%0d dir=%0d hops=%0d rcom", cuts, d, hops), rcom,
                ok ? data_in : prev);
          prev = rcom;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
