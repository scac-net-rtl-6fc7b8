// tb_r_xnet -- self-checking test of the R-Xnet crossbar.
//
// For every direction code, with the ports open and closed, random words on
// all four inputs: the expected output port and source port come from the
// direction table written out here as plain constants, not from the package
// functions. A second instance with seam masks checks that paths across a
// cut seam are blocked and the others pass.
module tb_r_xnet;
  import scac_pkg::*;

  localparam int unsigned W = 17;
  // direction table: R-SLCUXnet port and R-Xnet output port per direction
  localparam int SLCU_COL [8] = '{0, 0, 1, 1, 2, 2, 3, 3};
  localparam int XNET_COL [8] = '{0, 1, 1, 2, 2, 3, 3, 0};

  int checks = 0, failures = 0;

  logic         open, cut_row, cut_col;
  dir_e         dir;
  logic [W-1:0] in_link [4];
  logic [W-1:0] out_a   [4];
  logic [W-1:0] out_b   [4];

  r_xnet #(.LINK_W(W)) u_a (
    .open, .dir, .cut_row(1'b0), .cut_col(1'b0), .in_link, .out_link(out_a));
  // an R-Xnet in the last row and column: SE,SW cross the row seam and
  // NE,SE the column seam
  r_xnet #(.LINK_W(W), .EDGE_ROW(4'b1100), .EDGE_COL(4'b0110)) u_b (
    .open, .dir, .cut_row, .cut_col, .in_link, .out_link(out_b));

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cut_row = 0; cut_col = 0;
    for (int rep = 0; rep < 4; rep++) begin
      for (int d = 0; d < 8; d++) begin
        for (int o = 0; o < 2; o++) begin
          for (int cr = 0; cr < 2; cr++) begin
            for (int cc = 0; cc < 2; cc++) begin
              int ip, op;
              bit row_x, col_x, blocked;
              dir = dir_e'(d);
              open = o[0];
              cut_row = cr[0];
              cut_col = cc[0];
              for (int p = 0; p < 4; p++) in_link[p] = W'($urandom);
              #1;
              ip = (SLCU_COL[d] + 2) % 4;
              op = XNET_COL[d];
              row_x = ((ip == 2 || ip == 3) != (op == 2 || op == 3));
              col_x = ((ip == 1 || ip == 2) != (op == 1 || op == 2));
              blocked = (cr != 0 && row_x) || (cc != 0 && col_x);
              for (int p = 0; p < 4; p++) begin
                check($sformatf("plain dir=%0d open=%0d port=%0d", d, o, p), out_a[p],
                      (o != 0 && p == op) ? in_link[ip] : '0);
                check($sformatf("edge dir=%0d open=%0d cut=%0d%0d port=%0d", d, o, cr, cc, p),
                      out_b[p], (o != 0 && !blocked && p == op) ? in_link[ip] : '0);
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
