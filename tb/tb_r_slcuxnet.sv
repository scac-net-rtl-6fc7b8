// tb_r_slcuxnet -- self-checking test of the R-SLCUXnet demux/mux couple.
//
// For every direction, open and closed, with random words: the local word must
// leave on the port of the direction table's R-SLCUXnet column and nowhere
// else, and the local input must come from the port opposite the R-Xnet
// column. Expected ports come from constants written out here.
module tb_r_slcuxnet;
  import scac_pkg::*;

  localparam int unsigned W = 17;
  localparam int SLCU_COL [8] = '{0, 0, 1, 1, 2, 2, 3, 3};
  localparam int XNET_COL [8] = '{0, 1, 1, 2, 2, 3, 3, 0};

  int checks = 0, failures = 0;

  logic         open;
  dir_e         dir;
  logic [W-1:0] local_tx, local_rx;
  logic [W-1:0] port_in  [4];
  logic [W-1:0] port_out [4];

  r_slcuxnet #(.LINK_W(W)) dut (.open, .dir, .local_tx, .port_out, .port_in, .local_rx);

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
    for (int rep = 0; rep < 8; rep++) begin
      for (int d = 0; d < 8; d++) begin
        for (int o = 0; o < 2; o++) begin
          int rp;
          dir = dir_e'(d);
          open = o[0];
          local_tx = W'($urandom);
          for (int p = 0; p < 4; p++) port_in[p] = W'($urandom);
          #1;
          rp = (XNET_COL[d] + 2) % 4;
          for (int p = 0; p < 4; p++)
            check($sformatf("out dir=%0d open=%0d port=%0d", d, o, p), port_out[p],
                  (o != 0 && p == SLCU_COL[d]) ? local_tx : '0);
          check($sformatf("rx dir=%0d open=%0d", d, o), local_rx,
                (o != 0) ? port_in[rp] : '0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
