// tb_com_control -- self-checking test of the COM-Control state machine.
//
// Three pairs of controllers, with 16+1-bit, 4+1-bit and 1-bit links. Within
// a pair each controller's link_in is the other's link_out, a two-node ring
// without routers, so after d hops a node holds its own word for even d and
// its partner's for odd d. Random SEND and RECEIVE instructions with random
// distances and activity bits are issued to all six controllers; the test
// checks R_COM and its write strobe against that rule and the activity-bit
// rules, and checks that done arrives NSLICE * (d + 2) cycles after the
// instruction (NSLICE = 1, 4 and 17), with the routers open in Read and
// Transfer only.
module tb_com_control;
  import scac_pkg::*;

  localparam int unsigned DW = 16;
  localparam int NB = 3;
  localparam int BUSW   [NB] = '{16, 4, 1};
  localparam int NSLICE [NB] = '{1, 4, 17};

  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  logic       instr_valid = 0;
  com_instr_t instr;
  logic       active  [NB][2];
  logic [DW-1:0] data_in [NB][2];
  logic [DW-1:0] rcom    [NB][2];
  logic       rcom_wr [NB][2];
  logic       done    [NB][2];
  logic       ready   [NB][2];
  logic       open    [NB][2];

  always #5 clk = ~clk;

  for (genvar b = 0; b < NB; b++) begin : g_bus
    localparam int unsigned LW = (BUSW[b] == 1) ? 1 : BUSW[b] + 1;
    logic [LW-1:0] lnk [2];
    dir_e dirs [2];
    for (genvar n = 0; n < 2; n++) begin : g_node
      com_control #(.DATA_W(DW), .BUS_W(BUSW[b])) dut (
        .clk, .rst_n, .instr_valid, .instr, .instr_ready(ready[b][n]),
        .active(active[b][n]), .data_in(data_in[b][n]),
        .rcom(rcom[b][n]), .rcom_wr(rcom_wr[b][n]), .done(done[b][n]),
        .open(open[b][n]), .dir(dirs[n]),
        .link_out(lnk[n]), .link_in(lnk[1-n]));
    end
  end

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] prev [NB][2];
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 2; n++) begin
        active[b][n] = 0;
        data_in[b][n] = '0;
      end
    instr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 2; n++) begin
        check("rcom after reset", rcom[b][n], 0);
        prev[b][n] = '0;
      end

    for (int t = 0; t < 120; t++) begin
      int d;
      op_e op;
      int seen_done [NB];
      int seen_wr   [NB][2];
      int open_cycles [NB];
      d  = (t < 16) ? t : int'($urandom_range(0, 7));
      op = op_e'($urandom_range(0, 1));
      for (int b = 0; b < NB; b++)
        for (int n = 0; n < 2; n++) begin
          active[b][n]  = 1'($urandom);
          data_in[b][n] = DW'($urandom);
        end
      // same activity and data on every bus width
      for (int b = 1; b < NB; b++)
        for (int n = 0; n < 2; n++) begin
          active[b][n]  = active[0][n];
          data_in[b][n] = data_in[0][n];
        end
      instr.op = op;
      instr.dir = dir_e'($urandom_range(0, 7));
      instr.distance = DIST_W'(d);
      instr_valid = 1;
      @(posedge clk);
      #1;
      instr_valid = 0;
      for (int b = 0; b < NB; b++) begin
        seen_done[b] = 0;
        open_cycles[b] = 0;
        for (int n = 0; n < 2; n++) seen_wr[b][n] = 0;
      end
      // cycle k (1-based) after the instruction edge
      for (int k = 1; k <= 17 * (d + 2); k++) begin
        for (int b = 0; b < NB; b++) begin
          if (open[b][0]) open_cycles[b]++;
          if (done[b][0]) begin
            if (seen_done[b] == 0) seen_done[b] = k;
          end
        end
        @(posedge clk);
        #1;
        for (int b = 0; b < NB; b++)
          for (int n = 0; n < 2; n++)
            if (rcom_wr[b][n]) seen_wr[b][n]++;
      end
      for (int b = 0; b < NB; b++) begin
        check($sformatf("t%0d bus%0d done cycle", t, BUSW[b]), seen_done[b], NSLICE[b] * (d + 2));
        check($sformatf("t%0d bus%0d open cycles", t, BUSW[b]), open_cycles[b], NSLICE[b] * (d + 1));
        check($sformatf("t%0d bus%0d ready", t, BUSW[b]), ready[b][0], 1);
        for (int n = 0; n < 2; n++) begin
          int src;
          bit st;
          src = (d % 2 == 0) ? n : 1 - n;
          st = (op == OP_SEND) ? active[b][src] : active[b][n];
          check($sformatf("t%0d bus%0d node%0d wr", t, BUSW[b], n), seen_wr[b][n], st ? 1 : 0);
          check($sformatf("t%0d bus%0d node%0d rcom", t, BUSW[b], n), rcom[b][n],
                st ? data_in[b][src] : prev[b][n]);
          prev[b][n] = rcom[b][n];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
