// tb_latency -- communication delay against distance for the three link
// widths (16+1, 4+1 and 1 bit) on a 4x4 torus.
//
// For distances 0, 2, 6, 10 and 14 one SEND to the east by every node is
// timed from the instruction to done, and every node's R_COM is checked: on
// a 4-column torus a word moved k hops east lands k mod 4 columns away. The
// expected delay is NSLICE * (k + 2) cycles: 1, 4 and 17 slices.
module tb_latency;
  import scac_pkg::*;

  localparam int NB = 3;
  localparam int BUSW   [NB] = '{16, 4, 1};
  localparam int NSLICE [NB] = '{1, 4, 17};
  localparam int ND = 5;
  localparam int DIST [ND] = '{0, 2, 6, 10, 14};

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n = 0, instr_valid = 0;
  com_instr_t instr = '0;
  logic       active  [16];
  logic [15:0] data_in [16];
  logic       ready [NB], done [NB];
  logic [15:0] rcom [NB][16];
  logic       rcom_wr [NB][16];

  for (genvar b = 0; b < NB; b++) begin : g_bus
    scac_net #(.BUS_W(BUSW[b])) u_net (
      .clk, .rst_n, .instr_valid, .instr, .instr_ready(ready[b]),
      .active, .data_in, .rcom(rcom[b]), .rcom_wr(rcom_wr[b]), .done(done[b]));
  end

  int checks = 0, failures = 0;

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat [NB];
    for (int n = 0; n < 16; n++) begin
      active[n] = 1;
      data_in[n] = '0;
    end
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    @(posedge clk);
    #1;
    $display("distance | bus 16+1 | bus 4+1 | bus 1");
    for (int i = 0; i < ND; i++) begin
      int cyc;
      for (int n = 0; n < 16; n++) data_in[n] = 16'($urandom);
      instr.op = OP_SEND;
      instr.dir = DIR_E;
      instr.distance = DIST_W'(DIST[i]);
      instr_valid = 1;
      @(posedge clk);
      #1;
      instr_valid = 0;
      for (int b = 0; b < NB; b++) lat[b] = 0;
      cyc = 1;
      while (lat[NB-1] == 0 && cyc < 400) begin
        for (int b = 0; b < NB; b++) if (done[b] && lat[b] == 0) lat[b] = cyc;
        @(posedge clk);
        #1;
        cyc++;
      end
      @(posedge clk);
      #1;
      $display("%8d | %8d | %7d | %5d", DIST[i], lat[0], lat[1], lat[2]);
      for (int b = 0; b < NB; b++) begin
        check($sformatf("bus %0d distance %0d latency", BUSW[b], DIST[i]), lat[b],
              NSLICE[b] * (DIST[i] + 2));
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            check($sformatf("bus %0d distance %0d node (%0d,%0d)", BUSW[b], DIST[i], r, c),
                  rcom[b][r * 4 + c], data_in[r * 4 + ((c - DIST[i]) % 4 + 4) % 4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
