// tb_scac_net -- end-to-end test of SCAC-Net in all four topologies and all
// three bus sizes.
//
// Five networks run side by side, each driven and checked by its own
// scac_net_checker: the default 4x4 torus with 16+1-bit links, a 4x4 mesh
// with 4+1-bit links, an 8-node ring with a 1-bit link, a 16-node linear
// array with 16+1-bit links and a 3x5 torus with 4+1-bit links. The test
// fails if any check fails, if any direction code or any counted mechanism
// (see scac_net_checker) never happened, or if the watchdog expires.
module tb_scac_net;
  import scac_pkg::*;

  localparam int NCFG  = 5;
  localparam int NMECH = 9;
  localparam int ROWS   [NCFG] = '{4, 4, 1, 1, 3};
  localparam int COLS   [NCFG] = '{4, 4, 8, 16, 5};
  localparam topo_e TOPO [NCFG] = '{TOPO_TORUS, TOPO_MESH, TOPO_RING, TOPO_LINEAR, TOPO_TORUS};
  localparam int BUSW   [NCFG] = '{16, 4, 1, 16, 4};
  localparam int NTESTS [NCFG] = '{200, 60, 30, 100, 60};
  localparam string MECH_NAME [NMECH] = '{"send", "receive", "wrap-around", "edge loss",
    "pipelined through inactive node", "distance 0", "sliced word", "1-bit serial",
    "inactive receiver skipped"};

  logic clk = 0;
  always #5 clk = ~clk;

  int         c_checks [NCFG];
  int         c_fail   [NCFG];
  int         c_mech   [NCFG][NMECH];
  logic [7:0] c_dirs   [NCFG];
  logic       c_fin    [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned NN = ROWS[g] * COLS[g];
    logic          rst_n, instr_valid, instr_ready, done;
    com_instr_t    instr;
    logic          active  [NN];
    logic [15:0]   data_in [NN];
    logic [15:0]   rcom    [NN];
    logic          rcom_wr [NN];

    scac_net #(.ROWS(ROWS[g]), .COLS(COLS[g]), .TOPO(TOPO[g]), .BUS_W(BUSW[g])) u_net (
      .clk, .rst_n, .instr_valid, .instr, .instr_ready,
      .active, .data_in, .rcom, .rcom_wr, .done);

    scac_net_checker #(.ROWS(ROWS[g]), .COLS(COLS[g]), .TOPO(TOPO[g]), .BUS_W(BUSW[g]),
                       .NTESTS(NTESTS[g]), .DMAX(ROWS[g] == 1 ? 10 : 6)) u_chk (
      .clk, .rst_n, .instr_valid, .instr, .instr_ready,
      .active, .data_in, .rcom, .rcom_wr, .done,
      .checks(c_checks[g]), .failures(c_fail[g]), .mech(c_mech[g]),
      .dirs_seen(c_dirs[g]), .finished(c_fin[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    int mech_total [NMECH];
    logic [7:0] dirs;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int g = 0; g < NCFG; g++) if (!c_fin[g]) all_done = 0;
    end while (!all_done);
    dirs = '0;
    for (int m = 0; m < NMECH; m++) mech_total[m] = 0;
    for (int g = 0; g < NCFG; g++) begin
      checks += c_checks[g];
      failures += c_fail[g];
      dirs |= c_dirs[g];
      for (int m = 0; m < NMECH; m++) mech_total[m] += c_mech[g][m];
      $display("config %0d: %0dx%0d %s bus %0d: checks=%0d failures=%0d",
               g, ROWS[g], COLS[g], TOPO[g].name(), BUSW[g], c_checks[g], c_fail[g]);
    end
    for (int m = 0; m < NMECH; m++) begin
      checks++;
      $display("mechanism %-32s happened %0d times", MECH_NAME[m], mech_total[m]);
      if (mech_total[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", MECH_NAME[m]);
      end
    end
    checks++;
    if (dirs != 8'hff) begin
      failures++;
      $display("FAIL not every direction exercised: %b", dirs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
