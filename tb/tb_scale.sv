// tb_scale -- SCAC-Net at the smaller network sizes of the scalability
// study: 4 and 64 nodes (2x2, 8x8), mesh and torus, with 16+1-bit and 1-bit
// links. Each network is driven by scac_net_checker with a short random
// sequence of instructions; the 16-node size is covered by tb_scac_net. The
// 256-node point is left out only to keep the simulator build short.
module tb_scale;
  import scac_pkg::*;

  localparam int NCFG = 4;
  localparam int SIDE   [NCFG] = '{2, 2, 8, 8};
  localparam topo_e TOPO [NCFG] = '{TOPO_MESH, TOPO_TORUS, TOPO_TORUS, TOPO_MESH};
  localparam int BUSW   [NCFG] = '{16, 1, 16, 1};
  localparam int NTESTS [NCFG] = '{30, 10, 20, 6};

  logic clk = 0;
  always #5 clk = ~clk;

  int         c_checks [NCFG], c_fail [NCFG], c_mech [NCFG][9];
  logic [7:0] c_dirs [NCFG];
  logic       c_fin  [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned NN = SIDE[g] * SIDE[g];
    logic          rst_n, instr_valid, instr_ready, done;
    com_instr_t    instr;
    logic          active  [NN];
    logic [15:0]   data_in [NN];
    logic [15:0]   rcom    [NN];
    logic          rcom_wr [NN];

    scac_net #(.ROWS(SIDE[g]), .COLS(SIDE[g]), .TOPO(TOPO[g]), .BUS_W(BUSW[g])) u_net (
      .clk, .rst_n, .instr_valid, .instr, .instr_ready,
      .active, .data_in, .rcom, .rcom_wr, .done);

    scac_net_checker #(.ROWS(SIDE[g]), .COLS(SIDE[g]), .TOPO(TOPO[g]), .BUS_W(BUSW[g]),
                       .NTESTS(NTESTS[g]), .DMAX(SIDE[g] - 1)) u_chk (
      .clk, .rst_n, .instr_valid, .instr, .instr_ready,
      .active, .data_in, .rcom, .rcom_wr, .done,
      .checks(c_checks[g]), .failures(c_fail[g]), .mech(c_mech[g]),
      .dirs_seen(c_dirs[g]), .finished(c_fin[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int g = 0; g < NCFG; g++) if (!c_fin[g]) all_done = 0;
    end while (!all_done);
    for (int g = 0; g < NCFG; g++) begin
      checks += c_checks[g];
      failures += c_fail[g];
      $display("%0d nodes %s bus %0d: checks=%0d failures=%0d", SIDE[g] * SIDE[g],
               TOPO[g].name(), BUSW[g], c_checks[g], c_fail[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
