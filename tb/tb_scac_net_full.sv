// tb_scac_net_full -- parallel summing on the default SCAC-Net (4x4 torus,
// 16+1-bit links), followed by a random regression at the same size.
//
// Part 1, all-reduce sum: every node starts with a random 12-bit value. Four
// RECEIVE instructions -- west at distance 1 and 2, then north at distance 1
// and 2 -- each followed by every node adding the received word to its own
// (recursive doubling; the additions stand in for the compute elements),
// leave the sum of all sixteen values in every node. The test checks each
// partial sum and that each transfer takes exactly distance + 2 cycles.
// Part 2 runs scac_net_checker on the same network for random
// instructions. The network is used with its default parameters.
module tb_scac_net_full;
  import scac_pkg::*;

  localparam int R = 4, C = 4, NN = 16, NMECH = 9;

  logic clk = 0;
  always #5 clk = ~clk;

  // one set of wires driven either by the summing sequence or the checker
  logic          rst_n, instr_valid, instr_ready, done;
  com_instr_t    instr;
  logic          active  [NN];
  logic [15:0]   data_in [NN];
  logic [15:0]   rcom    [NN];
  logic          rcom_wr [NN];

  scac_net u_net (
    .clk, .rst_n, .instr_valid, .instr, .instr_ready,
    .active, .data_in, .rcom, .rcom_wr, .done);

  // checker, connected once the summing part is over
  logic          k_rst_n, k_valid;
  com_instr_t    k_instr;
  logic          k_active  [NN];
  logic [15:0]   k_data_in [NN];
  int            k_checks, k_fail, k_mech [NMECH];
  logic [7:0]    k_dirs;
  logic          k_fin;
  logic          k_go = 0;
  logic          clk_k;
  assign clk_k = clk & k_go;

  scac_net_checker #(.NTESTS(100)) u_chk (
    .clk(clk_k), .rst_n(k_rst_n), .instr_valid(k_valid), .instr(k_instr),
    .instr_ready, .active(k_active), .data_in(k_data_in), .rcom, .rcom_wr, .done,
    .checks(k_checks), .failures(k_fail), .mech(k_mech), .dirs_seen(k_dirs),
    .finished(k_fin));

  logic          s_rst_n = 0, s_valid = 0;
  com_instr_t    s_instr = '0;
  logic          s_active  [NN];
  logic [15:0]   s_data_in [NN];

  always_comb begin
    rst_n       = k_go ? k_rst_n : s_rst_n;
    instr_valid = k_go ? k_valid : s_valid;
    instr       = k_go ? k_instr : s_instr;
    for (int n = 0; n < NN; n++) begin
      active[n]  = k_go ? k_active[n]  : s_active[n];
      data_in[n] = k_go ? k_data_in[n] : s_data_in[n];
    end
  end

  int checks = 0, failures = 0;

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v [NN];
    logic [15:0] x [NN];
    int total;
    dir_e step_dir [4] = '{DIR_W, DIR_W, DIR_N, DIR_N};
    int   step_k   [4] = '{1, 2, 1, 2};
    total = 0;
    for (int n = 0; n < NN; n++) begin
      x[n] = 16'($urandom_range(0, 4095));
      v[n] = x[n];
      total += int'(x[n]);
      s_active[n] = 1;
      s_data_in[n] = '0;
    end
    repeat (3) @(posedge clk);
    #1;
    s_rst_n = 1;
    @(posedge clk);
    #1;
    for (int st = 0; st < 4; st++) begin
      int cyc;
      for (int n = 0; n < NN; n++) s_data_in[n] = v[n];
      s_instr.op = OP_RECEIVE;
      s_instr.dir = step_dir[st];
      s_instr.distance = DIST_W'(step_k[st]);
      s_valid = 1;
      @(posedge clk);
      #1;
      s_valid = 0;
      cyc = 1;
      while (!done) begin
        @(posedge clk);
        #1;
        cyc++;
        if (cyc > 100) break;
      end
      check($sformatf("step %0d transfer cycles", st), cyc, step_k[st] + 2);
      @(posedge clk);
      #1;
      // compute elements: v += R_COM; reference partial sums from x
      for (int r = 0; r < R; r++) begin
        for (int c = 0; c < C; c++) begin
          int n, exp;
          n = r * C + c;
          v[n] = v[n] + rcom[n];
          exp = 0;
          if (st < 2) begin
            for (int j = 0; j < (st == 0 ? 2 : 4); j++) exp += int'(x[r * C + (c + j) % C]);
          end else begin
            for (int i = 0; i < (st == 2 ? 2 : 4); i++)
              for (int j = 0; j < C; j++) exp += int'(x[((r + i) % R) * C + j]);
          end
          check($sformatf("step %0d node %0d partial sum", st, n), v[n], 16'(exp));
        end
      end
    end
    for (int n = 0; n < NN; n++) check($sformatf("node %0d total", n), v[n], 16'(total));
    $display("parallel summing: total %0d in every node", total);

    // part 2: random regression with the checker
    k_go = 1;
    wait (k_fin);
    checks += k_checks;
    failures += k_fail;
    checks++;
    if (k_dirs != 8'hff) begin
      failures++;
      $display("FAIL not every direction exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
