// fir_driver -- runs a 16-tap FIR filter over 64 inputs on a 16-node
// SCAC-Net and checks the outputs against a direct convolution.
//
// The sixteen nodes form a chain j = 0..15 (row-major on a 2D grid). Node j
// produces the outputs y(n) with n mod 16 = j. Step s = 0..63: every node
// multiplies the sample it holds, x(s - 15 + j), by the tap h(15 - s mod 16)
// that the control unit broadcasts and adds it to its accumulator; every
// sixteenth step completes one output per node. Between steps the samples
// shift one node down the chain: node 15 loads the next sample from its own
// memory and every other node takes its successor's sample. The
// multiply-accumulate and the sample loads stand in for the compute
// elements; only the shifts go through the network.
//
// On a 1D linear network (TWO_D = 0) a shift is one RECEIVE to the west at
// distance 1: 63 transfers. On a 2D torus (TWO_D = 1) a shift is a RECEIVE to
// the west by all nodes, which wraps column 0 into column COLS-1, then a
// RECEIVE to the north in which only the last column is active, bringing the
// next row's first sample up: 126 transfers. Each transfer must take 3 cycles.
module fir_driver
  import scac_pkg::*;
#(
  parameter int unsigned ROWS  = 1,
  parameter int unsigned COLS  = 16,
  parameter bit          TWO_D = 0,
  localparam int unsigned NODES = ROWS * COLS
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        instr_valid,
  output com_instr_t  instr,
  input  logic        instr_ready,
  output logic        active  [NODES],
  output logic [15:0] data_in [NODES],
  input  logic [15:0] rcom    [NODES],
  input  logic        done,
  output int          checks,
  output int          failures,
  output int          transfers,
  output int          net_cycles,
  output logic        finished
);

  localparam int NX = 64, NH = 16;

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %m %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one network transfer; returns after R_COM is updated
  task automatic transfer(dir_e d, logic [15:0] words [NODES], logic act [NODES]);
    int cyc;
    for (int n = 0; n < int'(NODES); n++) begin
      data_in[n] = words[n];
      active[n]  = act[n];
    end
    check("ready", instr_ready, 1);
    instr.op = OP_RECEIVE;
    instr.dir = d;
    instr.distance = DIST_W'(1);
    instr_valid = 1;
    @(posedge clk);
    #1;
    instr_valid = 0;
    cyc = 1;
    while (!done && cyc < 50) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    @(posedge clk);
    #1;
    check("transfer cycles", cyc, 3);
    transfers++;
    net_cycles += cyc;
  endtask

  initial begin
    int x [NX];
    int h [NH];
    int acc [NH];
    int y [NX];
    logic [15:0] xr [NODES];
    logic all_on [NODES];
    logic last_col [NODES];
    checks = 0;
    failures = 0;
    transfers = 0;
    net_cycles = 0;
    finished = 0;
    rst_n = 0;
    instr_valid = 0;
    instr = '0;
    for (int i = 0; i < NX; i++) x[i] = int'($urandom_range(0, 255));
    for (int k = 0; k < NH; k++) h[k] = int'($urandom_range(0, 255));
    for (int n = 0; n < int'(NODES); n++) begin
      active[n] = 0;
      data_in[n] = '0;
      all_on[n] = 1;
      last_col[n] = ((n % int'(COLS)) == int'(COLS) - 1);
      xr[n] = '0;
    end
    for (int j = 0; j < NH; j++) acc[j] = 0;
    xr[NODES-1] = 16'(x[0]);
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    @(posedge clk);
    #1;

    for (int s = 0; s < NX; s++) begin
      // compute elements: multiply-accumulate with the broadcast tap
      for (int j = 0; j < NH; j++) acc[j] += h[15 - (s % 16)] * int'(xr[j]);
      if (s % 16 == 15) begin
        for (int j = 0; j < NH; j++) begin
          y[16 * (s / 16) + j] = acc[j];
          acc[j] = 0;
        end
      end
      if (s == NX - 1) break;
      // shift the samples one node down the chain
      transfer(DIR_W, xr, all_on);
      for (int n = 0; n < int'(NODES); n++) if (!last_col[n] || !TWO_D) xr[n] = rcom[n];
      if (TWO_D) begin
        logic [15:0] tmp [NODES];
        for (int n = 0; n < int'(NODES); n++) tmp[n] = rcom[n];
        transfer(DIR_N, tmp, last_col);
        for (int n = 0; n < int'(NODES); n++) if (last_col[n]) xr[n] = rcom[n];
      end
      xr[NODES-1] = 16'(x[s + 1]);
      // the chain must now hold x(s + 1 - 15 + j)
      for (int j = 0; j < NH; j++)
        check($sformatf("step %0d node %0d sample", s, j), xr[j],
              (s + 1 - 15 + j >= 0) ? 16'(x[s + 1 - 15 + j]) : 16'd0);
    end

    for (int n = 0; n < NX; n++) begin
      int ref_y;
      ref_y = 0;
      for (int k = 0; k < NH; k++) if (n - k >= 0) ref_y += h[k] * x[n - k];
      check($sformatf("y(%0d)", n), y[n], ref_y);
    end
    check("transfers", transfers, TWO_D ? 126 : 63);
    finished = 1;
  end
endmodule
