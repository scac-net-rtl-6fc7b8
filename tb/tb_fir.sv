// tb_fir -- the two FIR filter mappings (16 taps, 64 inputs) on SCAC-Net.
//
// Runs fir_driver on a 16-node linear network (1D method, 63 west
// transfers) and on the default 4x4 torus (2D method, west then north by
// the last column, 126 transfers), checks all 64 outputs of each against a
// direct convolution and reports the network cycles spent in transfers.
module tb_fir;
  import scac_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int   chk [2], fail [2], xfers [2], cyc [2];
  logic fin [2];

  // 1D: linear array of 16 nodes
  logic        rst_a, val_a, rdy_a, done_a;
  com_instr_t  ins_a;
  logic        act_a [16];
  logic [15:0] din_a [16], rc_a [16];
  logic        wr_a  [16];
  scac_net #(.ROWS(1), .COLS(16), .TOPO(TOPO_LINEAR)) u_lin (
    .clk, .rst_n(rst_a), .instr_valid(val_a), .instr(ins_a), .instr_ready(rdy_a),
    .active(act_a), .data_in(din_a), .rcom(rc_a), .rcom_wr(wr_a), .done(done_a));
  fir_driver #(.ROWS(1), .COLS(16), .TWO_D(0)) u_fir1 (
    .clk, .rst_n(rst_a), .instr_valid(val_a), .instr(ins_a), .instr_ready(rdy_a),
    .active(act_a), .data_in(din_a), .rcom(rc_a), .done(done_a),
    .checks(chk[0]), .failures(fail[0]), .transfers(xfers[0]), .net_cycles(cyc[0]),
    .finished(fin[0]));

  // 2D: the default 4x4 torus
  logic        rst_b, val_b, rdy_b, done_b;
  com_instr_t  ins_b;
  logic        act_b [16];
  logic [15:0] din_b [16], rc_b [16];
  logic        wr_b  [16];
  scac_net u_torus (
    .clk, .rst_n(rst_b), .instr_valid(val_b), .instr(ins_b), .instr_ready(rdy_b),
    .active(act_b), .data_in(din_b), .rcom(rc_b), .rcom_wr(wr_b), .done(done_b));
  fir_driver #(.ROWS(4), .COLS(4), .TWO_D(1)) u_fir2 (
    .clk, .rst_n(rst_b), .instr_valid(val_b), .instr(ins_b), .instr_ready(rdy_b),
    .active(act_b), .data_in(din_b), .rcom(rc_b), .done(done_b),
    .checks(chk[1]), .failures(fail[1]), .transfers(xfers[1]), .net_cycles(cyc[1]),
    .finished(fin[1]));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (fin[0] && fin[1]);
    for (int i = 0; i < 2; i++) begin
      checks += chk[i];
      failures += fail[i];
      $display("FIR %0dD: %0d transfers, %0d network cycles, checks=%0d failures=%0d",
               i + 1, xfers[i], cyc[i], chk[i], fail[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
