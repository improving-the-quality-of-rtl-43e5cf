// tb_puf_ctrl: checks the measurement sequencer against a table-driven
// stand-in for the oscillator datapath.
//
// The testbench plays the role of the counters and comparator: after each
// measurement it presents a bit and a difference taken from a random table
// indexed by (pair, configuration). It checks that
//  - every measurement clears the counters first and runs for exactly
//    WINDOW_CYCLES cycles with a stable pair and configuration;
//  - ENROLL picks, for every pair, the first configuration with the largest
//    difference, stores it (read back with GETCFG) and reports its bit;
//  - GENERATE reports the bit of each pair's stored configuration, including
//    a configuration loaded with SETCFG;
//  - MEASURE reports the table entry of the given pair and configuration;
//  - done is seen (N-1)*(8*(W+7)+1)+3 cycles (ENROLL), (N-1)*(W+7)+3 (GENERATE)
//    and W+10 (MEASURE) after the clock edge that accepts the command.
`timescale 1ns / 1ps
module tb_puf_ctrl;
  import puf_pkg::*;
  localparam int N = 6, W = 16, NB = N - 1;

  logic clk = 1'b0, rst = 1'b1, cmd_valid = 1'b0;
  puf_cmd_t cmd = '0;
  logic busy, done, res_bit, run, cnt_clr, cmp_bit;
  logic [NB-1:0] resp;
  logic [15:0] res_diff, cmp_diff;
  cfg_t res_cfg, cfg;
  logic [2:0] pair;
  int checks = 0, failures = 0;

  int tdiff [NB][8];
  bit tbit  [NB][8];

  always #10 clk = ~clk;

  puf_ctrl #(.NUM_RO(N), .WINDOW_CYCLES(W), .CNT_W(16)) dut (
    .clk, .rst, .cmd_valid, .cmd, .busy, .done, .resp, .res_bit, .res_diff, .res_cfg,
    .run, .cnt_clr, .pair, .cfg, .cmp_bit, .cmp_diff);

  // datapath stand-in: result valid after a complete window
  int run_len, last_run_len, n_meas;
  bit cleared;
  always_comb begin
    cmp_bit  = tbit[int'(pair) % NB][cfg];
    cmp_diff = 16'(tdiff[int'(pair) % NB][cfg]);
  end
  always @(posedge clk) if (!rst) begin
    if (cnt_clr) begin cleared <= 1'b1; run_len <= 0; end
    if (run) begin
      run_len <= run_len + 1;
      if (!cleared) begin failures++; $display("FAIL: run without clear"); end
    end else if (run_len != 0) begin
      checks++;
      n_meas++;
      if (run_len != W) begin failures++; $display("FAIL: window %0d cycles", run_len); end
      run_len <= 0;
      cleared <= 1'b0;
    end
  end
  logic [2:0] pair_q; cfg_t cfg_q;
  always @(posedge clk) begin
    pair_q <= pair; cfg_q <= cfg;
    if (run && $past(run) && (pair != pair_q || cfg != cfg_q)) begin
      failures++; $display("FAIL: pair/cfg changed during run");
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(puf_op_e op, int p, int c, output int cycles);
    @(posedge clk);
    cmd_valid <= 1'b1;
    cmd <= '{op: op, rsvd: '0, cfg: cfg_t'(c), pair: 16'(p)};
    @(posedge clk);
    cmd_valid <= 1'b0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, best[NB];
    for (int p = 0; p < NB; p++)
      for (int c = 0; c < 8; c++) begin
        tdiff[p][c] = (p == 1) ? 7 : int'($urandom % 200);   // pair 1: all tied
        tbit[p][c]  = 1'($urandom);
      end
    n_meas = 0; run_len = 0; cleared = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    issue(OP_ENROLL, 0, 0, cyc);
    check(cyc == NB * (8 * (W + 7) + 1) + 3, $sformatf("enroll took %0d cycles", cyc));
    check(n_meas == NB * 8, $sformatf("enroll made %0d measurements", n_meas));
    for (int p = 0; p < NB; p++) begin
      int mx; mx = -1; best[p] = 0;
      for (int c = 0; c < 8; c++) if (tdiff[p][c] > mx) begin mx = tdiff[p][c]; best[p] = c; end
      check(resp[p] == tbit[p][best[p]], $sformatf("enroll bit of pair %0d", p));
      issue(OP_GETCFG, p, 0, cyc);
      check(int'(res_cfg) == best[p], $sformatf("pair %0d stored cfg %0d expected %0d", p, res_cfg, best[p]));
    end

    // reload pair 2 with another configuration, then regenerate
    best[2] = (best[2] + 3) % 8;
    issue(OP_SETCFG, 2, best[2], cyc);
    n_meas = 0;
    issue(OP_GENERATE, 0, 0, cyc);
    check(cyc == NB * (W + 7) + 3, $sformatf("generate took %0d cycles", cyc));
    check(n_meas == NB, "generate made one measurement per pair");
    for (int p = 0; p < NB; p++)
      check(resp[p] == tbit[p][best[p]], $sformatf("generate bit of pair %0d", p));

    for (int t = 0; t < 6; t++) begin
      int p, c;
      p = int'($urandom % NB); c = int'($urandom % 8);
      issue(OP_MEASURE, p, c, cyc);
      check(cyc == W + 7 + 3, "measure cycle count");
      check(res_bit == tbit[p][c] && int'(res_diff) == tdiff[p][c] && int'(res_cfg) == c,
            $sformatf("measure pair %0d cfg %0d", p, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
