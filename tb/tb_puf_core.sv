// tb_puf_core: checks the PUF core with the oscillator model in the loop.
//
// An eight-oscillator core with a 256-cycle window (20 ns clock) is enrolled,
// regenerated and measured. Expected counts come from the reference period
// model (ro_predict.svh): count = window time / period, within a tolerance of
// TOL counts for the unknown start phase and jitter. Checks:
//  - MEASURE of every pair in every configuration gives |count difference|
//    and bit matching the prediction;
//  - ENROLL picks, for each pair, a configuration whose predicted difference
//    is within TOL of the best one, and whose bit matches the prediction;
//  - GENERATE reproduces the enrolled response;
//  - cycle counts of ENROLL and GENERATE.
`timescale 1ns / 1ps
module tb_puf_core;
  import puf_pkg::*;
  localparam int N = 8, W = 256, NB = N - 1, AMP = 40;
  localparam int unsigned BS = 5;
  localparam real TCLK = 20.0;
  localparam real TOL = 2.5;

  `include "ro_predict.svh"

  logic clk = 1'b0, rst = 1'b1, cmd_valid = 1'b0;
  puf_cmd_t cmd = '0;
  logic busy, done, res_bit;
  logic [NB-1:0] resp, enrolled;
  logic [15:0] res_diff;
  cfg_t res_cfg;
  int checks = 0, failures = 0;

  always #(TCLK / 2) clk = ~clk;

  puf_core #(.NUM_RO(N), .WINDOW_CYCLES(W), .CNT_W(16), .BASE_SEED(BS), .CORR_AMP_PS(AMP))
    dut (.clk, .rst, .cmd_valid, .cmd, .busy, .done, .resp, .res_bit, .res_diff, .res_cfg);

  function automatic real pdiff(int p, int c);   // predicted count(a) - count(b)
    return pr_count(BS + p, pr_corr_ps(p, N, AMP), c, W * TCLK)
         - pr_count(BS + p + 1, pr_corr_ps(p + 1, N, AMP), c, W * TCLK);
  endfunction

  function automatic real rabs(real x);
    return x < 0.0 ? -x : x;
  endfunction

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
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    real d, mx;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    for (int p = 0; p < NB; p++)
      for (int c = 0; c < 8; c += 1) begin
        issue(OP_MEASURE, p, c, cyc);
        d = pdiff(p, c);
        check(rabs(real'(res_diff) - rabs(d)) <= TOL,
              $sformatf("measure pair %0d cfg %0d diff %0d predicted %.1f", p, c, res_diff, d));
        if (rabs(d) > TOL) check(res_bit == (d > 0.0), $sformatf("measure pair %0d cfg %0d bit", p, c));
      end

    issue(OP_ENROLL, 0, 0, cyc);
    check(cyc == NB * (8 * (W + 7) + 1) + 3, $sformatf("enroll took %0d cycles", cyc));
    enrolled = resp;
    for (int p = 0; p < NB; p++) begin
      issue(OP_GETCFG, p, 0, cyc);
      mx = 0.0;
      for (int c = 0; c < 8; c++) if (rabs(pdiff(p, c)) > mx) mx = rabs(pdiff(p, c));
      d = pdiff(p, int'(res_cfg));
      check(rabs(d) >= mx - 2.0 * TOL, $sformatf("pair %0d enrolled cfg %0d (%.1f) best %.1f", p, res_cfg, d, mx));
      if (rabs(d) > TOL) check(enrolled[p] == (d > 0.0), $sformatf("enrolled bit of pair %0d", p));
    end

    issue(OP_GENERATE, 0, 0, cyc);
    check(cyc == NB * (W + 7) + 3, $sformatf("generate took %0d cycles", cyc));
    check(resp == enrolled, $sformatf("generate %b, enrolled %b", resp, enrolled));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
