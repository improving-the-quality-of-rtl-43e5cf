// tb_puf_top: end-to-end test of the PUF coprocessor at its default size
// (128 configurable oscillators, 127 response bits, 2048-cycle window,
// 20 ns clock), driven through its two FSL links like a host processor.
//
// Sequence: a few single MEASUREs, a full ENROLL, GETCFG of every pair, a
// GENERATE that must reproduce the enrolled response, then every pair is
// reloaded with configuration 000 through SETCFG and regenerated, and the
// enrolled configurations are loaded back and regenerated once more.
// Expected values come from the reference oscillator model (ro_predict.svh):
// measured differences must match the prediction within TOL counts, each
// enrolled configuration must be within 2*TOL of the pair's best predicted
// difference, and bits with a clear predicted margin must have the predicted
// value. The summed predicted difference of the enrolled configurations must
// exceed that of the fixed configuration 000 (the point of configurable
// oscillators). Cycle counts of ENROLL and GENERATE are checked. The
// testbench counts how often each mechanism happened and fails if one never
// did: each command type, FSL reply back-pressure, gaps in the command
// stream, more than one selected configuration, and both bit values.
`timescale 1ns / 1ps
module tb_puf_top;
  import puf_pkg::*;
  localparam int N = 128, W = 2048, NB = N - 1, NW = 4, AMP = 40;
  localparam int unsigned BS = 1;
  localparam real TCLK = 20.0;
  localparam real TOL = 2.5;

  `include "ro_predict.svh"

  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] s_data, m_data;
  logic s_exists, s_read, m_ctrl, m_write, m_full = 1'b0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  puf_top dut (
    .clk, .rst,
    .s_fsl_data(s_data), .s_fsl_control(1'b0), .s_fsl_exists(s_exists), .s_fsl_read(s_read),
    .m_fsl_data(m_data), .m_fsl_control(m_ctrl), .m_fsl_write(m_write), .m_fsl_full(m_full));

  // host -> PUF FIFO model, with random idle gaps
  logic [31:0] cmem [16];
  int head = 0, tail = 0;
  bit gap = 1'b0;
  int n_gap = 0;
  always @(posedge clk) gap <= ($urandom % 4) == 0;
  assign s_exists = (head != tail) && !gap;
  assign s_data   = cmem[head % 16];
  always @(posedge clk) begin
    if (s_read) head <= head + 1;
    if (head != tail && gap) n_gap++;
  end

  // PUF -> host FIFO model, randomly full
  logic [31:0] rmem [16];
  bit rctl [16];
  int rcount = 0, n_stall = 0;
  bit in_reply = 1'b0;
  always @(posedge clk) m_full <= ($urandom % 3) == 0;
  always @(posedge clk) begin
    if (m_write) begin rmem[rcount % 16] <= m_data; rctl[rcount % 16] <= m_ctrl; rcount <= rcount + 1; end
    if (m_write) in_reply <= !m_ctrl;
    if (m_full && in_reply) n_stall++;
  end

  int n_op[8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send one command and collect its reply; returns cycles until the first reply word.
  task automatic command(puf_op_e op, int p, int c, int nwords, output logic [31:0] w [NW], output longint lat);
    longint t0;
    int base;
    base = rcount;
    cmem[tail % 16] = {op, 9'd0, cfg_t'(c), 16'(p)};
    tail = tail + 1;
    @(posedge clk);
    while (head != tail) @(posedge clk);
    t0 = cyc;
    while (rcount == base) @(posedge clk);
    lat = cyc - t0;
    while (rcount < base + nwords) @(posedge clk);
    repeat (2) @(posedge clk);
    check(rcount == base + nwords, $sformatf("op %0d reply has %0d words", op, rcount - base));
    for (int i = 0; i < nwords; i++) begin
      w[i] = rmem[(base + i) % 16];
      check(rctl[(base + i) % 16] == (i == nwords - 1), "control bit marks last word");
    end
    n_op[op]++;
  endtask

  function automatic real pdiff(int p, int c);
    return pr_count(BS + p, pr_corr_ps(p, N, AMP), c, W * TCLK)
         - pr_count(BS + p + 1, pr_corr_ps(p + 1, N, AMP), c, W * TCLK);
  endfunction

  function automatic real rabs(real x);
    return x < 0.0 ? -x : x;
  endfunction

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [NW];
    logic [NB-1:0] enrolled, r;
    int ecfg [NB];
    longint lat;
    real d, mx, sum_best, sum_fixed;
    int ones, cfg_used, unstable_fixed;
    bit used [8];

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // single measurements
    for (int t = 0; t < 6; t++) begin
      int p, c;
      p = (t * 37) % NB; c = (t * 5) % 8;
      command(OP_MEASURE, p, c, 1, w, lat);
      d = pdiff(p, c);
      check(int'(w[0][18:16]) == c, "measure reply carries its configuration");
      check(rabs(real'(w[0][15:0]) - rabs(d)) <= TOL,
            $sformatf("measure pair %0d cfg %0d diff %0d predicted %.1f", p, c, w[0][15:0], d));
      if (rabs(d) > TOL) check(w[0][31] == (d > 0.0), $sformatf("measure pair %0d bit", p));
    end

    // enrollment
    command(OP_ENROLL, 0, 0, NW, w, lat);
    check(lat >= longint'(NB * (8 * (W + 7) + 1)) && lat <= longint'(NB * (8 * (W + 7) + 1) + 20),
          $sformatf("enroll latency %0d cycles", lat));
    enrolled = NB'({w[3], w[2], w[1], w[0]});
    check(w[3][31] == 1'b0, "unused response bit is zero");
    sum_best = 0.0; sum_fixed = 0.0; ones = 0;
    foreach (used[c]) used[c] = 0;
    for (int p = 0; p < NB; p++) begin
      command(OP_GETCFG, p, 0, 1, w, lat);
      check(int'(w[0][15:0]) == p, "getcfg reply carries the pair");
      ecfg[p] = int'(w[0][18:16]);
      used[ecfg[p]] = 1;
      mx = 0.0;
      for (int c = 0; c < 8; c++) if (rabs(pdiff(p, c)) > mx) mx = rabs(pdiff(p, c));
      d = pdiff(p, ecfg[p]);
      check(rabs(d) >= mx - 2.0 * TOL, $sformatf("pair %0d enrolled cfg %0d (%.1f), best %.1f", p, ecfg[p], d, mx));
      if (rabs(d) > TOL) check(enrolled[p] == (d > 0.0), $sformatf("enrolled bit of pair %0d", p));
      sum_best += rabs(d);
      sum_fixed += rabs(pdiff(p, 0));
      ones += int'(enrolled[p]);
    end
    cfg_used = 0;
    foreach (used[c]) cfg_used += int'(used[c]);
    $display("enrolled: %0d ones of %0d bits, %0d distinct configurations, mean |df| %.1f counts (fixed 000: %.1f)",
             ones, NB, cfg_used, sum_best / NB, sum_fixed / NB);
    check(sum_best > sum_fixed, "enrolled configurations have larger differences than configuration 000");

    // regeneration
    command(OP_GENERATE, 0, 0, NW, w, lat);
    check(lat >= longint'(NB * (W + 7)) && lat <= longint'(NB * (W + 7) + 20),
          $sformatf("generate latency %0d cycles", lat));
    r = NB'({w[3], w[2], w[1], w[0]});
    check(r == enrolled, $sformatf("regenerated response differs in %0d bits", $countones(r ^ enrolled)));

    // fixed configuration 000 for every pair
    for (int p = 0; p < NB; p++) command(OP_SETCFG, p, 0, 1, w, lat);
    command(OP_GENERATE, 0, 0, NW, w, lat);
    r = NB'({w[3], w[2], w[1], w[0]});
    unstable_fixed = 0;
    for (int p = 0; p < NB; p++) begin
      d = pdiff(p, 0);
      if (rabs(d) > TOL) check(r[p] == (d > 0.0), $sformatf("fixed-config bit of pair %0d", p));
      else unstable_fixed++;
    end
    $display("configuration 000: %0d bits with a predicted margin within %.1f counts", unstable_fixed, TOL);

    // reload the enrolled challenges and regenerate
    for (int p = 0; p < NB; p++) command(OP_SETCFG, p, ecfg[p], 1, w, lat);
    command(OP_GENERATE, 0, 0, NW, w, lat);
    r = NB'({w[3], w[2], w[1], w[0]});
    check(r == enrolled, "response after reloading the challenges");

    check(n_op[OP_MEASURE] > 0 && n_op[OP_ENROLL] > 0 && n_op[OP_GENERATE] > 0 &&
          n_op[OP_SETCFG] > 0 && n_op[OP_GETCFG] > 0, "every command type was used");
    check(n_stall > 0, $sformatf("reply back-pressure happened %0d times", n_stall));
    check(n_gap > 0, $sformatf("command gaps happened %0d times", n_gap));
    check(cfg_used > 1, "enrollment selected more than one configuration");
    check(ones > 0 && ones < NB, "both response bit values occur");
    $display("mechanisms: measure %0d enroll %0d generate %0d setcfg %0d getcfg %0d stalls %0d gaps %0d",
             n_op[OP_MEASURE], n_op[OP_ENROLL], n_op[OP_GENERATE], n_op[OP_SETCFG], n_op[OP_GETCFG], n_stall, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
