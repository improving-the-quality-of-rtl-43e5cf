// tb_puf_reliability: unstable response bits over a sweep of operating
// points, for the enrolled (maximum-difference) configurations and for each
// of the eight fixed configurations.
//
// A 128-oscillator core (127 bits, 256-cycle window to keep the run short)
// is enrolled at the nominal operating point. The operating point of the
// oscillator model (ro_env_pkg::env_permille, the average gate-delay change
// in parts per thousand, with a per-inverter sensitivity spread) is then
// swept over -150, -75, 0, +75, +150 and the response regenerated at each
// point. A bit is unstable if it ever differs from its value at the nominal
// point; the count is the "overall" unstable bits of the sweep. The same is
// done with every pair forced (SETCFG) to one fixed configuration, for all
// eight configurations. Checks that the fixed configurations do show
// unstable bits and that the enrolled configurations have fewer than their
// average.
`timescale 1ns / 1ps
module tb_puf_reliability;
  import puf_pkg::*;
  localparam int N = 128, W = 256, NB = N - 1;
  localparam int NENV = 5;
  localparam int ENVS [NENV] = '{-150, -75, 0, 75, 150};

  logic clk = 1'b0, rst = 1'b1, cmd_valid = 1'b0;
  puf_cmd_t cmd = '0;
  logic busy, done, res_bit;
  logic [NB-1:0] resp;
  logic [15:0] res_diff;
  cfg_t res_cfg;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  puf_core #(.NUM_RO(N), .WINDOW_CYCLES(W)) dut (
    .clk, .rst, .cmd_valid, .cmd, .busy, .done, .resp, .res_bit, .res_diff, .res_cfg);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(puf_op_e op, int p, int c);
    @(posedge clk);
    cmd_valid <= 1'b1;
    cmd <= '{op: op, rsvd: '0, cfg: cfg_t'(c), pair: 16'(p)};
    @(posedge clk);
    cmd_valid <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  // Regenerate at every operating point; return the count of bits that ever
  // differ from the nominal response ref.
  task automatic sweep(input logic [NB-1:0] ref_r, output int unstable);
    logic [NB-1:0] flips;
    flips = '0;
    for (int e = 0; e < NENV; e++) begin
      ro_env_pkg::env_permille = ENVS[e];
      issue(OP_GENERATE, 0, 0);
      flips |= resp ^ ref_r;
    end
    ro_env_pkg::env_permille = 0;
    unstable = $countones(flips);
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] ref_r;
    int u_enr, u_fix [8], sum_fix, min_fix;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    ro_env_pkg::env_permille = 0;

    issue(OP_ENROLL, 0, 0);
    ref_r = resp;
    sweep(ref_r, u_enr);
    $display("enrolled configurations: %0d unstable bits of %0d", u_enr, NB);

    sum_fix = 0; min_fix = NB;
    for (int c = 0; c < 8; c++) begin
      for (int p = 0; p < NB; p++) issue(OP_SETCFG, p, c);
      issue(OP_GENERATE, 0, 0);
      ref_r = resp;
      sweep(ref_r, u_fix[c]);
      $display("fixed configuration %03b: %0d unstable bits", 3'(c), u_fix[c]);
      sum_fix += u_fix[c];
      if (u_fix[c] < min_fix) min_fix = u_fix[c];
    end
    $display("average over fixed configurations: %.1f, best %0d", real'(sum_fix) / 8.0, min_fix);
    check(sum_fix > 0, "operating-point sweep makes fixed-configuration bits flip");
    check(real'(u_enr) < real'(sum_fix) / 8.0, "enrolled configurations are more stable than the average fixed one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
