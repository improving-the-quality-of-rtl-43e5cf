// tb_puf_uniqueness: uniqueness of the PUF over several simulated chips.
//
// Three PUF cores of 64 oscillators (63 response bits) stand for three chips:
// same design, different process seeds, the same bowl-shaped systematic
// variation. Each chip is enrolled and regenerated. The uniqueness is the
// mean, over all chip pairs, of the Hamming distance between their responses
// as a percentage of the response length; the ideal is 50 %. Checks that
// every chip regenerates its enrolled response, that the uniqueness lies
// between 30 % and 70 %, and that no two chips give the same response.
// A 256-cycle window keeps the run short.
`timescale 1ns / 1ps
module tb_puf_uniqueness;
  import puf_pkg::*;
  localparam int N = 64, W = 256, NB = N - 1, K = 3;

  logic clk = 1'b0, rst = 1'b1, cmd_valid = 1'b0;
  puf_cmd_t cmd = '0;
  logic [K-1:0] busy, done, res_bit;
  logic [NB-1:0] resp [K];
  logic [15:0] res_diff [K];
  cfg_t res_cfg [K];
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  for (genvar k = 0; k < K; k++) begin : g_chip
    puf_core #(.NUM_RO(N), .WINDOW_CYCLES(W), .BASE_SEED(1000 * (k + 1))) u_chip (
      .clk, .rst, .cmd_valid, .cmd, .busy(busy[k]), .done(done[k]), .resp(resp[k]),
      .res_bit(res_bit[k]), .res_diff(res_diff[k]), .res_cfg(res_cfg[k]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(puf_op_e op);
    @(posedge clk);
    cmd_valid <= 1'b1;
    cmd <= '{op: op, rsvd: '0, cfg: '0, pair: '0};
    @(posedge clk);
    cmd_valid <= 1'b0;
    while (!done[0]) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] enr [K];
    real u;
    int hd;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    issue(OP_ENROLL);
    for (int k = 0; k < K; k++) enr[k] = resp[k];
    issue(OP_GENERATE);
    for (int k = 0; k < K; k++)
      check(resp[k] == enr[k], $sformatf("chip %0d regenerates its response", k));
    u = 0.0;
    for (int i = 0; i < K - 1; i++)
      for (int j = i + 1; j < K; j++) begin
        hd = $countones(enr[i] ^ enr[j]);
        check(hd > 0, $sformatf("chips %0d and %0d differ", i, j));
        $display("chips %0d,%0d: Hamming distance %0d of %0d bits", i, j, hd, NB);
        u += 100.0 * real'(hd) / real'(NB);
      end
    u = u * 2.0 / real'(K * (K - 1));
    $display("uniqueness %.1f %%", u);
    check(u > 30.0 && u < 70.0, "uniqueness near 50 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
