// tb_ro_bank: checks the oscillator array.
//
// A bank of six oscillators is run one oscillator at a time in several
// configurations; each measured period must equal the reference period of
// that position (process seed BASE_SEED + i plus the bowl-shaped systematic
// offset). Also checks that disabled oscillators do not toggle and that the
// systematic offset makes the end oscillators slower than the middle ones in
// the reference.
`timescale 1ns / 1ps
module tb_ro_bank;
  localparam int N = 6;
  localparam int unsigned BS = 11;
  localparam int AMP = 40;

  `include "ro_predict.svh"

  logic [N-1:0] en = '0;
  logic [2:0] cfg = '0;
  logic [N-1:0] ro;
  int checks = 0, failures = 0;
  int tog[N];

  ro_bank #(.NUM_RO(N), .BASE_SEED(BS), .CORR_AMP_PS(AMP), .JITTER_PS(0)) dut (.en, .cfg, .ro_out(ro));

  for (genvar i = 0; i < N; i++) begin : g_t
    always @(ro[i]) tog[i]++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    int p, e;
    #5;
    check(ro == '1, "all outputs rest high");
    for (int c = 0; c < 8; c += 3) begin
      for (int i = 0; i < N; i++) begin
        en = '0;
        cfg = 3'(c);
        #20;
        for (int k = 0; k < N; k++) tog[k] = 0;
        en[i] = 1'b1;
        @(posedge ro[i]);
        @(posedge ro[i]);
        t0 = $realtime;
        repeat (8) @(posedge ro[i]);
        t1 = $realtime;
        p = int'((t1 - t0) * 1000.0 / 8.0);
        e = pr_period_ps(BS + i, pr_corr_ps(i, N, AMP), c);
        check(p == e, $sformatf("ro %0d cfg %0d period %0d expected %0d", i, c, p, e));
        for (int k = 0; k < N; k++)
          if (k != i) check(tog[k] == 0, $sformatf("ro %0d toggled while ro %0d ran", k, i));
      end
    end
    check(pr_corr_ps(0, N, AMP) > pr_corr_ps(N / 2, N, AMP), "reference: ends slower than middle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
