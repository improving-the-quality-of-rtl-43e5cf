// tb_config_ro: checks the configurable ring-oscillator model.
//
// For each of the eight configurations c1c2c3 the oscillator is started and
// the time between rising edges is measured and compared with the period
// predicted from the same delay recipe, recomputed here: half period =
// AND delay + systematic offset + three times (inverter + mux), where the
// inverter of stage s chosen by its select has a hashed process offset.
// Jitter is off so the comparison is exact. It also checks that the output
// rests high and stops toggling while the enable is low, and that the eight
// configurations do not all give the same period. Finally the operating
// point of the model is moved and the periods compared with the reference
// including each inverter's sensitivity.
`timescale 1ns / 1ps
module tb_config_ro;
  localparam int unsigned SEED = 7;
  localparam int CORR = 25;

  logic en = 1'b0;
  logic [2:0] cfg = '0;
  logic ro;
  int checks = 0, failures = 0;

  config_ro #(.SEED(SEED), .CORR_PS(CORR), .JITTER_PS(0)) dut (.en(en), .cfg(cfg), .ro_out(ro));

  function automatic int unsigned h(int unsigned s, int unsigned k);
    int unsigned x;
    x = (s * 32'h9E3779B1) ^ (k * 32'h85EBCA6B);
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12);
    return x;
  endfunction

  // env: operating point in parts per thousand; each inverter's sensitivity
  // is (90..110) % of it, from the hash with index k + 16.
  function automatic int expect_period_ps(int c, int env = 0);
    int d;
    d = 700 + CORR;
    for (int st = 0; st < 3; st++) begin
      int sel, k, base, sens;
      sel = (c >> (2 - st)) & 1;
      k = 2 * st + sel;
      base = 600 + int'(h(SEED, k) % 61) - 30;
      sens = 90 + int'(h(SEED, k + 16) % 21);
      d += base + (base * env * sens) / 100_000 + 400;
    end
    return 2 * d;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int toggles;
  always @(ro) toggles++;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    int per[8];
    bit differ;
    #5;
    check(ro == 1'b1, "output rests high while disabled");
    for (int c = 0; c < 8; c++) begin
      en = 1'b0;
      cfg = 3'(c);
      #20;
      en = 1'b1;
      @(posedge ro);   // first full cycle
      @(posedge ro);
      t0 = $realtime;
      repeat (10) @(posedge ro);
      t1 = $realtime;
      per[c] = int'((t1 - t0) * 1000.0 / 10.0);
      check(per[c] == expect_period_ps(c),
            $sformatf("cfg %0d period %0d ps, expected %0d ps", c, per[c], expect_period_ps(c)));
    end
    // operating-point sensitivity
    for (int t = 0; t < 4; t++) begin
      int env, c, pe;
      env = (t % 2) ? -120 : 150;
      c = (t * 3) % 8;
      en = 1'b0;
      ro_env_pkg::env_permille = env;
      cfg = 3'(c);
      #20;
      en = 1'b1;
      @(posedge ro);
      @(posedge ro);
      t0 = $realtime;
      repeat (10) @(posedge ro);
      t1 = $realtime;
      pe = int'((t1 - t0) * 1000.0 / 10.0);
      check(pe == expect_period_ps(c, env),
            $sformatf("cfg %0d env %0d: period %0d ps, expected %0d ps", c, env, pe, expect_period_ps(c, env)));
    end
    ro_env_pkg::env_permille = 0;
    en = 1'b0;
    #20;
    check(ro == 1'b1, "output high after stop");
    toggles = 0;
    #200;
    check(toggles == 0, "no toggles while disabled");
    differ = 0;
    for (int c = 1; c < 8; c++) if (per[c] != per[0]) differ = 1;
    check(differ, "configurations give different periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
