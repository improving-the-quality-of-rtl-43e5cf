// tb_ro_pair_select: checks adjacent-pair selection.
//
// For every pair index of an eight-oscillator bank, with run high and low and
// random oscillator levels: exactly oscillators i and i+1 are enabled while
// run is high, none while it is low, and the outputs route ro_in[i] and
// ro_in[i+1].
`timescale 1ns / 1ps
module tb_ro_pair_select;
  localparam int N = 8;
  logic run;
  logic [2:0] pair;
  logic [N-1:0] ro_in, ro_en;
  logic a, b;
  int checks = 0, failures = 0;

  ro_pair_select #(.NUM_RO(N)) dut (.run, .pair, .ro_in, .ro_en, .ro_a(a), .ro_b(b));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_en;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < N - 1; i++)
        for (int t = 0; t < 8; t++) begin
          run = 1'(r); pair = 3'(i); ro_in = N'($urandom);
          #1;
          exp_en = r ? (N'(3) << i) : '0;
          checks++;
          if (ro_en != exp_en || a != ro_in[i] || b != ro_in[i+1]) begin
            failures++;
            $display("FAIL: run %0d pair %0d en %b a %b b %b in %b", r, i, ro_en, a, b, ro_in);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
