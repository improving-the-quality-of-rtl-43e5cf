// freq_compare: turns two oscillator counts into a response bit.
//
// bit_o is 1 when oscillator i (count a) ran faster than its neighbour
// (count b), 0 otherwise, ties included. diff is the magnitude of the
// frequency difference |a - b| in counts; the enrollment logic keeps the
// configuration where it is largest. The polarity and tie rule are this
// design's choice. Combinational.
`timescale 1ns / 1ps
module freq_compare #(
  parameter int CNT_W = 16
) (
  input  logic [CNT_W-1:0] cnt_a,
  input  logic [CNT_W-1:0] cnt_b,
  output logic             bit_o,
  output logic [CNT_W-1:0] diff
);

  always_comb begin
    bit_o = cnt_a > cnt_b;
    diff  = bit_o ? cnt_a - cnt_b : cnt_b - cnt_a;
  end

endmodule
