// ro_pair_select: chooses the adjacent oscillator pair for one response bit.
//
// Response bit i compares oscillator i with its neighbour i+1, so a PUF of
// NUM_RO oscillators gives NUM_RO-1 bits and every compared pair sits side by
// side, where spatially correlated variation is smallest. This block decodes
// the pair index into enables (only oscillators i and i+1 run, and only while
// run is high) and multiplexes the two outputs toward the counters:
// ro_a = ro_in[i], ro_b = ro_in[i+1]. Running only the measured pair is this
// design's choice. Purely combinational; pair must stay below NUM_RO-1.
`timescale 1ns / 1ps
module ro_pair_select #(
  parameter int NUM_RO = 128,
  localparam int PW = (NUM_RO > 2) ? $clog2(NUM_RO) : 1
) (
  input  logic              run,
  input  logic [PW-1:0]     pair,
  input  logic [NUM_RO-1:0] ro_in,
  output logic [NUM_RO-1:0] ro_en,
  output logic              ro_a,
  output logic              ro_b
);

  logic          valid;
  logic [PW-1:0] pair_b;

  assign valid  = int'(pair) < NUM_RO - 1;
  assign pair_b = pair + 1'b1;

  // Enable decode: bits i and i+1 of a two-bit mask shifted to the pair.
  always_comb begin
    ro_en = '0;
    if (valid) ro_en = {{(NUM_RO - 2){1'b0}}, {2{run}}} << pair;
  end

  assign ro_a = valid ? ro_in[pair]   : 1'b0;
  assign ro_b = valid ? ro_in[pair_b] : 1'b0;

endmodule
