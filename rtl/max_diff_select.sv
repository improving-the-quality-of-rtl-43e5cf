// max_diff_select: keeps the most reliable configuration of one pair.
//
// During enrollment each adjacent pair is measured in all eight
// configurations. The bit whose two frequencies are furthest apart is the one
// least likely to flip under voltage or temperature change, so that
// configuration becomes the pair's challenge. clr starts a new pair; each
// valid cycle offers one measured configuration (cfg, diff, bit_i); the block
// replaces its best entry when diff is strictly larger, so a tie keeps the
// earlier configuration (this design's choice). Outputs are registered and
// show the result one cycle after the last valid. clr has priority.
`timescale 1ns / 1ps
module max_diff_select #(
  parameter int CNT_W = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clr,
  input  logic                      valid,
  input  logic [puf_pkg::CFG_W-1:0] cfg,
  input  logic [CNT_W-1:0]          diff,
  input  logic                      bit_i,
  output logic [puf_pkg::CFG_W-1:0] best_cfg,
  output logic [CNT_W-1:0]          best_diff,
  output logic                      best_bit,
  output logic                      best_ok
);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      best_cfg  <= '0;
      best_diff <= '0;
      best_bit  <= 1'b0;
      best_ok   <= 1'b0;
    end else if (valid && (!best_ok || diff > best_diff)) begin
      best_cfg  <= cfg;
      best_diff <= diff;
      best_bit  <= bit_i;
      best_ok   <= 1'b1;
    end
  end

endmodule
