// puf_core: the configurable-RO PUF datapath and its sequencer.
//
// NUM_RO configurable ring oscillators (ro_bank) share one configuration
// c1c2c3. For response bit i, ro_pair_select starts oscillators i and i+1
// and routes them to two edge counters (ro_counter); after a window of
// WINDOW_CYCLES system clocks the pair is stopped and freq_compare gives the
// bit (count a > count b) and the difference |a - b|. puf_ctrl sequences the
// measurements: enrollment tries all eight configurations of every adjacent
// pair and keeps the one with the largest difference as that pair's challenge;
// generation re-measures each pair in its stored configuration. The command
// interface and timing are those of puf_ctrl.
//
// BASE_SEED, CORR_AMP_PS and JITTER_PS only shape the oscillator simulation
// model (process variation, spatially correlated variation, noise); different
// BASE_SEED values stand for different chips.
`timescale 1ns / 1ps
module puf_core
  import puf_pkg::*;
#(
  parameter int          NUM_RO        = 128,
  parameter int          WINDOW_CYCLES = 2048,
  parameter int          CNT_W         = 16,
  parameter int unsigned BASE_SEED     = 1,
  parameter int          CORR_AMP_PS   = 40,
  parameter int          JITTER_PS     = 8,
  localparam int NB = NUM_RO - 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cmd_valid,
  input  puf_cmd_t         cmd,
  output logic             busy,
  output logic             done,
  output logic [NB-1:0]    resp,
  output logic             res_bit,
  output logic [CNT_W-1:0] res_diff,
  output cfg_t             res_cfg
);

  localparam int PW = (NUM_RO > 2) ? $clog2(NUM_RO) : 1;

  logic              run, cnt_clr, cmp_bit, ro_a, ro_b;
  logic [PW-1:0]     pair;
  cfg_t              cfg;
  logic [NUM_RO-1:0] ro_en, ro_out;
  logic [CNT_W-1:0]  cnt_a, cnt_b, cmp_diff;

  ro_bank #(
    .NUM_RO      (NUM_RO),
    .BASE_SEED   (BASE_SEED),
    .CORR_AMP_PS (CORR_AMP_PS),
    .JITTER_PS   (JITTER_PS)
  ) u_bank (
    .en     (ro_en),
    .cfg    (cfg),
    .ro_out (ro_out)
  );

  ro_pair_select #(.NUM_RO(NUM_RO)) u_pairsel (
    .run   (run),
    .pair  (pair),
    .ro_in (ro_out),
    .ro_en (ro_en),
    .ro_a  (ro_a),
    .ro_b  (ro_b)
  );

  ro_counter #(.CNT_W(CNT_W)) u_cnt_a (.ro_clk(ro_a), .clr(cnt_clr), .count(cnt_a));
  ro_counter #(.CNT_W(CNT_W)) u_cnt_b (.ro_clk(ro_b), .clr(cnt_clr), .count(cnt_b));

  freq_compare #(.CNT_W(CNT_W)) u_cmp (
    .cnt_a (cnt_a),
    .cnt_b (cnt_b),
    .bit_o (cmp_bit),
    .diff  (cmp_diff)
  );

  puf_ctrl #(
    .NUM_RO        (NUM_RO),
    .WINDOW_CYCLES (WINDOW_CYCLES),
    .CNT_W         (CNT_W)
  ) u_ctrl (
    .clk, .rst,
    .cmd_valid, .cmd, .busy, .done, .resp, .res_bit, .res_diff, .res_cfg,
    .run, .cnt_clr, .pair, .cfg, .cmp_bit, .cmp_diff
  );

endmodule
