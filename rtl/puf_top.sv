// puf_top: ring-oscillator PUF coprocessor with configurable oscillators.
//
// A host sends command words over an FSL link; the PUF answers over a second
// FSL link (see fsl_coproc for the word formats, puf_ctrl for the commands
// and their cycle counts). Inside, NUM_RO configurable ring oscillators give
// NUM_RO-1 response bits, one per adjacent pair; enrollment picks, per pair,
// the one of eight oscillator configurations with the largest frequency
// difference, and generation reproduces the response with those
// configurations. With the defaults (128 oscillators, 2048-cycle window) a
// full enrollment takes 127 * (8 * 2055 + 1) = 2,088,007 cycles and a
// generation 127 * 2055 = 260,985 cycles, plus a few cycles of command and
// reply handling. The oscillators are a simulation model (config_ro); the
// model-only parameters BASE_SEED, CORR_AMP_PS and JITTER_PS set the
// simulated chip.
`timescale 1ns / 1ps
module puf_top
  import puf_pkg::*;
#(
  parameter int          NUM_RO        = 128,
  parameter int          WINDOW_CYCLES = 2048,
  parameter int          CNT_W         = 16,
  parameter int unsigned BASE_SEED     = 1,
  parameter int          CORR_AMP_PS   = 40,
  parameter int          JITTER_PS     = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [FSL_W-1:0] s_fsl_data,
  input  logic             s_fsl_control,
  input  logic             s_fsl_exists,
  output logic             s_fsl_read,
  output logic [FSL_W-1:0] m_fsl_data,
  output logic             m_fsl_control,
  output logic             m_fsl_write,
  input  logic             m_fsl_full
);

  localparam int NB = NUM_RO - 1;

  logic             cmd_valid, busy, done, res_bit;
  puf_cmd_t         cmd;
  logic [NB-1:0]    resp;
  logic [CNT_W-1:0] res_diff;
  cfg_t             res_cfg;

  fsl_coproc #(.NUM_RO(NUM_RO), .CNT_W(CNT_W)) u_fsl (
    .clk, .rst,
    .s_fsl_data, .s_fsl_control, .s_fsl_exists, .s_fsl_read,
    .m_fsl_data, .m_fsl_control, .m_fsl_write, .m_fsl_full,
    .cmd_valid, .cmd, .busy, .done, .resp, .res_bit, .res_diff, .res_cfg
  );

  puf_core #(
    .NUM_RO        (NUM_RO),
    .WINDOW_CYCLES (WINDOW_CYCLES),
    .CNT_W         (CNT_W),
    .BASE_SEED     (BASE_SEED),
    .CORR_AMP_PS   (CORR_AMP_PS),
    .JITTER_PS     (JITTER_PS)
  ) u_core (
    .clk, .rst,
    .cmd_valid, .cmd, .busy, .done, .resp, .res_bit, .res_diff, .res_cfg
  );

endmodule
