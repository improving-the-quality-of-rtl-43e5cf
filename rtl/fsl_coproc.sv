// fsl_coproc: Fast Simplex Link (FSL) front end of the PUF coprocessor.
//
// The PUF is attached to a host processor as a coprocessor over a pair of
// FSL FIFO links. Slave side (host -> PUF): when s_fsl_exists is high the
// block pops one command word (s_fsl_read high for one cycle) and starts the
// core with it. Master side (PUF -> host): when the core reports done, the
// block pushes the reply, one word per cycle while m_fsl_full is low, and
// marks the last word with m_fsl_control. One command is handled at a time.
//
// Command word (puf_pkg::puf_cmd_t): [31:28] op, [18:16] cfg, [15:0] pair.
// Replies (this design's own format):
//   ENROLL, GENERATE : ceil((NUM_RO-1)/32) words; bit k of word w is response
//                      bit 32*w + k (pair 32*w + k), unused bits zero.
//   MEASURE          : [31] response bit, [18:16] cfg, [15:0] |count
//                      difference| (saturated to 16 bits).
//   GETCFG           : [18:16] stored cfg, [15:0] pair.
//   other            : the command word echoed as an acknowledgement.
// Data bits are numbered [31:0] with bit 0 the least significant. The
// command handed to the core (cmd) is the slave FIFO's head word itself,
// valid in the cycle cmd_valid pops it; the core latches what it needs.
`timescale 1ns / 1ps
module fsl_coproc
  import puf_pkg::*;
#(
  parameter int NUM_RO = 128,
  parameter int CNT_W  = 16,
  localparam int NB = NUM_RO - 1
) (
  input  logic             clk,
  input  logic             rst,
  // FSL slave (commands)
  input  logic [FSL_W-1:0] s_fsl_data,
  input  logic             s_fsl_control,
  input  logic             s_fsl_exists,
  output logic             s_fsl_read,
  // FSL master (replies)
  output logic [FSL_W-1:0] m_fsl_data,
  output logic             m_fsl_control,
  output logic             m_fsl_write,
  input  logic             m_fsl_full,
  // PUF core
  output logic             cmd_valid,
  output puf_cmd_t         cmd,
  input  logic             busy,
  input  logic             done,
  input  logic [NB-1:0]    resp,
  input  logic             res_bit,
  input  logic [CNT_W-1:0] res_diff,
  input  cfg_t             res_cfg
);

  localparam int NW = (NB + FSL_W - 1) / FSL_W;
  localparam int WW = (NW > 1) ? $clog2(NW) : 1;

  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_SEND} fstate_e;

  fstate_e  state;
  puf_cmd_t cur;
  logic [WW-1:0] widx;
  logic [WW-1:0] nwords;
  logic [NW*FSL_W-1:0] resp_pad;

  assign resp_pad = (NW * FSL_W)'(resp);

  function automatic logic [15:0] sat16(logic [CNT_W-1:0] v);
    if (CNT_W > 16 && (v >> 16) != '0) return 16'hFFFF;
    return 16'(v);
  endfunction

  assign s_fsl_read = !rst && (state == F_IDLE) && s_fsl_exists && !busy;
  assign cmd_valid  = s_fsl_read;
  assign cmd        = puf_cmd_t'(s_fsl_data);

  always_comb begin
    unique case (cur.op)
      OP_ENROLL, OP_GENERATE: m_fsl_data = resp_pad[widx*FSL_W +: FSL_W];
      OP_MEASURE:  m_fsl_data = {res_bit, 12'd0, res_cfg, sat16(res_diff)};
      OP_GETCFG:   m_fsl_data = {13'd0, res_cfg, cur.pair};
      default:     m_fsl_data = FSL_W'(cur);
    endcase
  end

  assign m_fsl_write   = (state == F_SEND) && !m_fsl_full;
  assign m_fsl_control = (widx == nwords);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= F_IDLE;
      cur    <= '0;
      widx   <= '0;
      nwords <= '0;
    end else begin
      unique case (state)
        F_IDLE: if (s_fsl_read) begin
          cur    <= cmd;
          widx   <= '0;
          nwords <= (cmd.op == OP_ENROLL || cmd.op == OP_GENERATE) ? WW'(NW - 1) : '0;
          state  <= F_WAIT;
        end
        F_WAIT: if (done) state <= F_SEND;
        default: if (m_fsl_write) begin   // F_SEND
          if (widx == nwords) state <= F_IDLE;
          else widx <= widx + 1'b1;
        end
      endcase
    end
  end

  // FSL rules: never push into a full FIFO, never pop an empty one.
  a_no_write_full: assert property (@(posedge clk) disable iff (rst) m_fsl_write |-> !m_fsl_full);
  a_no_read_empty: assert property (@(posedge clk) disable iff (rst) s_fsl_read |-> s_fsl_exists);

  logic unused_ok;
  assign unused_ok = s_fsl_control;

endmodule
