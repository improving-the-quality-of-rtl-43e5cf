// puf_pkg: types and constants shared by the configurable-RO PUF.
//
// A configurable ring oscillator has three 2:1 stage multiplexers driven by
// c1, c2, c3, so every RO can be set to one of eight loops (cfg_t). The
// command word that the host sends over the FSL link carries an opcode, a
// configuration and a pair index; the layout is this design's own:
//   [31:28] opcode   [18:16] configuration c1c2c3   [15:0] pair index
`timescale 1ns / 1ps
package puf_pkg;

  localparam int CFG_W   = 3;            // c1, c2, c3
  localparam int NUM_CFG = 1 << CFG_W;   // eight RO configurations
  localparam int FSL_W   = 32;           // FSL data width

  typedef logic [CFG_W-1:0] cfg_t;

  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_ENROLL   = 4'd1,  // sweep all configurations of every pair, store the best
    OP_GENERATE = 4'd2,  // regenerate the response with the stored configurations
    OP_MEASURE  = 4'd3,  // one pair, one given configuration
    OP_SETCFG   = 4'd4,  // load a stored configuration (challenge) for one pair
    OP_GETCFG   = 4'd5   // read back the stored configuration of one pair
  } puf_op_e;

  typedef struct packed {
    puf_op_e     op;
    logic [8:0]  rsvd;
    cfg_t        cfg;
    logic [15:0] pair;
  } puf_cmd_t;

endpackage
