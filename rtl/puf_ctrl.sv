// puf_ctrl: measurement sequencer of the configurable-RO PUF.
//
// One measurement of pair i in configuration c takes WINDOW_CYCLES + 7
// clock cycles: the oscillators are stopped and the two counters cleared
// (CLEAR, 2 cycles), pair i runs for exactly WINDOW_CYCLES (RUN), it is
// stopped and the last edges settle (SETTLE, 4 cycles), and the comparison is
// taken (EVAL, 1 cycle). run and cnt_clr are registered copies of the state
// and lag it by one cycle.
//
// Commands (puf_pkg::puf_op_e), accepted in IDLE when cmd_valid is high:
//   ENROLL   - for every pair 0..NUM_RO-2, measure all eight configurations,
//              keep the one with the largest |count difference| (max_diff_select),
//              write it into the challenge table and its bit into resp.
//              Takes (NUM_RO-1) * (8 * (WINDOW_CYCLES + 7) + 1) cycles.
//   GENERATE - for every pair, measure once in its stored configuration and
//              write the bit into resp. (NUM_RO-1) * (WINDOW_CYCLES + 7) cycles.
//   MEASURE  - measure cmd.pair in cmd.cfg; result in res_bit / res_diff.
//   SETCFG   - write cmd.cfg into the table entry of cmd.pair.
//   GETCFG   - read the table entry of cmd.pair into res_cfg.
// done pulses for one cycle when a command has finished, two cycles after the
// last measurement (one DONE state, one register); busy is high from the
// cycle after acceptance until done. The sweep over all adjacent pairs and
// the choice of the maximum-difference configuration follow the PUF method;
// window length, settle time and the command set are this design's choices.
`timescale 1ns / 1ps
module puf_ctrl
  import puf_pkg::*;
#(
  parameter int NUM_RO        = 128,
  parameter int WINDOW_CYCLES = 2048,
  parameter int CNT_W         = 16,
  localparam int PW = (NUM_RO > 2) ? $clog2(NUM_RO) : 1,
  localparam int NB = NUM_RO - 1
) (
  input  logic            clk,
  input  logic            rst,
  // command side
  input  logic            cmd_valid,
  input  puf_cmd_t        cmd,
  output logic            busy,
  output logic            done,
  output logic [NB-1:0]   resp,
  output logic            res_bit,
  output logic [CNT_W-1:0] res_diff,
  output cfg_t            res_cfg,
  // oscillator datapath side
  output logic            run,
  output logic            cnt_clr,
  output logic [PW-1:0]   pair,
  output cfg_t            cfg,
  input  logic            cmp_bit,
  input  logic [CNT_W-1:0] cmp_diff
);

  localparam int CLEAR_CYCLES  = 2;
  localparam int SETTLE_CYCLES = 4;
  localparam int TW = $clog2(WINDOW_CYCLES + 1);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_SETTLE, S_EVAL, S_STORE, S_DONE} state_e;

  state_e    state;
  puf_op_e   op;
  logic [TW-1:0] timer;

  // enrollment: best configuration of the current pair
  logic       sel_clr, sel_valid;
  cfg_t       best_cfg;
  logic [CNT_W-1:0] best_diff;
  logic       best_bit, best_ok;

  // challenge table
  logic       mem_we;
  logic [PW-1:0] mem_waddr, mem_raddr;
  cfg_t       mem_wdata, mem_rdata;

  logic last_pair;
  assign last_pair = (pair == PW'(NB - 1));

  max_diff_select #(.CNT_W(CNT_W)) u_sel (
    .clk, .rst,
    .clr       (sel_clr),
    .valid     (sel_valid),
    .cfg       (cfg),
    .diff      (cmp_diff),
    .bit_i     (cmp_bit),
    .best_cfg  (best_cfg),
    .best_diff (best_diff),
    .best_bit  (best_bit),
    .best_ok   (best_ok)
  );

  challenge_mem #(.DEPTH(NB)) u_mem (
    .clk, .rst,
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .raddr (mem_raddr),
    .rdata (mem_rdata)
  );

  // Table read address: the next pair while generating, else the command's pair.
  always_comb begin
    mem_raddr = pair;
    if (state == S_IDLE) mem_raddr = (cmd.op == OP_GENERATE) ? '0 : PW'(cmd.pair);
    else if (state == S_EVAL) mem_raddr = last_pair ? pair : pair + 1'b1;
  end

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = pair;
    mem_wdata = best_cfg;
    if (state == S_STORE && op == OP_ENROLL) mem_we = 1'b1;
    if (state == S_IDLE && cmd_valid && cmd.op == OP_SETCFG) begin
      mem_we    = 1'b1;
      mem_waddr = PW'(cmd.pair);
      mem_wdata = cmd.cfg;
    end
  end

  assign sel_valid = (state == S_EVAL) && (op == OP_ENROLL);
  assign sel_clr   = (state == S_IDLE) || (state == S_STORE);
  // Oscillator enable and counter clear are registered so that the
  // asynchronous clear of the counters is glitch-free. Both lag the state by
  // one cycle, so the window length is unchanged.
  always_ff @(posedge clk) begin
    if (rst) begin
      run     <= 1'b0;
      cnt_clr <= 1'b1;
    end else begin
      run     <= (state == S_RUN);
      cnt_clr <= (state == S_CLEAR);
    end
  end
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      op       <= OP_NOP;
      timer    <= '0;
      pair     <= '0;
      cfg      <= '0;
      done     <= 1'b0;
      resp     <= '0;
      res_bit  <= 1'b0;
      res_diff <= '0;
      res_cfg  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op    <= cmd.op;
          pair  <= PW'(cmd.pair);
          timer <= TW'(CLEAR_CYCLES - 1);
          unique case (cmd.op)
            OP_ENROLL:   begin pair <= '0; cfg <= '0;        state <= S_CLEAR; end
            OP_GENERATE: begin pair <= '0; cfg <= mem_rdata; state <= S_CLEAR; end
            OP_MEASURE:  begin cfg <= cmd.cfg;               state <= S_CLEAR; end
            OP_GETCFG:   begin res_cfg <= mem_rdata;         state <= S_DONE;  end
            default:     state <= S_DONE;   // SETCFG writes this cycle; NOP
          endcase
        end
        S_CLEAR: begin
          timer <= timer - 1'b1;
          if (timer == '0) begin
            timer <= TW'(WINDOW_CYCLES - 1);
            state <= S_RUN;
          end
        end
        S_RUN: begin
          timer <= timer - 1'b1;
          if (timer == '0) begin
            timer <= TW'(SETTLE_CYCLES - 1);
            state <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          timer <= timer - 1'b1;
          if (timer == '0) state <= S_EVAL;
        end
        S_EVAL: begin
          timer <= TW'(CLEAR_CYCLES - 1);
          unique case (op)
            OP_ENROLL: begin
              if (cfg == cfg_t'(NUM_CFG - 1)) state <= S_STORE;
              else begin
                cfg   <= cfg + 1'b1;
                state <= S_CLEAR;
              end
            end
            OP_GENERATE: begin
              resp[pair] <= cmp_bit;
              if (last_pair) state <= S_DONE;
              else begin
                pair  <= pair + 1'b1;
                cfg   <= mem_rdata;
                state <= S_CLEAR;
              end
            end
            default: begin  // OP_MEASURE
              res_bit  <= cmp_bit;
              res_diff <= cmp_diff;
              res_cfg  <= cfg;
              state    <= S_DONE;
            end
          endcase
        end
        S_STORE: begin  // enrollment: best of eight is now registered
          resp[pair] <= best_bit;
          cfg        <= '0;
          if (last_pair) state <= S_DONE;
          else begin
            pair  <= pair + 1'b1;
            state <= S_CLEAR;
          end
        end
        default: begin  // S_DONE
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  // The enrollment result must come from a real measurement.
  a_best_ok: assert property (@(posedge clk) disable iff (rst)
    (state == S_STORE) |-> best_ok);

endmodule
