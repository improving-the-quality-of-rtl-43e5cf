// tb_fsl_coproc: checks the FSL front end against a stand-in PUF core.
//
// The testbench feeds command words through a model of the slave FSL FIFO
// (s_fsl_exists with random gaps) and drains replies from a master FIFO
// model that is randomly full. A stand-in core answers each command after a
// random delay with random results. Checks: each command is popped once and
// handed to the core unchanged; each reply has the expected number of words
// and contents for its opcode (four response words for 127 bits, bit 127
// zero); the last word, and only it, carries m_fsl_control; no word is
// written while the FIFO is full; back-pressure and idle gaps both occur.
`timescale 1ns / 1ps
module tb_fsl_coproc;
  import puf_pkg::*;
  localparam int N = 128, NB = N - 1;

  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] s_data, m_data;
  logic s_exists, s_read, m_ctrl, m_write, m_full;
  logic cmd_valid, busy = 1'b0, done = 1'b0, res_bit = 1'b0;
  puf_cmd_t cmd;
  logic [NB-1:0] resp = '0;
  logic [15:0] res_diff = '0;
  cfg_t res_cfg = '0;
  int checks = 0, failures = 0;
  int n_stall = 0, n_gap = 0;

  always #10 clk = ~clk;

  fsl_coproc #(.NUM_RO(N), .CNT_W(16)) dut (
    .clk, .rst,
    .s_fsl_data(s_data), .s_fsl_control(1'b0), .s_fsl_exists(s_exists), .s_fsl_read(s_read),
    .m_fsl_data(m_data), .m_fsl_control(m_ctrl), .m_fsl_write(m_write), .m_fsl_full(m_full),
    .cmd_valid, .cmd, .busy, .done, .resp, .res_bit, .res_diff, .res_cfg);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // command FIFO model
  logic [31:0] cmem [64];
  int head = 0, tail = 0;
  bit gap;
  always @(posedge clk) gap <= ($urandom % 4) == 0;
  assign s_exists = (head != tail) && !gap;
  assign s_data   = cmem[head % 64];
  always @(posedge clk) begin
    if (s_read) head <= head + 1;
    if (head != tail && gap) n_gap++;
  end

  // reply FIFO model
  logic [31:0] rq[$];
  bit rlast[$];
  bit pending = 1'b0;
  always @(posedge clk) m_full <= ($urandom % 3) == 0;
  always @(posedge clk) begin
    if (m_write) begin rq.push_back(m_data); rlast.push_back(m_ctrl); end
    if (done) pending <= 1'b1;
    else if (m_write && m_ctrl) pending <= 1'b0;
    if (m_full && pending) n_stall++;
  end

  // stand-in core
  puf_cmd_t seen[$];
  int dly = 0;
  always @(posedge clk) begin
    done <= 1'b0;
    if (cmd_valid) begin
      check(!busy, "command issued while busy");
      seen.push_back(cmd);
      busy <= 1'b1;
      dly  <= 3 + int'($urandom % 15);
    end else if (dly > 1) begin
      dly <= dly - 1;
    end else if (dly == 1) begin
      dly      <= 0;
      resp     <= NB'({$urandom, $urandom, $urandom, $urandom});
      res_bit  <= 1'($urandom);
      res_diff <= 16'($urandom);
      res_cfg  <= 3'($urandom);
      done     <= 1'b1;
      busy     <= 1'b0;
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    puf_cmd_t c;
    int nw;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      c = '{op: puf_op_e'(1 + t % 5), rsvd: '0, cfg: cfg_t'($urandom), pair: 16'($urandom % NB)};
      rq.delete(); rlast.delete(); seen.delete();
      cmem[tail % 64] = 32'(c);
      tail = tail + 1;
      nw = (c.op == OP_ENROLL || c.op == OP_GENERATE) ? 4 : 1;
      while (rq.size() < nw) @(posedge clk);
      repeat (5) @(posedge clk);
      check(seen.size() == 1 && seen[0] == c, $sformatf("command %0d passed to core", t));
      check(rq.size() == nw, $sformatf("reply of op %0d has %0d words", c.op, rq.size()));
      for (int w = 0; w < nw; w++)
        check(rlast[w] == (w == nw - 1), "control marks the last word only");
      unique case (c.op)
        OP_ENROLL, OP_GENERATE: begin
          for (int w = 0; w < 4; w++)
            check(rq[w] == 32'({1'b0, resp} >> (32 * w)), $sformatf("response word %0d", w));
        end
        OP_MEASURE: check(rq[0] == {res_bit, 12'd0, res_cfg, res_diff}, "measure reply");
        OP_GETCFG:  check(rq[0] == {13'd0, res_cfg, c.pair}, "getcfg reply");
        default:    check(rq[0] == 32'(c), "acknowledge echoes the command");
      endcase
    end
    check(n_stall > 0, "reply back-pressure occurred");
    check(n_gap > 0, "command gaps occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (m_write && m_full) begin failures++; $display("FAIL: write while full"); end
endmodule
