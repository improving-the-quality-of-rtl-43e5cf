// tb_challenge_mem: checks the per-pair configuration table.
//
// Writes random configurations to random entries of a 127-entry table,
// keeping a reference copy, reads every entry back, checks that a cycle
// without write enable changes nothing and that reset clears the table.
`timescale 1ns / 1ps
module tb_challenge_mem;
  localparam int D = 127;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [2:0] wdata = '0, rdata;
  logic [2:0] ref_m [D];
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  challenge_mem #(.DEPTH(D)) dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) ref_m[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 400; t++) begin
      int a;
      a = int'($urandom % D);
      we <= 1'b1; waddr <= 7'(a); wdata <= 3'($urandom);
      @(posedge clk);
      ref_m[a] = wdata;
    end
    we <= 1'b0; waddr <= 7'd0; wdata <= 3'd7;
    @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      raddr = 7'(i);
      #1;
      check(rdata == ref_m[i], $sformatf("entry %0d = %0d expected %0d", i, rdata, ref_m[i]));
    end
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    for (int i = 0; i < D; i += 9) begin
      raddr = 7'(i);
      #1;
      check(rdata == 0, $sformatf("entry %0d not cleared", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
