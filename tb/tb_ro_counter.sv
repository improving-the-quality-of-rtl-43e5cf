// tb_ro_counter: checks the oscillator edge counter.
//
// Drives bursts of a known number of rising edges and checks the count,
// the asynchronous clear (without any clock edge), and saturation of a
// narrow 4-bit instance at 15.
`timescale 1ns / 1ps
module tb_ro_counter;
  logic rclk = 1'b0, clr = 1'b0;
  logic [15:0] cnt;
  logic [3:0]  cnt4;
  int checks = 0, failures = 0;

  ro_counter #(.CNT_W(16)) dut  (.ro_clk(rclk), .clr(clr), .count(cnt));
  ro_counter #(.CNT_W(4))  dut4 (.ro_clk(rclk), .clr(clr), .count(cnt4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulses(int n);
    repeat (n) begin #1.3 rclk = 1'b1; #1.7 rclk = 1'b0; end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #2 clr = 1'b1;
    #3 clr = 1'b0;
    #5;
    check(cnt == 0, "cleared");
    for (int t = 0; t < 20; t++) begin
      n = 1 + int'($urandom % 300);
      clr = 1'b1; #2; clr = 1'b0; #2;
      check(cnt == 0 && cnt4 == 0, "async clear");
      pulses(n);
      #1;
      check(cnt == 16'(n), $sformatf("count %0d expected %0d", cnt, n));
      check(cnt4 == 4'((n > 15) ? 15 : n), $sformatf("4-bit count %0d for %0d edges", cnt4, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
