// tb_max_diff_select: checks the maximum-difference tracker.
//
// Feeds groups of eight (configuration, difference, bit) entries, some with
// deliberate ties, and checks that the result is the first entry with the
// largest difference, one cycle after the last entry, and that clr starts a
// fresh group.
`timescale 1ns / 1ps
module tb_max_diff_select;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, valid = 1'b0, bi = 1'b0;
  logic [2:0] cfg = '0, bc;
  logic [15:0] diff = '0, bd;
  logic bb, bok;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  max_diff_select #(.CNT_W(16)) dut (.clk, .rst, .clr, .valid, .cfg, .diff, .bit_i(bi),
    .best_cfg(bc), .best_diff(bd), .best_bit(bb), .best_ok(bok));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d[8]; bit b[8];
    int mx, mi;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int g = 0; g < 40; g++) begin
      @(posedge clk) clr <= 1'b1;
      @(posedge clk) clr <= 1'b0;
      for (int c = 0; c < 8; c++) begin
        d[c] = (g % 3 == 0) ? int'($urandom % 4) : int'($urandom % 500);
        b[c] = 1'($urandom);
      end
      mx = -1; mi = 0;
      for (int c = 0; c < 8; c++) if (d[c] > mx) begin mx = d[c]; mi = c; end
      for (int c = 0; c < 8; c++) begin
        valid <= 1'b1; cfg <= 3'(c); diff <= 16'(d[c]); bi <= b[c];
        @(posedge clk);
      end
      valid <= 1'b0;
      @(negedge clk);
      checks++;
      if (!bok || int'(bc) != mi || int'(bd) != mx || bb != b[mi]) begin
        failures++;
        $display("FAIL: group %0d got cfg %0d diff %0d bit %0d, expected cfg %0d diff %0d bit %0d",
                 g, bc, bd, bb, mi, mx, b[mi]);
      end
    end
    @(posedge clk) clr <= 1'b1;
    @(posedge clk) clr <= 1'b0;
    @(negedge clk);
    checks++;
    if (bok || bd != 0) begin failures++; $display("FAIL: clr did not reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
