// tb_freq_compare: checks the count comparator.
//
// Random and corner count pairs: the bit must be 1 exactly when count a is
// larger, and diff must be the absolute difference.
`timescale 1ns / 1ps
module tb_freq_compare;
  logic [15:0] a, b, d;
  logic bo;
  int checks = 0, failures = 0;

  freq_compare #(.CNT_W(16)) dut (.cnt_a(a), .cnt_b(b), .bit_o(bo), .diff(d));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int t = 0; t < 300; t++) begin
      ea = int'($urandom % 65536);
      eb = (t % 5 == 0) ? ea : ((t % 7 == 0) ? ea + 1 - 2 * (t % 2) : int'($urandom % 65536));
      if (eb < 0) eb = 0;
      if (eb > 65535) eb = 65535;
      a = 16'(ea); b = 16'(eb);
      #1;
      checks++;
      if (bo !== (ea > eb) || int'(d) != ((ea > eb) ? ea - eb : eb - ea)) begin
        failures++;
        $display("FAIL: a=%0d b=%0d bit=%0d diff=%0d", ea, eb, bo, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
