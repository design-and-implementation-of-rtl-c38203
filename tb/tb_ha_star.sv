// tb_ha_star: exhaustive check of the signed half adder HA*. For every input
// pair it checks the defining relation 2*c - s = p + q, and, reading the same
// gates with all signs inverted, the dual relation -2*c + s = -p - q.
module tb_ha_star;
  logic p, q, c, s;
  int checks = 0, failures = 0;

  ha_star dut (.p(p), .q(q), .c(c), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {p, q} = 2'(v);
      #1;
      checks++;
      if (2 * int'(c) - int'(s) != int'(p) + int'(q)) begin
        failures++;
        $display("FAIL HA* p=%0b q=%0b -> c=%0b s=%0b", p, q, c, s);
      end
      checks++;
      if (-2 * int'(c) + int'(s) != -int'(p) - int'(q)) begin
        failures++;
        $display("FAIL HA* dual p=%0b q=%0b -> c=%0b s=%0b", p, q, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
