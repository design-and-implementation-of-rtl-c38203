// tb_fa_star: exhaustive check of the signed full adder FA*: for all eight
// inputs, 2*co - s must equal p - q + ci.
module tb_fa_star;
  logic p, q, ci, co, s;
  int checks = 0, failures = 0;

  fa_star dut (.p(p), .q(q), .ci(ci), .co(co), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {p, q, ci} = 3'(v);
      #1;
      checks++;
      if (2 * int'(co) - int'(s) != int'(p) - int'(q) + int'(ci)) begin
        failures++;
        $display("FAIL FA* p=%0b q=%0b ci=%0b -> co=%0b s=%0b", p, q, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
