// tb_mb_encoder: exhaustive check of the Modified Booth encoder. For each of
// the eight triplets the digit d = -2*hi + mid + lo is computed here and the
// selects must satisfy: sign = hi, one = (|d| == 1), two = (|d| == 2),
// cin = (d < 0), and (sign ? -1 : 1) * (one + 2*two) = d.
module tb_mb_encoder;
  import smb_pkg::*;
  mb_triplet_t y;
  mb_sel_t     sel;
  int checks = 0, failures = 0;

  mb_encoder dut (.y(y), .sel(sel));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: y=%b sel=%b", what, y, sel);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int d, mag;
      y = 3'(v);
      #1;
      d   = -2 * int'(y.hi) + int'(y.mid) + int'(y.lo);
      mag = (d < 0) ? -d : d;
      check(sel.sign == y.hi, "sign");
      check(sel.one == (mag == 1), "one");
      check(sel.two == (mag == 2), "two");
      check(sel.cin == (d < 0), "cin");
      check((sel.sign ? -1 : 1) * (int'(sel.one) + 2 * int'(sel.two)) == d, "digit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
