// tb_csa_tree: checks the Wallace carry-save tree. The two output rows must
// add up, modulo 2^W, to the sum of all input rows, computed here with plain
// integer addition. Runs the default (12 rows of 40 bits) and a 3-row and
// a 7-row instance, on random rows and on all-ones rows.
module tb_csa_tree;
  logic [39:0] r12 [12];
  logic [39:0] s12, c12;
  logic [15:0] r3 [3];
  logic [15:0] s3, c3;
  logic [20:0] r7 [7];
  logic [20:0] s7, c7;
  int checks = 0, failures = 0;

  csa_tree dut (.rows(r12), .sum(s12), .carry(c12));
  csa_tree #(.ROWS(3), .W(16)) dut3 (.rows(r3), .sum(s3), .carry(c3));
  csa_tree #(.ROWS(7), .W(21)) dut7 (.rows(r7), .sum(s7), .carry(c7));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [39:0] e12;
      logic [15:0] e3;
      logic [20:0] e7;
      e12 = '0;
      e3  = '0;
      e7  = '0;
      for (int i = 0; i < 12; i++) begin
        r12[i] = (t == 0) ? '1 : {8'($urandom), 32'($urandom)};
        e12 += r12[i];
      end
      for (int i = 0; i < 3; i++) begin
        r3[i] = (t == 0) ? '1 : 16'($urandom);
        e3 += r3[i];
      end
      for (int i = 0; i < 7; i++) begin
        r7[i] = (t == 0) ? '1 : 21'($urandom);
        e7 += r7[i];
      end
      #1;
      checks += 3;
      if (40'(s12 + c12) != e12) begin
        failures++;
        $display("FAIL 12 rows: %h + %h != %h", s12, c12, e12);
      end
      if (16'(s3 + c3) != e3) begin
        failures++;
        $display("FAIL 3 rows: %h + %h != %h", s3, c3, e3);
      end
      if (21'(s7 + c7) != e7) begin
        failures++;
        $display("FAIL 7 rows: %h + %h != %h", s7, c7, e7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
