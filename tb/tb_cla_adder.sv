// tb_cla_adder: checks the carry-look-ahead adder against {cout, sum} =
// a + b + cin computed here. Runs the 40-bit default and a 33-bit instance
// (width not a multiple of the 4-bit group) on corner and random operands,
// including the full-length carry chain all-ones + 1.
module tb_cla_adder;
  logic [39:0] a, b, s;
  logic [32:0] a2, b2, s2;
  logic        cin, co, co2;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  cla_adder #(.W(33)) dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [40:0] e;
      logic [33:0] e2;
      case (t)
        0: begin a = '1; b = '0; cin = 1'b1; end
        1: begin a = '1; b = '1; cin = 1'b1; end
        2: begin a = '0; b = '0; cin = 1'b0; end
        3: begin a = 40'h5555555555; b = 40'haaaaaaaaaa; cin = 1'b1; end
        default: begin
          a   = {8'($urandom), 32'($urandom)};
          b   = {8'($urandom), 32'($urandom)};
          cin = 1'($urandom);
        end
      endcase
      a2 = a[32:0];
      b2 = b[32:0];
      #1;
      e  = 41'(a) + 41'(b) + 41'(cin);
      e2 = 34'(a2) + 34'(b2) + 34'(cin);
      checks += 2;
      if ({co, s} != e) begin
        failures++;
        $display("FAIL W=40 %h + %h + %0b = %h, got %0b %h", a, b, cin, e, co, s);
      end
      if ({co2, s2} != e2) begin
        failures++;
        $display("FAIL W=33 %h + %h + %0b = %h, got %0b %h", a2, b2, cin, e2, co2, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
