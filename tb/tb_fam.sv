// tb_fam: checks the fused add-multiply datapath, Z = X*(A+B) + ADDEND
// (mod 2^OUT_W), against products computed here with integer arithmetic.
//   - default instance (N = 16, S-MB2, OUT_W = 33): corner and random
//     operands, addend zero (plain FAM) and random;
//   - 16-bit instances with S-MB1 and S-MB3 on the same operands;
//   - 5-bit instances of all three schemes (odd width) on every (A, B, X),
//     each with a random addend.
module tb_fam;
  import smb_pkg::*;
  localparam int NS = 5;
  localparam int WS = 2 * NS + 1;

  logic [15:0] a, b, x;
  logic [32:0] add, z2, z1, z3;
  logic [NS-1:0] as, bs, xs;
  logic [WS-1:0] adds, zs1, zs2, zs3;
  int checks = 0, failures = 0;

  fam dut (.a(a), .b(b), .x(x), .addend(add), .z(z2));
  fam #(.SCHEME(SMB1)) dut1 (.a(a), .b(b), .x(x), .addend(add), .z(z1));
  fam #(.SCHEME(SMB3)) dut3 (.a(a), .b(b), .x(x), .addend(add), .z(z3));
  fam #(.N(NS), .SCHEME(SMB1)) dut_s1 (.a(as), .b(bs), .x(xs), .addend(adds), .z(zs1));
  fam #(.N(NS), .SCHEME(SMB2)) dut_s2 (.a(as), .b(bs), .x(xs), .addend(adds), .z(zs2));
  fam #(.N(NS), .SCHEME(SMB3)) dut_s3 (.a(as), .b(bs), .x(xs), .addend(adds), .z(zs3));

  task automatic check(input logic [32:0] got, input logic [32:0] exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h (a=%h b=%h x=%h)", what, got, exp_v, a, b, x);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [15:0] corner [5] = '{16'h8000, 16'h7fff, 16'h0000, 16'hffff, 16'h0001};
    // 16-bit: all corner triples, then random.
    for (int t = 0; t < 125 + 20000; t++) begin
      logic [32:0] e;
      if (t < 125) begin
        a = corner[t % 5];
        b = corner[(t / 5) % 5];
        x = corner[t / 25];
      end else begin
        a = 16'($urandom);
        b = 16'($urandom);
        x = 16'($urandom);
      end
      add = (t % 2 == 0) ? '0 : {1'($urandom), 32'($urandom)};
      #1;
      e = 33'((longint'($signed(a)) + longint'($signed(b))) * longint'($signed(x))) + add;
      check(z2, e, "N=16 S-MB2");
      check(z1, e, "N=16 S-MB1");
      check(z3, e, "N=16 S-MB3");
    end
    // 5-bit: every operand triple.
    for (int v = 0; v < (1 << (3 * NS)); v++) begin
      logic [WS-1:0] e;
      {as, bs, xs} = (3 * NS)'(v);
      adds = WS'($urandom);
      #1;
      e = WS'((int'($signed(as)) + int'($signed(bs))) * int'($signed(xs))) + adds;
      check(33'(zs1), 33'(e), "N=5 S-MB1");
      check(33'(zs2), 33'(e), "N=5 S-MB2");
      check(33'(zs3), 33'(e), "N=5 S-MB3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
