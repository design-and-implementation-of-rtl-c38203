// tb_smb1_recoder: checks the S-MB1 recoder. The digit string the recoder
// emits, sum over j of (-2*hi + mid + lo) * 4^j, must equal the exact sum
// A+B of the signed operands. The 16-bit default runs on corner and random
// operands; a 6-bit (even) and a 5-bit (odd) instance run on every pair.
module tb_smb1_recoder;
  import smb_pkg::*;
  localparam int KD = num_digits(16);
  localparam int KE = num_digits(6);
  localparam int KO = num_digits(5);

  logic [15:0] a, b;
  logic [5:0]  ae, be;
  logic [4:0]  ao, bo;
  mb_triplet_t [KD-1:0] y;
  mb_triplet_t [KE-1:0] ye;
  mb_triplet_t [KO-1:0] yo;
  int checks = 0, failures = 0;

  smb1_recoder dut (.a(a), .b(b), .y(y));
  smb1_recoder #(.N(6)) dut_e (.a(ae), .b(be), .y(ye));
  smb1_recoder #(.N(5)) dut_o (.a(ao), .b(bo), .y(yo));

  // Value of a digit string, worked out here from the triplet bits.
  function automatic longint value(input mb_triplet_t [KD-1:0] t, input int k);
    longint v = 0;
    for (int j = k - 1; j >= 0; j--)
      v = 4 * v - 2 * longint'(t[j].hi) + longint'(t[j].mid) + longint'(t[j].lo);
    return v;
  endfunction

  task automatic check(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: digits=%0d expected=%0d", what, got, exp_v);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [15:0] corner [6] = '{16'h8000, 16'h7fff, 16'h0000, 16'hffff, 16'h0001, 16'haaaa};
    for (int i = 0; i < 6; i++)
      for (int k = 0; k < 6; k++) begin
        a = corner[i];
        b = corner[k];
        #1;
        check(value(y, KD), longint'($signed(a)) + longint'($signed(b)), "N=16 corner");
      end
    for (int t = 0; t < 20000; t++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      #1;
      check(value(y, KD), longint'($signed(a)) + longint'($signed(b)), "N=16 random");
    end
    for (int i = 0; i < 64; i++)
      for (int k = 0; k < 64; k++) begin
        ae = 6'(i);
        be = 6'(k);
        ao = 5'(i);
        bo = 5'(k);
        #1;
        check(value((3*KD)'(ye), KE), longint'($signed(ae)) + longint'($signed(be)), "N=6");
        if (i < 32 && k < 32)
          check(value((3*KD)'(yo), KO), longint'($signed(ao)) + longint'($signed(bo)), "N=5");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
