// tb_pp_gen: checks the partial-product row generator. For each digit
// d in {-2..+2} the selects are set from the Booth table, and the row must
// satisfy  row (read unsigned) + cin - 2^N = X * d. Runs the 16-bit default
// on random and corner X, and a 6-bit instance on every X.
module tb_pp_gen;
  import smb_pkg::*;
  localparam int NS = 6;

  logic [15:0]   x;
  logic [NS-1:0] xs;
  mb_sel_t       sel;
  logic [16:0]   pp;
  logic [NS:0]   pps;
  int checks = 0, failures = 0;

  pp_gen dut (.x(x), .sel(sel), .pp(pp));
  pp_gen #(.N(NS)) dut_s (.x(xs), .sel(sel), .pp(pps));

  function automatic mb_sel_t sel_of(input int d);
    mb_sel_t s;
    s.sign = (d < 0);
    s.one  = (d == 1 || d == -1);
    s.two  = (d == 2 || d == -2);
    s.cin  = (d < 0);
    return s;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: x = 16'h8000;
        1: x = 16'h7fff;
        2: x = 16'h0000;
        3: x = 16'hffff;
        default: x = 16'($urandom);
      endcase
      xs = NS'(t);
      for (int d = -2; d <= 2; d++) begin
        longint exp_v, got;
        sel = sel_of(d);
        #1;
        exp_v = longint'($signed(x)) * d;
        got   = longint'(pp) + longint'(sel.cin) - (64'sd1 <<< 16);
        checks++;
        if (got != exp_v) begin
          failures++;
          $display("FAIL N=16 x=%h d=%0d pp=%h", x, d, pp);
        end
        if (t < (1 << NS)) begin
          exp_v = longint'($signed(xs)) * d;
          got   = longint'(pps) + longint'(sel.cin) - (64'sd1 <<< NS);
          checks++;
          if (got != exp_v) begin
            failures++;
            $display("FAIL N=%0d x=%h d=%0d pp=%h", NS, xs, d, pps);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
