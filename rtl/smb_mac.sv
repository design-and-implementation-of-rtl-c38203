// smb_mac: multiply-accumulate unit built on the fused add-multiply datapath.
//
// Every enabled cycle takes two addends A, B and a multiplier X (N-bit two's
// complement) and accumulates ACC <= ACC + X*(A+B). A+B is never formed:
// the fam datapath recodes it straight into Modified Booth digits (S-MB
// recoding) and the accumulator enters its carry-save tree as one more row,
// so one CSA tree and one carry-look-ahead adder serve multiply, add and
// accumulate together.
//
// Pipeline, two stages:
//   stage 1  operand registers a_q, b_q, x_q, clr_q load only while en = 1
//            (block enable: with en = 0 the registers and everything after
//            them hold still, so the idle datapath does not toggle);
//            v_q records that a new operation was taken.
//   stage 2  when v_q, acc <= (clr_q ? 0 : acc) + X*(A+B) (mod 2^ACC_W);
//            acc_valid pulses for that update.
// Operands presented with en = 1 at clock edge t are in acc after edge t+1;
// one operation per cycle. clr = 1 with an operation starts a new sum with
// it. rst_n is an asynchronous active-low reset of all state.
//
// The 16x16 size and the block-enable idea follow the described MAC; the
// accumulator width (8 guard bits over the 2N-bit product), the two-stage
// timing, the clear input and the choice of S-MB2 as default are this
// design's own.
module smb_mac #(
  parameter int                   N      = 16,
  parameter int                   ACC_W  = 2 * N + 8,
  parameter smb_pkg::smb_scheme_e SCHEME = smb_pkg::SMB2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  input  logic [N-1:0]     x,
  output logic [ACC_W-1:0] acc,
  output logic             acc_valid
);
  logic [N-1:0]     a_q, b_q, x_q;
  logic             clr_q, v_q;
  logic [ACC_W-1:0] addend, z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      x_q   <= '0;
      clr_q <= 1'b0;
      v_q   <= 1'b0;
    end else begin
      v_q <= en;
      if (en) begin
        a_q   <= a;
        b_q   <= b;
        x_q   <= x;
        clr_q <= clr;
      end
    end
  end

  assign addend = clr_q ? '0 : acc;

  fam #(.N(N), .SCHEME(SCHEME), .OUT_W(ACC_W)) u_fam (
    .a(a_q), .b(b_q), .x(x_q), .addend(addend), .z(z)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_valid <= 1'b0;
    end else begin
      acc_valid <= v_q;
      if (v_q) acc <= z;
    end
  end

  // The accumulator only moves on a taken operation.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n) !v_q |=> $stable(acc));
endmodule
