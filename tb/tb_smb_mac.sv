// tb_smb_mac: end-to-end test of the multiply-accumulate unit at its default
// size (N = 16, ACC_W = 40, S-MB2 recoding).
//
// Inputs change on the falling clock edge; after every rising edge acc and
// acc_valid are compared with a cycle model kept here (operands taken while
// en = 1 land in acc one edge later; clr starts a new sum). Phases:
//   1. latency: one operation after idle cycles; acc_valid must rise exactly
//      two rising edges after en was sampled, with acc = X*(A+B);
//   2. symmetric FIR: y = sum_i h_i * (s_i + s_(T-1-i)) for a 16-tap filter,
//      one tap pair per cycle, the coarse use case of an add-multiply unit;
//   3. random traffic: random en (block enable), clr and operands, including
//      the extreme values -2^15 and 2^15-1.
// Mechanisms counted, each must occur: idle cycles with the accumulator held,
// clears, accumulations onto a running sum, back-to-back operations.
module tb_smb_mac;
  localparam int N     = 16;
  localparam int ACC_W = 40;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             en, clr;
  logic [N-1:0]     a, b, x;
  logic [ACC_W-1:0] acc;
  logic             acc_valid;

  int checks = 0, failures = 0;
  int n_idle = 0, n_clear = 0, n_accum = 0, n_b2b = 0;

  smb_mac dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr),
    .a(a), .b(b), .x(x), .acc(acc), .acc_valid(acc_valid)
  );

  always #5 clk = ~clk;

  // Reference cycle model.
  logic [ACC_W-1:0] m_acc;
  logic             m_v, m_valid, m_clr;
  longint           m_prod;
  logic             prev_en;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: acc=%h model=%h valid=%0b model=%0b",
               what, $time, acc, m_acc, acc_valid, m_valid);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      // The model updates in the same order as the design's two stages.
      m_valid <= m_v;
      if (m_v) m_acc <= (m_clr ? '0 : m_acc) + ACC_W'(m_prod);
      m_v     <= en;
      if (en) begin
        m_prod <= (longint'($signed(a)) + longint'($signed(b))) * longint'($signed(x));
        m_clr  <= clr;
      end
      if (!m_v) n_idle++;
      if (m_v && m_clr) n_clear++;
      if (m_v && !m_clr) n_accum++;
      if (en && prev_en) n_b2b++;
      prev_en <= en;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      check(acc == m_acc, "acc");
      check(acc_valid == m_valid, "acc_valid");
    end
  end

  task automatic drive(input bit e, input bit c, input logic [N-1:0] va,
                       input logic [N-1:0] vb, input logic [N-1:0] vx);
    @(negedge clk);
    en  = e;
    clr = c;
    a   = va;
    b   = vb;
    x   = vx;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [N-1:0] h [16], smp [32];
    logic [ACC_W-1:0] y_exp;

    m_acc = '0; m_v = 1'b0; m_valid = 1'b0; m_clr = 1'b0; m_prod = 0; prev_en = 1'b0;
    en = 1'b0; clr = 1'b0; a = '0; b = '0; x = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. Latency of a single operation.
    drive(1, 1, 16'd1234, -16'sd20000, -16'sd7);
    @(negedge clk) en = 1'b0;
    lat = 1;
    while (!acc_valid && lat < 10) begin
      @(posedge clk);
      #2;
      lat++;
    end
    checks++;
    if (lat != 2 || $signed(acc) != (1234 - 20000) * -7) begin
      failures++;
      $display("FAIL latency %0d (expected 2) or value %0d", lat, $signed(acc));
    end
    repeat (3) drive(0, 0, '0, '0, '0);

    // 2. Symmetric 32-tap FIR output: 16 taps, each multiplying a sample pair.
    for (int i = 0; i < 16; i++) h[i] = 16'($urandom);
    for (int i = 0; i < 32; i++) smp[i] = 16'($urandom);
    y_exp = '0;
    for (int i = 0; i < 16; i++) begin
      y_exp += ACC_W'((longint'($signed(smp[i])) + longint'($signed(smp[31-i])))
                      * longint'($signed(h[i])));
      drive(1, i == 0, smp[i], smp[31-i], h[i]);
    end
    drive(0, 0, '0, '0, '0);
    @(posedge clk);
    #2;
    checks++;
    if (acc != y_exp) begin
      failures++;
      $display("FAIL FIR: acc=%h expected %h", acc, y_exp);
    end

    // 3. Random traffic.
    for (int t = 0; t < 20000; t++) begin
      logic [N-1:0] va, vb, vx;
      int sel;
      sel = $urandom_range(0, 9);
      va = (sel == 0) ? 16'h8000 : (sel == 1) ? 16'h7fff : 16'($urandom);
      vb = (sel == 0) ? 16'h8000 : (sel == 1) ? 16'h7fff : 16'($urandom);
      vx = (sel == 0) ? 16'h8000 : (sel == 2) ? 16'h7fff : 16'($urandom);
      drive($urandom_range(0, 9) < 7, $urandom_range(0, 15) == 0, va, vb, vx);
    end
    repeat (3) drive(0, 0, '0, '0, '0);

    $display("mechanisms: idle=%0d clear=%0d accumulate=%0d back_to_back=%0d",
             n_idle, n_clear, n_accum, n_b2b);
    checks += 4;
    if (n_idle == 0)  begin failures++; $display("FAIL no idle cycle"); end
    if (n_clear == 0) begin failures++; $display("FAIL no clear"); end
    if (n_accum == 0) begin failures++; $display("FAIL no accumulation"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
