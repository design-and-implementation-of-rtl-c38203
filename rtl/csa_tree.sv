// csa_tree: Wallace carry-save adder tree.
//
// Reduces ROWS operand rows of W bits to two rows (sum and carry) whose
// total equals the total of the inputs modulo 2^W. Each level groups the rows
// present into threes and replaces every group by a csa_row (3:2 counter);
// one or two leftover rows pass to the next level unchanged. Rows fall as
// r -> 2*floor(r/3) + r mod 3 per level, so depth grows with log1.5(ROWS).
// For ROWS = 12 (16-bit fused add-multiply-accumulate) that is 5 levels.
// Purely combinational; a carry-propagate adder follows it.
module csa_tree #(
  parameter int ROWS = 12,
  parameter int W    = 40
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  function automatic int rows_after(input int r);
    return (r <= 2) ? r : 2 * (r / 3) + r % 3;
  endfunction

  function automatic int rows_at(input int level);
    int r = ROWS;
    for (int l = 0; l < level; l++) r = rows_after(r);
    return r;
  endfunction

  function automatic int num_levels();
    int r = ROWS;
    int l = 0;
    while (r > 2) begin
      r = rows_after(r);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();
  localparam int RMAX   = (ROWS < 2) ? 2 : ROWS;

  // g_lvl[l].r holds the rows present after l reduction levels.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [W-1:0] r [RMAX];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < RMAX; i++) begin : g_row
        if (i < ROWS) begin : g_use
          assign r[i] = rows[i];
        end else begin : g_pad
          assign r[i] = '0;
        end
      end
    end else begin : g_red
      localparam int R = rows_at(l - 1);
      localparam int G = R / 3;
      for (genvar g = 0; g < G; g++) begin : g_csa
        csa_row #(.W(W)) u_csa (
          .x(g_lvl[l-1].r[3*g]), .y(g_lvl[l-1].r[3*g+1]), .z(g_lvl[l-1].r[3*g+2]),
          .s(r[2*g]), .c(r[2*g+1])
        );
      end
      for (genvar i = 2 * G; i < RMAX; i++) begin : g_pass
        if (i < 2 * G + R % 3) begin : g_keep
          assign r[i] = g_lvl[l-1].r[3*G + i - 2*G];
        end else begin : g_zero
          assign r[i] = '0;
        end
      end
    end
  end

  assign sum   = g_lvl[LEVELS].r[0];
  assign carry = g_lvl[LEVELS].r[1];
endmodule
