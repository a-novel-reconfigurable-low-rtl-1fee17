// wallace_tree: weighted summation of one DA output ("Wallace tree matrix").
//
// Computes the adder-based DA result
//     z = -(sum_p t[M-1][p]) * 2^(M-1) + sum_{j<M-1} (sum_p t[j][p]) * 2^j
// i.e. slot (j, p) carries a common term T_j (or a part of it) at weight 2^j,
// and the top weight is negative because it stands for the sign bit of the
// two's-complement coefficients. Each term is sign-extended and shifted; the
// terms of the top weight are negated as ~v + 1, with the P "+1"s gathered
// into one extra constant operand. The resulting P*M+1 rows are reduced by
// layers of 3:2 carry-save adders (full-adder rows) until two remain, which
// one carry-propagate adder adds. Combinational.
//
// The Wallace-tree summation follows the source design; the number of slots
// per weight (P) and the negation scheme are this implementation's choices.
module wallace_tree #(
  parameter int M  = 12,
  parameter int P  = 2,
  parameter int TW = 11,
  parameter int ZW = TW + M + $clog2(P)
) (
  input  logic signed [TW-1:0] t [M][P],
  output logic signed [ZW-1:0] z
);

  localparam int NOPS = P * M + 1;

  // Rows left after `lev` layers of 3:2 reduction, starting from n rows.
  function automatic int rows_after(int n, int lev);
    for (int i = 0; i < lev; i++) n = (n / 3) * 2 + n % 3;
    return n;
  endfunction

  function automatic int layers(int n);
    int l = 0;
    while (n > 2) begin
      n = (n / 3) * 2 + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int NLEV = layers(NOPS);

  for (genvar l = 0; l <= NLEV; l++) begin : g_lev
    localparam int NR = rows_after(NOPS, l);
    logic [ZW-1:0] row [NR];

    if (l == 0) begin : g_in
      // Weighted, sign-extended operands plus the negation constant.
      for (genvar j = 0; j < M; j++) begin : g_w
        for (genvar p = 0; p < P; p++) begin : g_p
          logic [ZW-1:0] ext;
          assign ext = ZW'(t[j][p]) <<< j;
          if (j == M - 1) begin : g_neg
            assign row[j * P + p] = ~ext;
          end else begin : g_pos
            assign row[j * P + p] = ext;
          end
        end
      end
      assign row[NOPS-1] = ZW'(P);
    end else begin : g_csa
      localparam int NI = rows_after(NOPS, l - 1);
      localparam int NG = NI / 3;
      for (genvar g = 0; g < NG; g++) begin : g_fa
        logic [ZW-1:0] x, y, c;
        assign x = g_lev[l-1].row[3*g];
        assign y = g_lev[l-1].row[3*g+1];
        assign c = g_lev[l-1].row[3*g+2];
        assign row[2*g]   = x ^ y ^ c;
        assign row[2*g+1] = ((x & y) | (x & c) | (y & c)) << 1;
      end
      for (genvar r = 0; r < NI % 3; r++) begin : g_pass
        assign row[2*NG+r] = g_lev[l-1].row[3*NG+r];
      end
    end
  end

  // Final carry-propagate adder.
  assign z = signed'(g_lev[NLEV].row[0] + g_lev[NLEV].row[1]);

endmodule
