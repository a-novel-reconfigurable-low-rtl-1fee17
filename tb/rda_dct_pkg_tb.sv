// rda_dct_pkg_tb: checks the DCT configuration word against values worked
// out here independently:
//  - every 12-bit coefficient against round(2048 c_k cos(pi k (2i+1)/16))
//    computed in floating point, negatives stored as ~magnitude;
//  - adder array 1 holds the twelve pairs of the sharing scheme, in order;
//  - adder array 2 holds exactly the 22 4-input terms of the common-term
//    table, each as the sum of two disjoint pairs;
//  - every slot routed to a Wallace tree carries exactly the input set of
//    its coefficient bit column (the 8-input column as two 4-input terms);
//  - identity output routing and output LSB 8.
module rda_dct_pkg_tb;
  import rda_pkg::*;
  import rda_dct_pkg::*;

  int checks = 0, failures = 0;
  rda_cfg_t c;

  // The 22 unique 4-input terms listed for the DCT, as input sets.
  string table1 [22] = '{"0123", "4567", "0124", "0145", "0356", "0135",
                         "0246", "1247", "2435", "1357", "0257", "0167",
                         "1346", "1237", "3567", "1457", "0236", "1256",
                         "0347", "2467", "2367", "0456"};
  int pa [12] = '{0, 2, 4, 6, 0, 3, 2, 1, 0, 2, 1, 3};
  int pb [12] = '{1, 3, 5, 7, 6, 5, 4, 7, 7, 5, 6, 4};

  function automatic int ref_coef(int k, int i);
    real ck, v;
    int q;
    ck = (k == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    v = ck * $cos(3.14159265358979 * k * (2 * i + 1) / 16.0) * 2048.0;
    q = int'($floor((v < 0 ? -v : v) + 0.5));
    return (v < 0) ? -q - 1 : q;
  endfunction

  function automatic logic [L-1:0] col(int k, int j);
    logic [L-1:0] s;
    for (int i = 0; i < L; i++) s[i] = 1'(ref_coef(k, i) >>> j);
    return s;
  endfunction

  function automatic logic [L-1:0] mask_of(int sel);  // sources of RM3
    if (sel < L) return L'(1) << sel;
    if (sel < L + NA1) return (L'(1) << pa[sel - L]) | (L'(1) << pb[sel - L]);
    if (sel < NSRC3) return mask_of(int'(c.rm2[sel - L - NA1][0])) |
                            mask_of(int'(c.rm2[sel - L - NA1][1]));
    return '0;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = DCT_CFG;
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < 8; i++)
        chk(dct_coef(k, i) == M'(ref_coef(k, i)), $sformatf("coef k=%0d i=%0d", k, i));
    for (int a = 0; a < NA1; a++)
      chk(int'(c.rm1[a][0]) == pa[a] && int'(c.rm1[a][1]) == pb[a], $sformatf("pair %0d", a));
    // Array 2: every adder is a table term made of two disjoint pairs.
    begin
      bit used [22];
      foreach (used[q]) used[q] = 0;
      for (int a = 0; a < NA2; a++) begin
        int x, y;
        logic [L-1:0] m;
        bit found;
        x = int'(c.rm2[a][0]);
        y = int'(c.rm2[a][1]);
        chk(x >= L && x < L + NA1 && y >= L && y < L + NA1, $sformatf("array-2 adder %0d operands are pairs", a));
        chk((mask_of(x) & mask_of(y)) == '0, $sformatf("array-2 adder %0d disjoint", a));
        m = mask_of(x) | mask_of(y);
        found = 0;
        for (int q = 0; q < 22; q++) begin
          logic [L-1:0] tm;
          tm = '0;
          for (int d = 0; d < 4; d++) tm[table1[q][d] - "0"] = 1'b1;
          if (tm == m && !used[q]) begin
            used[q] = 1;
            found = 1;
          end
        end
        chk(found, $sformatf("array-2 adder %0d is a distinct table term", a));
      end
    end
    // Routing matrix 3 reproduces every bit column.
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < M; j++) begin
        logic [L-1:0] m0, m1;
        m0 = mask_of(int'(c.rm3[k][j][0]));
        m1 = mask_of(int'(c.rm3[k][j][1]));
        chk((m0 & m1) == '0 && (m0 | m1) == col(k, j), $sformatf("column k=%0d j=%0d", k, j));
      end
    for (int k = 0; k < NOUT; k++) chk(int'(c.rm4[k]) == k, "identity output routing");
    chk(int'(c.out_lsb) == 8, "output lsb");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
