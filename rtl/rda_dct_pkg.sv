// rda_dct_pkg: mapping of the 8-point 1D DCT onto the reconfigurable DA
// datapath (the configuration word the datapath powers up with).
//
// Coefficients. F_k(i) = c_k cos(pi k (2i+1) / 16), c_0 = 1/sqrt(8),
// c_k = 1/2 otherwise, as 12-bit two's-complement numbers with 11 fraction
// bits. The magnitude is rounded to the nearest integer q = round(2048 |F|);
// a negative coefficient is stored as ~q (= -q - 1). With that encoding the
// coefficient bit columns of odd k hold exactly one of each mirror pair
// (i, 7-i), and every bit column of the whole matrix is empty, one of 22
// distinct 4-input sets, or all 8 inputs, which is what the source design's
// common-term table lists. The magnitudes come from the table
// COSQ[a] = round(1024 cos(a pi / 16)), a = 0..8.
//
// Sharing scheme. Adder array 1 forms the twelve pair terms of the source
// design, in its order: T(01) T(23) T(45) T(67) T(06) T(35) T(24) T(17)
// T(07) T(25) T(16) T(34). Adder array 2 forms each distinct 4-input bit
// column, in order of first appearance (k = 0..7, bit M-1 down to 0), as the
// sum of the two pair terms that split it. A bit column of all 8 inputs is
// fed to its Wallace tree as two 4-input terms in the two slots of that
// weight. Routing matrix 4 is the identity and Y keeps bits [21:8] of the
// 23-bit-precision result (3 fraction bits, truncated). The search that
// builds the word runs at elaboration time.
package rda_dct_pkg;
  import rda_pkg::*;

  localparam int COSQ [9] = '{1024, 1004, 946, 851, 724, 569, 392, 200, 0};

  // Stage-1 pairs of the source design's sharing scheme.
  localparam int PAIR_A [NA1] = '{0, 2, 4, 6, 0, 3, 2, 1, 0, 2, 1, 3};
  localparam int PAIR_B [NA1] = '{1, 3, 5, 7, 6, 5, 4, 7, 7, 5, 6, 4};

  localparam int DCT_OUT_LSB = 8;

  // 12-bit coefficient F_k(i), encoded as described above.
  function automatic logic [M-1:0] dct_coef(int k, int i);
    int a, q;
    bit neg;
    if (k == 0) return M'(COSQ[4]);
    a = (k * (2 * i + 1)) % 32;
    if (a > 16) a = 32 - a;          // cos is even about 0 and 2 pi
    if (a <= 8) begin
      q = COSQ[a];
      neg = 1'b0;
    end else begin
      q = COSQ[16 - a];               // cos(pi - x) = -cos(x)
      neg = (q != 0);
    end
    return neg ? ~M'(q) : M'(q);
  endfunction

  // Set of inputs whose coefficient for output k has bit j set.
  function automatic logic [L-1:0] bit_column(int k, int j);
    logic [L-1:0] s;
    for (int i = 0; i < L; i++) s[i] = dct_coef(k, i)[j];
    return s;
  endfunction

  function automatic logic [L-1:0] pair_mask(int a);
    logic [L-1:0] s = '0;
    s[PAIR_A[a]] = 1'b1;
    s[PAIR_B[a]] = 1'b1;
    return s;
  endfunction

  // Builds the complete configuration word for the DCT.
  function automatic rda_cfg_t dct_config();
    rda_cfg_t c;
    logic [L-1:0] quad [NA2];
    logic [L-1:0] srcm [NSRC3];
    int nq;
    c = '0;
    c.out_lsb = OLW'(DCT_OUT_LSB);
    for (int o = 0; o < NOUT; o++) c.rm4[o] = SEL4W'(o);
    for (int a = 0; a < NA1; a++) begin
      c.rm1[a][0] = SEL1W'(PAIR_A[a]);
      c.rm1[a][1] = SEL1W'(PAIR_B[a]);
    end
    for (int a = 0; a < NA2; a++) begin
      quad[a] = '0;
      c.rm2[a][0] = ZERO2;
      c.rm2[a][1] = ZERO2;
    end
    // Adder array 2: one adder per distinct 4-input bit column.
    nq = 0;
    for (int k = 0; k < NOUT; k++) begin
      for (int j = M - 1; j >= 0; j--) begin
        logic [L-1:0] s;
        bit seen;
        s = bit_column(k, j);
        seen = 1'b0;
        for (int q = 0; q < nq; q++) if (quad[q] == s) seen = 1'b1;
        if ($countones(s) == 4 && !seen && nq < NA2) begin
          for (int x = 0; x < NA1; x++)
            for (int y = x + 1; y < NA1; y++)
              if ((pair_mask(x) | pair_mask(y)) == s &&
                  (pair_mask(x) & pair_mask(y)) == '0 &&
                  c.rm2[nq][0] == ZERO2) begin
                c.rm2[nq][0] = SEL2W'(L + x);
                c.rm2[nq][1] = SEL2W'(L + y);
              end
          quad[nq] = s;
          nq++;
        end
      end
    end
    // Input set carried by every source of routing matrix 3.
    for (int i = 0; i < L; i++) srcm[i] = L'(1) << i;
    for (int a = 0; a < NA1; a++) srcm[L + a] = pair_mask(a);
    for (int a = 0; a < NA2; a++) srcm[L + NA1 + a] = quad[a];
    // Routing matrix 3: one source, or two disjoint ones, per bit column.
    for (int k = 0; k < NOUT; k++) begin
      for (int j = 0; j < M; j++) begin
        logic [L-1:0] s;
        bit done;
        s = bit_column(k, j);
        c.rm3[k][j][0] = ZERO3;
        c.rm3[k][j][1] = ZERO3;
        done = (s == '0);
        for (int x = 0; x < NSRC3; x++)
          if (!done && srcm[x] == s) begin
            c.rm3[k][j][0] = SEL3W'(x);
            done = 1'b1;
          end
        for (int x = 0; x < NSRC3; x++)
          for (int y = x + 1; y < NSRC3; y++)
            if (!done && srcm[x] != '0 && srcm[y] != '0 &&
                (srcm[x] | srcm[y]) == s && (srcm[x] & srcm[y]) == '0) begin
              c.rm3[k][j][0] = SEL3W'(x);
              c.rm3[k][j][1] = SEL3W'(y);
              done = 1'b1;
            end
      end
    end
    return c;
  endfunction

  localparam rda_cfg_t DCT_CFG = dct_config();

endpackage
