// rda_cts_example_tb: runs the common-term sharing example on the datapath.
//
// One output Z = C_0 X_0 + C_1 X_1 + C_2 X_2 + C_3 X_3 with the 4-bit
// coefficients 1101, 1011, 1110, 0011 (-3, -5, -2, 3), sign-extended to the
// 12 coefficient bits of the datapath. The bit columns are
//   T_3 (and every sign-extension weight 4..10, and the negative weight 11)
//       = X0+X1+X2,  T_2 = X0+X2,  T_1 = X1+X2+X3,  T_0 = X0+X1+X3.
// The example is loaded three times through the configuration chain, once
// per sharing scheme, each time committed while the previous one is running:
//   scheme I   shares X0+X1:          array 1: X0+X1, X0+X2, X1+X2
//                                     array 2: (X0+X1)+X2, (X0+X1)+X3, (X1+X2)+X3
//   scheme II  shares X1+X2:          array 1: X1+X2, X0+X2, X0+X1
//                                     array 2: X0+(X1+X2), (X1+X2)+X3, (X0+X1)+X3
//   scheme III shares X0+X2 and X1+X3: array 1: X0+X2, X1+X3
//                                     array 2: (X0+X2)+X1, (X1+X3)+X2, (X1+X3)+X0
// (X0+X2 of scheme I/II and III reaches its tree through the bypass.)
// Results are checked against the integer inner product; the other seven
// outputs have no terms routed and must stay 0. The adders each scheme uses
// are counted and printed (6, 6 and 5; 7 without sharing).
module rda_cts_example_tb;
  import rda_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [XW-1:0] x_in [L];
  logic out_valid;
  logic signed [YW-1:0] y_out [NOUT];
  logic cfg_shift = 0, cfg_sdi = 0, cfg_commit = 0, cfg_sdo;

  rda_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int coef [4] = '{-3, -5, -2, 3};
  int n_vectors [3] = '{0, 0, 0};
  int n_adders [3];

  // Source indices of routing matrix 3
  function automatic int S1(int a); return L + a;       endfunction
  function automatic int S2(int a); return L + NA1 + a; endfunction

  function automatic rda_cfg_t scheme_cfg(int s, output int adders);
    rda_cfg_t c;
    int t3, t2, t1, t0;
    for (int a = 0; a < NA1; a++) begin c.rm1[a][0] = ZERO1; c.rm1[a][1] = ZERO1; end
    for (int a = 0; a < NA2; a++) begin c.rm2[a][0] = ZERO2; c.rm2[a][1] = ZERO2; end
    for (int k = 0; k < NOUT; k++)
      for (int j = 0; j < M; j++) begin
        c.rm3[k][j][0] = ZERO3;
        c.rm3[k][j][1] = ZERO3;
      end
    for (int k = 0; k < NOUT; k++) c.rm4[k] = SEL4W'(k);
    c.out_lsb = '0;
    case (s)
      0: begin
        c.rm1[0] = '{SEL1W'(1), SEL1W'(0)};            // X0+X1
        c.rm1[1] = '{SEL1W'(2), SEL1W'(0)};            // X0+X2
        c.rm1[2] = '{SEL1W'(2), SEL1W'(1)};            // X1+X2
        c.rm2[0] = '{SEL2W'(2), SEL2W'(L + 0)};        // (X0+X1)+X2
        c.rm2[1] = '{SEL2W'(3), SEL2W'(L + 0)};        // (X0+X1)+X3
        c.rm2[2] = '{SEL2W'(3), SEL2W'(L + 2)};        // (X1+X2)+X3
        t3 = S2(0); t2 = S1(1); t1 = S2(2); t0 = S2(1);
        adders = 6;
      end
      1: begin
        c.rm1[0] = '{SEL1W'(2), SEL1W'(1)};            // X1+X2
        c.rm1[1] = '{SEL1W'(2), SEL1W'(0)};            // X0+X2
        c.rm1[2] = '{SEL1W'(1), SEL1W'(0)};            // X0+X1
        c.rm2[0] = '{SEL2W'(0), SEL2W'(L + 0)};        // X0+(X1+X2)
        c.rm2[1] = '{SEL2W'(3), SEL2W'(L + 0)};        // (X1+X2)+X3
        c.rm2[2] = '{SEL2W'(3), SEL2W'(L + 2)};        // (X0+X1)+X3
        t3 = S2(0); t2 = S1(1); t1 = S2(1); t0 = S2(2);
        adders = 6;
      end
      default: begin
        c.rm1[0] = '{SEL1W'(2), SEL1W'(0)};            // X0+X2
        c.rm1[1] = '{SEL1W'(3), SEL1W'(1)};            // X1+X3
        c.rm2[0] = '{SEL2W'(1), SEL2W'(L + 0)};        // (X0+X2)+X1
        c.rm2[1] = '{SEL2W'(2), SEL2W'(L + 1)};        // (X1+X3)+X2
        c.rm2[2] = '{SEL2W'(0), SEL2W'(L + 1)};        // (X1+X3)+X0
        t3 = S2(0); t2 = S1(0); t1 = S2(1); t0 = S2(2);
        adders = 5;
      end
    endcase
    c.rm3[0][0][0] = SEL3W'(t0);
    c.rm3[0][1][0] = SEL3W'(t1);
    c.rm3[0][2][0] = SEL3W'(t2);
    for (int j = 3; j < M; j++) c.rm3[0][j][0] = SEL3W'(t3);   // sign extension
    return c;
  endfunction

  // Shift a word in; vectors keep flowing meanwhile (their results are not
  // checked here, the commit drops the last ones).
  task automatic load_and_commit(rda_cfg_t c);
    for (int b = 0; b < CFG_BITS; b++) begin
      cfg_shift = 1;
      cfg_sdi = c[b];
      in_valid = 1;
      @(negedge clk);
    end
    cfg_shift = 0;
    cfg_commit = 1;
    @(negedge clk);
    cfg_commit = 0;
    in_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q [$];
    for (int i = 0; i < L; i++) x_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      load_and_commit(scheme_cfg(s, n_adders[s]));
      q.delete();
      // stream 100 vectors back to back, check each 3 clocks later
      for (int n = 0; n < 103; n++) begin
        if (n >= 3) begin
          int exp;
          exp = q.pop_front();
          checks++;
          if (!out_valid || int'(y_out[0]) != exp) begin
            failures++;
            if (failures < 10) $display("scheme %0d: got %0d (valid %0b) exp %0d", s + 1, y_out[0], out_valid, exp);
          end
          for (int k = 1; k < NOUT; k++) begin
            checks++;
            if (y_out[k] != 0) failures++;
          end
          n_vectors[s]++;
        end
        if (n < 100) begin
          int acc;
          acc = 0;
          for (int i = 0; i < L; i++) begin
            x_in[i] = XW'($urandom_range(0, 511) - 256);
            if (n == 0) x_in[i] = -256;
            if (i < 4) acc += coef[i] * int'(x_in[i]);
          end
          q.push_back(acc);
          in_valid = 1;
        end else in_valid = 0;
        @(negedge clk);
      end
    end
    $display("scheme I: %0d adders, %0d vectors; scheme II: %0d adders, %0d vectors; scheme III: %0d adders, %0d vectors",
             n_adders[0], n_vectors[0], n_adders[1], n_vectors[1], n_adders[2], n_vectors[2]);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (n_vectors[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
