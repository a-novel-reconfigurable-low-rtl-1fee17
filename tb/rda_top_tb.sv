// rda_top_tb: end-to-end test of the reconfigurable DA datapath at its
// default sizes.
//
//  1. After reset the datapath runs the 8-point 1D DCT. Random 9-bit input
//     vectors (and all-extreme ones) are streamed back-to-back and with
//     bubbles; every output is compared with
//        Y_k = floor( sum_i F_k(i) X_i / 2^8 )  (14-bit, 3 fraction bits)
//     where the 12-bit coefficients F_k(i) are computed here in floating
//     point (round(2048 c_k cos(pi k (2i+1)/16)), negatives as ~magnitude),
//     and Y_k / 8 is also held within 1.25 of the exact real-valued DCT.
//  2. While DCT vectors keep flowing, a random configuration word is shifted
//     in; the DCT results must not change. The commit drops the vectors in
//     flight (checked: they never come out).
//  3. The random configuration is exercised and checked against a model
//     that evaluates the configuration fields directly (random pair/quad
//     selects, bypass of inputs and array-1 sums to the trees, zero selects,
//     arbitrary output routing and output LSB).
//  4. Reset returns to the DCT, which is checked again.
// Every output must come exactly 3 clocks after its input (one vector per
// clock throughput). Each mechanism is counted and must occur at least once.
module rda_top_tb;
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
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected output per cycle.
  localparam int MAXC = 20000;
  bit                   exp_v [MAXC];
  logic signed [YW-1:0] exp_y [MAXC][NOUT];

  // Mechanism counters
  int n_dct = 0, n_dct8 = 0, n_backtoback = 0, n_bubble = 0, n_commit = 0;
  int n_dropped = 0, n_bypass_in = 0, n_bypass_s1 = 0, n_zero = 0;
  int n_random = 0, n_shift_live = 0, n_reset_mode = 0;

  bit       dct_mode = 1;
  rda_cfg_t rcfg;

  // ------------------------------------------------ independent references
  int F [8][8];
  real FR [8][8];

  function automatic void make_coefs();
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < 8; i++) begin
        real ck, v;
        int q;
        ck = (k == 0) ? 1.0 / $sqrt(8.0) : 0.5;
        v = ck * $cos(3.14159265358979 * k * (2 * i + 1) / 16.0);
        FR[k][i] = v;
        v = v * 2048.0;
        q = int'($floor((v < 0 ? -v : v) + 0.5));
        F[k][i] = (v < 0) ? -q - 1 : q;
      end
  endfunction

  function automatic longint sel_src(int sel, longint src [], int n);
    return (sel < n) ? src[sel] : 0;
  endfunction

  // Model of the datapath evaluated straight from the configuration fields.
  function automatic void cfg_model(rda_cfg_t c, int x [L], output longint y [NOUT]);
    longint s1 [], s2 [], src2 [], src3 [], z [NOUT];
    s1 = new[NA1]; s2 = new[NA2]; src2 = new[NSRC2]; src3 = new[NSRC3];
    begin
      longint xs [];
      xs = new[L];
      for (int i = 0; i < L; i++) xs[i] = x[i];
      for (int a = 0; a < NA1; a++)
        s1[a] = sel_src(int'(c.rm1[a][0]), xs, L) + sel_src(int'(c.rm1[a][1]), xs, L);
      for (int i = 0; i < L; i++) src2[i] = xs[i];
    end
    for (int a = 0; a < NA1; a++) src2[L + a] = s1[a];
    for (int a = 0; a < NA2; a++)
      s2[a] = sel_src(int'(c.rm2[a][0]), src2, NSRC2) + sel_src(int'(c.rm2[a][1]), src2, NSRC2);
    for (int i = 0; i < NSRC2; i++) src3[i] = src2[i];
    for (int a = 0; a < NA2; a++) src3[NSRC2 + a] = s2[a];
    for (int k = 0; k < NOUT; k++) begin
      z[k] = 0;
      for (int j = 0; j < M; j++)
        for (int p = 0; p < P; p++) begin
          longint t;
          t = sel_src(int'(c.rm3[k][j][p]), src3, NSRC3);
          if (j == M - 1) z[k] -= t <<< j;
          else            z[k] += t <<< j;
        end
    end
    for (int k = 0; k < NOUT; k++) y[k] = z[c.rm4[k]] >>> c.out_lsb;
  endfunction

  // Expected 14-bit outputs of one vector in the current mode.
  function automatic void expected(int x [L], output logic signed [YW-1:0] y [NOUT]);
    if (dct_mode) begin
      for (int k = 0; k < NOUT; k++) begin
        longint acc = 0;
        real exact = 0.0;
        for (int i = 0; i < L; i++) begin
          acc += longint'(F[k][i]) * x[i];
          exact += FR[k][i] * x[i];
        end
        y[k] = YW'(acc >>> 8);
        checks++;
        if ((real'(y[k]) / 8.0 - exact) > 1.25 || (exact - real'(y[k]) / 8.0) > 1.25) begin
          failures++;
          $display("DCT accuracy k=%0d: %f vs %f", k, real'(y[k]) / 8.0, exact);
        end
      end
    end else begin
      longint ym [NOUT];
      cfg_model(rcfg, x, ym);
      for (int k = 0; k < NOUT; k++) y[k] = YW'(ym[k]);
    end
  endfunction

  // ---------------------------------------------------------- stimulus
  // Called once per cycle at the falling edge: checks the outputs of this
  // cycle, then drives this cycle's inputs.
  bit last_valid = 0;
  task automatic step(bit v, int mode_pat, bit shift = 0, bit sdi = 0, bit commit = 0);
    int x [L];
    // outputs
    checks++;
    if (out_valid !== exp_v[cycle]) begin
      failures++;
      if (failures < 20) $display("cycle %0d: out_valid %0b exp %0b", cycle, out_valid, exp_v[cycle]);
    end else if (out_valid) begin
      for (int k = 0; k < NOUT; k++) begin
        checks++;
        if (y_out[k] !== exp_y[cycle][k]) begin
          failures++;
          if (failures < 20) $display("cycle %0d: y[%0d]=%0d exp %0d (%s)", cycle, k, y_out[k],
                                      exp_y[cycle][k], dct_mode ? "dct" : "cfg");
        end
      end
    end
    // inputs
    for (int i = 0; i < L; i++) begin
      case (mode_pat)
        1: x[i] = -256;
        2: x[i] = 255;
        3: x[i] = (i % 2) ? 255 : -256;
        default: x[i] = $urandom_range(0, 511) - 256;
      endcase
      x_in[i] = XW'(x[i]);
    end
    in_valid   = v;
    cfg_shift  = shift;
    cfg_sdi    = sdi;
    cfg_commit = commit;
    if (v) begin
      if (last_valid) n_backtoback++;
      if (dct_mode) n_dct++; else n_random++;
      exp_v[cycle + 3] = 1'b1;
      expected(x, exp_y[cycle + 3]);
    end else n_bubble++;
    if (shift && dct_mode && v) n_shift_live++;
    if (commit) begin
      // vectors of this cycle and the two before it are dropped
      for (int d = 1; d <= 3; d++) begin
        if (exp_v[cycle + d]) n_dropped++;
        exp_v[cycle + d] = 1'b0;
      end
      n_commit++;
    end
    last_valid = v;
    @(negedge clk);
  endtask

  function automatic rda_cfg_t random_cfg();
    rda_cfg_t c;
    c = '0;
    for (int a = 0; a < NA1; a++)
      for (int b = 0; b < 2; b++)
        c.rm1[a][b] = ($urandom_range(0, 9) == 0) ? ZERO1 : SEL1W'($urandom_range(0, L - 1));
    for (int a = 0; a < NA2; a++)
      for (int b = 0; b < 2; b++)
        c.rm2[a][b] = ($urandom_range(0, 9) == 0) ? ZERO2 : SEL2W'($urandom_range(0, NSRC2 - 1));
    for (int k = 0; k < NOUT; k++)
      for (int j = 0; j < M; j++)
        for (int p = 0; p < P; p++)
          c.rm3[k][j][p] = ($urandom_range(0, 5) == 0) ? ZERO3 : SEL3W'($urandom_range(0, NSRC3 - 1));
    // make sure both bypass kinds appear
    c.rm3[0][0][0] = SEL3W'(3);        // an input straight to a tree
    c.rm3[1][5][1] = SEL3W'(L + 4);    // an array-1 sum straight to a tree
    for (int k = 0; k < NOUT; k++) c.rm4[k] = SEL4W'($urandom_range(0, NOUT - 1));
    c.out_lsb = OLW'($urandom_range(0, 10));
    return c;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_coefs();
    foreach (exp_v[c]) exp_v[c] = 1'b0;
    for (int i = 0; i < L; i++) x_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 8-input bit column of the DCT (k = 0) present in the preset
    for (int j = 0; j < M; j++)
      if (F[0][0][j]) n_dct8++;

    // 1. DCT: extremes, back-to-back stream, bubbles
    step(1, 1); step(1, 2); step(1, 3);
    for (int n = 0; n < 300; n++) step(1, 0);
    for (int n = 0; n < 200; n++) step($urandom_range(0, 2) != 0, 0);

    // 2. shift a random word in while the DCT keeps running
    rcfg = random_cfg();
    for (int b = 0; b < CFG_BITS; b++) step($urandom_range(0, 3) != 0, 0, 1, rcfg[b]);
    step(1, 0); step(1, 0);
    step(1, 0, 0, 0, 1);              // commit: the last three vectors are dropped
    dct_mode = 0;
    for (int k = 0; k < NOUT; k++)
      for (int j = 0; j < M; j++)
        for (int p = 0; p < P; p++) begin
          int s;
          s = int'(rcfg.rm3[k][j][p]);
          if (s < L) n_bypass_in++;
          else if (s < L + NA1) n_bypass_s1++;
          else if (s >= NSRC3) n_zero++;
        end

    // 3. random configuration
    for (int n = 0; n < 300; n++) step($urandom_range(0, 4) != 0, 0);
    step(1, 1); step(1, 2); step(1, 3);
    step(0, 0); step(0, 0); step(0, 0); step(0, 0);

    // 4. reset back to the DCT
    rst_n = 0;
    step(0, 0);
    rst_n = 1;
    dct_mode = 1;
    n_reset_mode++;
    for (int n = 0; n < 100; n++) step(1, 0);
    repeat (4) step(0, 0);

    $display("dct=%0d random=%0d backtoback=%0d bubbles=%0d commits=%0d dropped=%0d",
             n_dct, n_random, n_backtoback, n_bubble, n_commit, n_dropped);
    $display("live_shift=%0d bypass_in=%0d bypass_s1=%0d zero_sel=%0d dct_8input_cols=%0d reset_to_dct=%0d",
             n_shift_live, n_bypass_in, n_bypass_s1, n_zero, n_dct8, n_reset_mode);
    begin
      int cnt [12];
      cnt = '{n_dct, n_random, n_backtoback, n_bubble, n_commit, n_dropped,
                       n_shift_live, n_bypass_in, n_bypass_s1, n_zero, n_dct8, n_reset_mode};
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
