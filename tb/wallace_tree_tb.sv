// wallace_tree_tb: checks the weighted DA summation
//   z = -(t[M-1][0] + t[M-1][1]) 2^(M-1) + sum_{j<M-1} (t[j][0] + t[j][1]) 2^j
// computed with 64-bit integers, for random terms, all-extreme terms and
// single-term patterns (one weight at a time, which isolates the sign of
// each weight).
module wallace_tree_tb;
  localparam int M = 12, P = 2, TW = 11, ZW = TW + M + 1;

  logic signed [TW-1:0] t [M][P];
  logic signed [ZW-1:0] z;
  int checks = 0, failures = 0;

  wallace_tree #(.M(M), .P(P), .TW(TW), .ZW(ZW)) dut (.t(t), .z(z));

  task automatic check();
    longint exp = 0;
    for (int j = 0; j < M; j++)
      for (int p = 0; p < P; p++)
        if (j == M - 1) exp -= longint'(t[j][p]) <<< j;
        else            exp += longint'(t[j][p]) <<< j;
    #1;
    checks++;
    if (longint'(z) != exp) begin
      failures++;
      if (failures < 10) $display("mismatch got %0d exp %0d", z, exp);
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
    for (int j = 0; j < M; j++) begin
      for (int jj = 0; jj < M; jj++) for (int p = 0; p < P; p++) t[jj][p] = '0;
      t[j][0] = TW'($urandom_range(1, 1000));
      check();
      t[j][1] = -TW'($urandom_range(1, 1000));
      check();
    end
    for (int v = 0; v < 2; v++) begin
      for (int j = 0; j < M; j++) for (int p = 0; p < P; p++)
        t[j][p] = (v == 0) ? TW'(-1024) : TW'(1023);
      check();
      for (int j = 0; j < M; j++) for (int p = 0; p < P; p++)
        t[j][p] = ((j == M - 1) ^ (v == 0)) ? TW'(-1024) : TW'(1023);
      check();
    end
    for (int it = 0; it < 2000; it++) begin
      for (int j = 0; j < M; j++) for (int p = 0; p < P; p++) t[j][p] = TW'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
