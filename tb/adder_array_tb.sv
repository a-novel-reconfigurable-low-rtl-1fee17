// adder_array_tb: random self-check of the two-input adder column,
// including the extreme operand values, against integer addition.
module adder_array_tb;
  localparam int N = 12, W = 9;

  logic signed [W-1:0] a [N], b [N];
  logic signed [W:0]   sum [N];
  int checks = 0, failures = 0;

  adder_array #(.N(N), .W(W)) dut (.a(a), .b(b), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      for (int n = 0; n < N; n++) begin
        a[n] = W'($urandom);
        b[n] = W'($urandom);
      end
      if (it == 0) for (int n = 0; n < N; n++) begin a[n] = -256; b[n] = -256; end
      if (it == 1) for (int n = 0; n < N; n++) begin a[n] = 255;  b[n] = 255;  end
      #1;
      for (int n = 0; n < N; n++) begin
        int exp;
        exp = int'(a[n]) + int'(b[n]);
        checks++;
        if (int'(sum[n]) != exp) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d %0d+%0d got %0d", n, a[n], b[n], sum[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
