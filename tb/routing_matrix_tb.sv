// routing_matrix_tb: random self-check of the configurable crossbar.
// Drives random source words and random select codes (including codes at and
// above NSRC, which must give zero) and compares every output with the
// source word picked by direct indexing.
module routing_matrix_tb;
  localparam int NSRC = 20, NDST = 22, W = 10, SELW = 5;

  logic signed [W-1:0]    src [NSRC];
  logic        [SELW-1:0] sel [NDST];
  logic signed [W-1:0]    dst [NDST];
  int checks = 0, failures = 0, zeros = 0;

  routing_matrix #(.NSRC(NSRC), .NDST(NDST), .W(W), .SELW(SELW))
    dut (.src(src), .sel(sel), .dst(dst));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int s = 0; s < NSRC; s++) src[s] = W'($urandom);
      for (int d = 0; d < NDST; d++) sel[d] = SELW'($urandom);
      if (it == 0) for (int d = 0; d < NDST; d++) sel[d] = SELW'(d);  // every source once
      #1;
      for (int d = 0; d < NDST; d++) begin
        logic signed [W-1:0] exp;
        exp = (int'(sel[d]) < NSRC) ? src[sel[d]] : '0;
        if (int'(sel[d]) >= NSRC) zeros++;
        checks++;
        if (dst[d] !== exp) begin
          failures++;
          if (failures < 10) $display("mismatch d=%0d sel=%0d got %0d exp %0d", d, sel[d], dst[d], exp);
        end
      end
    end
    if (zeros == 0) begin
      failures++;
      $display("zero select never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
