// config_reg_tb: checks the configuration register: reset value, that the
// active word holds while a new word is shifted in, that the word appears
// one clock after cfg_commit with the first bit sent in bit 0, the serial
// output, and that cfg_shift low holds the chain.
module config_reg_tb;
  localparam int N = 100;
  localparam logic [N-1:0] RV = {25{4'b1011}};

  logic clk = 0, rst_n = 0, cfg_shift = 0, cfg_sdi = 0, cfg_commit = 0;
  logic cfg_sdo;
  logic [N-1:0] cfg;
  int checks = 0, failures = 0;

  config_reg #(.N(N), .RESET_VAL(RV)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic load(logic [N-1:0] w);
    for (int b = 0; b < N; b++) begin
      @(negedge clk);
      cfg_shift = 1;
      cfg_sdi = w[b];
      if (b % 7 == 3) begin           // a pause in the stream
        cfg_shift = 0;
        @(negedge clk);
        cfg_shift = 1;
      end
    end
    @(negedge clk);
    cfg_shift = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] w1, w2;
    for (int b = 0; b < N; b++) begin
      w1[b] = 1'($urandom);
      w2[b] = 1'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    expect_eq(cfg, RV, "reset value");
    load(w1);
    expect_eq(cfg, RV, "active word kept during shift");
    checks++;
    if (cfg_sdo !== w1[0]) begin failures++; $display("sdo wrong"); end
    cfg_commit = 1;
    @(negedge clk);
    cfg_commit = 0;
    expect_eq(cfg, w1, "committed word 1");
    load(w2);
    expect_eq(cfg, w1, "word 1 kept while word 2 shifts");
    repeat (5) @(negedge clk);
    cfg_commit = 1;
    @(posedge clk);
    #1 expect_eq(cfg, w2, "committed word 2");
    @(negedge clk);
    cfg_commit = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    expect_eq(cfg, RV, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
