// rda_top: reconfigurable distributed-arithmetic (DA) datapath.
//
// Computes NOUT = 8 inner products of an 8-input vector with fixed 12-bit
// coefficient vectors per clock, without multipliers and without ROMs, in
// the adder-based DA form
//     Y_k = -T_k,11 2^11 + sum_{j<11} T_k,j 2^j,  T_k,j = sum of X_i with C_k,i bit j set.
// The T_k,j are built from shared common terms:
//   routing matrix 1 -> adder array 1 (12 two-input adders: sums of inputs)
//   routing matrix 2 -> adder array 2 (22 two-input adders: sums of inputs
//                       and/or array-1 sums); inputs and array-1 sums also
//                       bypass array 2
//   routing matrix 3 -> one Wallace tree per output, 2 slots per bit weight,
//                       each slot any input, array-1 or array-2 sum, or zero
//   routing matrix 4 -> output k is tree rm4[k], bits [out_lsb +: 14]
// All matrices are set by the configuration word (rda_pkg::rda_cfg_t) held
// in config_reg. After reset the word is the 8-point 1D DCT mapping of
// rda_dct_pkg (9-bit inputs, 12-bit coefficients, 14-bit outputs with 3
// fraction bits).
//
// Interface and timing. One vector x_in is accepted on every clock with
// in_valid high; its results appear on y_out with out_valid exactly 3 clocks
// later (registers after adder array 1, after adder array 2 and at the
// output), so the throughput is one 8-point transform per clock. A new
// configuration is shifted in on cfg_sdi with cfg_shift (first bit = bit 0 of
// the word) while the datapath keeps running, and made active by a one-clock
// cfg_commit. Vectors still inside the pipeline at the commit edge are
// dropped (their out_valid never rises) so that no output mixes two
// configurations. Synchronous active-low reset.
//
// The stage order, adder arrays, Wallace trees, routing matrices and the
// configuration bits follow the source design; the pipeline placement,
// operand-slot count, configuration loading and commit behaviour are this
// implementation's choices, as is forwarding the raw inputs to routing
// matrices 2 and 3 (the source design draws the bypass around adder array 2
// only).
module rda_top
  import rda_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // data
  input  logic                in_valid,
  input  logic signed [XW-1:0] x_in [L],
  output logic                out_valid,
  output logic signed [YW-1:0] y_out [NOUT],
  // configuration chain
  input  logic                cfg_shift,
  input  logic                cfg_sdi,
  input  logic                cfg_commit,
  output logic                cfg_sdo
);

  // ---------------------------------------------------------------- config
  rda_cfg_t cfg;

  config_reg #(
    .N         (CFG_BITS),
    .RESET_VAL (rda_dct_pkg::DCT_CFG)
  ) u_cfg (
    .clk, .rst_n, .cfg_shift, .cfg_sdi, .cfg_commit, .cfg_sdo,
    .cfg (cfg)
  );

  // Unpack the select fields into arrays for the routing matrices.
  logic [SEL1W-1:0] sel1a [NA1], sel1b [NA1];
  logic [SEL2W-1:0] sel2a [NA2], sel2b [NA2];
  logic [SEL3W-1:0] sel3  [NOUT*M*P];
  logic [SEL4W-1:0] sel4  [NOUT];

  always_comb begin
    for (int a = 0; a < NA1; a++) begin
      sel1a[a] = cfg.rm1[a][0];
      sel1b[a] = cfg.rm1[a][1];
    end
    for (int a = 0; a < NA2; a++) begin
      sel2a[a] = cfg.rm2[a][0];
      sel2b[a] = cfg.rm2[a][1];
    end
    for (int k = 0; k < NOUT; k++)
      for (int j = 0; j < M; j++)
        for (int p = 0; p < P; p++)
          sel3[(k * M + j) * P + p] = cfg.rm3[k][j][p];
    for (int k = 0; k < NOUT; k++) sel4[k] = cfg.rm4[k];
  end

  // ------------------------------------------- stage 1: RM1 + adder array 1
  logic signed [XW-1:0]  op1a [NA1], op1b [NA1];
  logic signed [S1W-1:0] s1   [NA1];

  routing_matrix #(.NSRC(NSRC1), .NDST(NA1), .W(XW), .SELW(SEL1W))
    u_rm1a (.src(x_in), .sel(sel1a), .dst(op1a));
  routing_matrix #(.NSRC(NSRC1), .NDST(NA1), .W(XW), .SELW(SEL1W))
    u_rm1b (.src(x_in), .sel(sel1b), .dst(op1b));

  adder_array #(.N(NA1), .W(XW)) u_aa1 (.a(op1a), .b(op1b), .sum(s1));

  logic                  p1_v;
  logic signed [XW-1:0]  p1_x  [L];
  logic signed [S1W-1:0] p1_s1 [NA1];

  always_ff @(posedge clk) begin
    if (!rst_n || cfg_commit) p1_v <= 1'b0;
    else                      p1_v <= in_valid;
    p1_x  <= x_in;
    p1_s1 <= s1;
  end

  // ------------------------------------------- stage 2: RM2 + adder array 2
  logic signed [S1W-1:0] src2 [NSRC2];
  logic signed [S1W-1:0] op2a [NA2], op2b [NA2];
  logic signed [S2W-1:0] s2   [NA2];

  always_comb begin
    for (int i = 0; i < L; i++)   src2[i]     = S1W'(p1_x[i]);
    for (int a = 0; a < NA1; a++) src2[L + a] = p1_s1[a];
  end

  routing_matrix #(.NSRC(NSRC2), .NDST(NA2), .W(S1W), .SELW(SEL2W))
    u_rm2a (.src(src2), .sel(sel2a), .dst(op2a));
  routing_matrix #(.NSRC(NSRC2), .NDST(NA2), .W(S1W), .SELW(SEL2W))
    u_rm2b (.src(src2), .sel(sel2b), .dst(op2b));

  adder_array #(.N(NA2), .W(S1W)) u_aa2 (.a(op2a), .b(op2b), .sum(s2));

  logic                  p2_v;
  logic signed [XW-1:0]  p2_x  [L];
  logic signed [S1W-1:0] p2_s1 [NA1];
  logic signed [S2W-1:0] p2_s2 [NA2];

  always_ff @(posedge clk) begin
    if (!rst_n || cfg_commit) p2_v <= 1'b0;
    else                      p2_v <= p1_v;
    p2_x  <= p1_x;
    p2_s1 <= p1_s1;
    p2_s2 <= s2;
  end

  // --------------------------- stage 3: RM3 + Wallace tree matrices + RM4
  logic signed [TW-1:0] src3 [NSRC3];
  logic signed [TW-1:0] t    [NOUT*M*P];
  logic signed [ZW-1:0] z    [NOUT];
  logic signed [ZW-1:0] zr   [NOUT];

  always_comb begin
    for (int i = 0; i < L; i++)   src3[i]           = TW'(p2_x[i]);
    for (int a = 0; a < NA1; a++) src3[L + a]       = TW'(p2_s1[a]);
    for (int a = 0; a < NA2; a++) src3[L + NA1 + a] = p2_s2[a];
  end

  routing_matrix #(.NSRC(NSRC3), .NDST(NOUT*M*P), .W(TW), .SELW(SEL3W))
    u_rm3 (.src(src3), .sel(sel3), .dst(t));

  for (genvar k = 0; k < NOUT; k++) begin : g_tree
    logic signed [TW-1:0] tk [M][P];
    always_comb
      for (int j = 0; j < M; j++)
        for (int p = 0; p < P; p++)
          tk[j][p] = t[(k * M + j) * P + p];
    wallace_tree #(.M(M), .P(P), .TW(TW), .ZW(ZW)) u_wt (.t(tk), .z(z[k]));
  end

  routing_matrix #(.NSRC(NSRC4), .NDST(NOUT), .W(ZW), .SELW(SEL4W))
    u_rm4 (.src(z), .sel(sel4), .dst(zr));

  always_ff @(posedge clk) begin
    if (!rst_n || cfg_commit) out_valid <= 1'b0;
    else                      out_valid <= p2_v;
    for (int k = 0; k < NOUT; k++)
      y_out[k] <= YW'(zr[k] >>> cfg.out_lsb);
  end

endmodule
