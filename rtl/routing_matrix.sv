// routing_matrix: configurable crossbar of the reconfigurable DA datapath.
//
// Each of the NDST outputs copies one of the NSRC source words, chosen by its
// SELW-bit select field; a select code of NSRC or above gives zero (the
// datapath uses the all-ones code). Sources narrower than the output are
// sign-extended by the instantiating module. Purely combinational, no
// latency. The source design shows four such matrices fed by the
// configuration bits; a plain multiplexer per output is this implementation's
// choice of how a matrix is built.
module routing_matrix #(
  parameter int NSRC = 8,
  parameter int NDST = 24,
  parameter int W    = 9,
  parameter int SELW = 4
) (
  input  logic signed [W-1:0]    src [NSRC],
  input  logic        [SELW-1:0] sel [NDST],
  output logic signed [W-1:0]    dst [NDST]
);

  for (genvar d = 0; d < NDST; d++) begin : g_dst
    assign dst[d] = (int'(sel[d]) < NSRC) ? src[sel[d]] : '0;
  end

endmodule
