// rda_pkg: sizes and configuration-word layout of the reconfigurable
// distributed-arithmetic (DA) datapath.
//
// The datapath computes up to NOUT inner products Z = sum_i C_i * X_i over
// L inputs with M-bit two's-complement coefficients, in the adder-based DA
// form Z = -T_{M-1} 2^(M-1) + sum_{j<M-1} T_j 2^j, where T_j is the sum of the
// inputs whose coefficient has bit j set. The T_j are built from shared
// partial sums ("common terms") in two arrays of two-input adders, then
// weighted and summed in one Wallace tree per output.
//
// Sizes follow the 8-point 1D DCT of the source design: 8 inputs of 9 bits,
// 12-bit coefficients, 8 outputs of 14 bits, 12 adders in the first array
// (one per pair of the sharing scheme) and 22 in the second (one per unique
// 4-input term). Two operand slots per bit weight in each Wallace tree (so an
// 8-input term can be given as two 4-input terms) and the select-field
// encodings are choices of this implementation.
package rda_pkg;

  // Datapath sizes
  localparam int L    = 8;   // inputs per vector
  localparam int XW   = 9;   // input width (signed)
  localparam int M    = 12;  // coefficient width = number of bit weights
  localparam int NA1  = 12;  // two-input adders in adder array 1
  localparam int NA2  = 22;  // two-input adders in adder array 2
  localparam int NOUT = 8;   // outputs (one Wallace tree each)
  localparam int P    = 2;   // operand slots per bit weight in a Wallace tree
  localparam int YW   = 14;  // output width

  // Widths of the partial sums
  localparam int S1W = XW + 1;                 // adder array 1 result
  localparam int S2W = XW + 2;                 // adder array 2 result
  localparam int TW  = S2W;                    // common-term width at the trees
  localparam int ZW  = TW + M + $clog2(P);     // full-precision tree result
  localparam int OLW = $clog2(ZW);             // width of the output-LSB field

  // Source counts seen by each routing matrix
  localparam int NSRC1 = L;                    // inputs
  localparam int NSRC2 = L + NA1;              // inputs, array-1 sums
  localparam int NSRC3 = L + NA1 + NA2;        // inputs, array-1 sums (bypass), array-2 sums
  localparam int NSRC4 = NOUT;                 // tree results

  // Select-field widths; the all-ones code (>= the source count) selects zero
  localparam int SEL1W = $clog2(NSRC1 + 1);
  localparam int SEL2W = $clog2(NSRC2 + 1);
  localparam int SEL3W = $clog2(NSRC3 + 1);
  localparam int SEL4W = $clog2(NSRC4);

  localparam logic [SEL1W-1:0] ZERO1 = '1;
  localparam logic [SEL2W-1:0] ZERO2 = '1;
  localparam logic [SEL3W-1:0] ZERO3 = '1;

  // Configuration word ("reconfigurable bits"). Bit 0 of the packed word is
  // the first bit shifted into the configuration chain.
  typedef struct packed {
    logic [OLW-1:0]                           out_lsb; // Z bit that becomes Y bit 0
    logic [NOUT-1:0][SEL4W-1:0]               rm4;     // output k <- tree rm4[k]
    logic [NOUT-1:0][M-1:0][P-1:0][SEL3W-1:0] rm3;     // tree k, weight j, slot p <- source
    logic [NA2-1:0][1:0][SEL2W-1:0]           rm2;     // array-2 adder a, operand b <- source
    logic [NA1-1:0][1:0][SEL1W-1:0]           rm1;     // array-1 adder a, operand b <- input
  } rda_cfg_t;

  localparam int CFG_BITS = $bits(rda_cfg_t);

endpackage
