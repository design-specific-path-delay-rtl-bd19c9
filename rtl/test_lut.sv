// test_lut: one LUT of a target path, reprogrammed for path delay testing.
//
// The LUT keeps its place and its routing; only its truth table changes.  The
// new table is derived at elaboration from the original one (ORIG_INIT) and
// the original pins of the on-path inputs:
//   1-path LUT (B_PIN < 0), on-path input a:
//     positive unate in a -> f = a, negative unate -> f = ~a,
//     binate -> f = a ^ p (p is the inversion control input);
//   2-path LUT, a on the main path and b on a side path:
//     f = ~s.(term of a) + s.(term of b), each term formed as above,
//     so s = 0 propagates the main path and s = 1 the side path.
// These rules are the method's.  Reading the unateness from the original
// table and the pin order of the rewritten LUT (a, b, p, s on pins 0..3) are
// this design's.  Combinational: f follows a, b, p, s with one LUT delay.
module test_lut
  import pdt_pkg::*;
#(
  parameter logic [15:0] ORIG_INIT = 16'h6996,  // original LUT contents
  parameter int          A_PIN     = 0,         // original pin of on-path input a
  parameter int          B_PIN     = -1         // original pin of b; < 0: 1-path LUT
) (
  input  logic a,   // on-path input (main path)
  input  logic b,   // on-path input (side path); unused in a 1-path LUT
  input  logic p,   // inversion control (counter bit of this LUT's level)
  input  logic s,   // path select; unused in a 1-path LUT
  output logic f
);
  localparam bit     TWO_PATH = (B_PIN >= 0);
  localparam unate_t UA       = unateness(ORIG_INIT, A_PIN);
  localparam unate_t UB       = TWO_PATH ? unateness(ORIG_INIT, B_PIN) : UNATE_NONE;
  localparam logic [15:0] TEST_INIT = test_lut_init(UA, UB, TWO_PATH);

  lut4 #(.INIT(TEST_INIT)) u_lut (.i({s, p, b, a}), .o(f));
endmodule
