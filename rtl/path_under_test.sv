// path_under_test: a single target path prepared for testing.
//
// A source flip-flop, a chain of NLUT reprogrammed LUTs (test_lut) and a
// destination flip-flop.  The source flip-flop loads the sequence generator
// output; LUT k takes the previous LUT's output on its original pin
// ON_PIN[k] (NLUT at most 16).  Every binate LUT gets its own inversion control bit: the binate
// LUTs along the path, in path order, use p[0], p[1], ...  so the inversion
// counter needs NBINATE bits and exercises every combination of inversions
// along the path.  Unate LUTs become a buffer or an inverter and take no
// control bit.  The structure is the method's; the parameter form of the
// original LUT contents and the default example path (XOR, AND, NAND, XOR:
// binate, positive unate, negative unate, binate) are this design's.
//
// Timing: d_q is the destination flip-flop, so a transition loaded into the
// source flip-flop at edge n appears at d_q at edge n+1 when the path delay is
// below one clock period.
module path_under_test
  import pdt_pkg::*;
#(
  parameter int NLUT = 4,
  // Original contents of LUT k in bits [16k+15:16k]
  parameter logic [NLUT*16-1:0] ORIG_INIT = {16'h6996, 16'h7FFF, 16'h8000, 16'h6996},
  // Original pin of the on-path input of LUT k in bits [2k+1:2k]
  parameter logic [NLUT*2-1:0]  ON_PIN    = {2'd3, 2'd1, 2'd2, 2'd0},
  // Binate LUTs on the path = width of the inversion counter
  localparam int NBINATE = binate_before(256'(ORIG_INIT), 32'(ON_PIN), NLUT),
  localparam int NBITS   = (NBINATE > 0) ? NBINATE : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               s_d,    // source flip-flop input (sequence generator)
  input  logic [NBITS-1:0]   p,      // inversion control bits
  output logic               d_q     // destination flip-flop output
);
  logic             src_q;
  logic [NLUT:0]    node;   // node[0] = source, node[NLUT] = destination input

  assign node[0] = src_q;

  for (genvar k = 0; k < NLUT; k++) begin : g_lut
    localparam int PIN = int'(ON_PIN[2*k +: 2]);
    localparam bit IS_BINATE = (unateness(ORIG_INIT[16*k +: 16], PIN) == BINATE);
    localparam int PBIT = IS_BINATE ? binate_before(256'(ORIG_INIT), 32'(ON_PIN), k) : 0;
    logic p_k;
    assign p_k = IS_BINATE ? p[PBIT] : 1'b0;
    test_lut #(.ORIG_INIT(ORIG_INIT[16*k +: 16]), .A_PIN(PIN), .B_PIN(-1)) u_lut (
      .a(node[k]), .b(1'b0), .p(p_k), .s(1'b0), .f(node[k+1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q <= 1'b0;
      d_q   <= 1'b0;
    end else begin
      src_q <= s_d;
      d_q   <= node[NLUT];
    end
  end
endmodule
