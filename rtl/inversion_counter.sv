// inversion_counter: counter that applies every combination of inversions to
// the target paths.
//
// A WIDTH-bit Fibonacci LFSR (shift towards the MSB, feedback into bit 0) whose
// feedback is complemented whenever bits WIDTH-2..0 are all zero.  That makes
// it a de Bruijn counter: the all-0 state is inserted between 10..0 and 00..1,
// so the counter visits all 2^WIDTH states, 0 included, before repeating.  The
// document asks for exactly this (an LFSR modified to include the all-0 state)
// with one bit per binate LUT level; the tap table and the shift direction are
// this design's choice.  WIDTH = 1 is a toggle flip-flop.
//
// Timing: q advances on the rising clock edge where en = 1.  last is 1 in the
// final state of the cycle (the one whose successor is 0), so "en && last"
// marks the step that completes all combinations.
module inversion_counter
  import pdt_pkg::*;
#(
  parameter int WIDTH = 4        // the example's four-bit counter
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,  // synchronous clear to 0
  input  logic             en,   // advance to the next combination
  output logic [WIDTH-1:0] q,    // inversion control bits, q[0] = level 1
  output logic             last  // state before the wrap to 0
);
  localparam logic [31:0] TAPS = lfsr_taps(WIDTH);

  logic [WIDTH-1:0] q_next;

  if (WIDTH == 1) begin : g_toggle
    assign q_next = ~q;
  end else begin : g_lfsr
    logic fb;
    always_comb begin
      fb = ^(q & TAPS[WIDTH-1:0]);
      if (q[WIDTH-2:0] == '0) fb = ~fb;
      q_next = {q[WIDTH-2:0], fb};
    end
  end

  assign last = (q_next == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= q_next;
  end

  initial begin
    assert (WIDTH >= 1 && WIDTH <= 16)
      else $error("inversion_counter: WIDTH %0d outside the tap table 1..16", WIDTH);
  end
endmodule
