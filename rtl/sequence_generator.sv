// sequence_generator: the test-pattern source of a test configuration.
//
// Three flip-flops in a ring with an inverter in the loop (a 3-stage twisted
// ring): y1 <= ~y3, y2 <= y1, y3 <= y2.  From the cleared state 000 it steps
// through 100, 110, 111, 011, 001 and back, so y3, the signal applied to the
// path sources (s), stays 0 for three clock periods and 1 for three: a square
// wave of period 6T.  s rises at the 3rd clock edge after clr and falls at the
// 6th.  The ring, its length and the period follow the method; the
// synchronous clear (starts a session in state 000) and the run enable (holds
// the state once a session is over) are this design's additions.
//
// s_next is the value y3 takes at the next edge (= y2).  Source flip-flops of
// target paths load s_next, so they hold the same value as y3 at every cycle.
// All flip-flops work on the rising clock edge.
module sequence_generator (
  input  logic       clk,
  input  logic       rst_n,   // asynchronous reset to 000
  input  logic       clr,     // synchronous restart in state 000
  input  logic       run,     // advance the ring when 1, hold when 0
  output logic [2:0] y,       // y[0] = y1, y[1] = y2, y[2] = y3
  output logic       s,       // sequence output (= y3)
  output logic       s_next   // next value of s, for source flip-flops
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    y <= '0;
    else if (clr)  y <= '0;
    else if (run)  y <= {y[1], y[0], ~y[2]};
  end

  assign s      = y[2];
  assign s_next = run ? y[1] : y[2];
endmodule
