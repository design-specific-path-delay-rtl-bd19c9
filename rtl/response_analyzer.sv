// response_analyzer: checks that every test produced a transition at one
// path destination.
//
// FF-A copies the destination flip-flop d on every clock edge, so in the
// cycle after the destination captured a test result, A still holds the value
// d had before.  When sample is 1 the error flip-flop (FF-B) is set if A and d
// are equal, i.e. the transition did not arrive within one clock period.  The
// error flip-flop is cleared only by clr at the start of a session, so err is 1
// exactly when some test of the session failed.  This is the method's
// circuit; the clock enable (instead of a gated clock) and the clear are this
// design's choices.  err changes on the rising edge after the sample cycle.
module response_analyzer (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,     // start of session: clear the error flip-flop
  input  logic d,       // output of the destination flip-flop
  input  logic sample,  // judge the test captured at the previous edge
  output logic err
);
  logic ff_a;
  logic no_transition;

  assign no_transition = ~(ff_a ^ d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff_a <= 1'b0;
      err  <= 1'b0;
    end else begin
      ff_a <= d;
      if (clr)                          err <= 1'b0;
      else if (sample && no_transition) err <= 1'b1;
    end
  end
endmodule
