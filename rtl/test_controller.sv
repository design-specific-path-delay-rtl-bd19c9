// test_controller: turns the sequence generator state into the two control
// strobes of the test and runs one test session from start to done.
//
// Ring states (y1 y2 y3) after the n-th clock edge of a session: 000, 100,
// 110, 111, 011, 001, then repeating with period 6.  s = y3 rises at edge 3
// and falls at edge 6.  Following the timing of the method:
//   * the destination captures the rising result at edge 4 and the response
//     analyzer judges it at edge 5, so sample = 1 in state 011;
//   * the falling result is captured at edge 7 and judged at edge 8, so
//     sample = 1 in state 100;
//   * the counter enable E = 1 in state 000 (while the falling transition is
//     propagating), so the next inversion combination is loaded at edge 7,
//     leaving two periods for it to settle before the next rising edge at 9.
// The method gives these instants; the decoding of them from the three ring
// bits is the simplest one.  (The published circuit clocks the error
// flip-flop with a gated clock; here sample is a clock enable instead.)
//
// Session control is this design's own: start clears the test circuitry and
// starts the ring in 000.  E and sample are held off until the first rising
// transition has been applied (armed), because the first state-100 sample of
// a session has no preceding test.  When E coincides with last_comb (the
// counter, and in multi-phase mode the path selector, in their final state)
// the session is finishing; the sample that follows judges the last test, and
// done is then set and the ring stops.  A session of N = 2^K x phases
// combinations has done rising 6N + 2 clock edges after the start edge.
module test_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,      // one-cycle pulse: begin a test session
  input  logic [2:0] y,          // sequence generator state, y[0] = y1
  input  logic       last_comb,  // last inversion combination of the last phase
  output logic       run,        // sequence generator enable
  output logic       clr,        // clear of the test circuitry (= start)
  output logic       cnt_en,     // E: advance the inversion counter
  output logic       sample,     // G: response analyzers judge the last test
  output logic       busy,
  output logic       done        // session finished (held until next start)
);
  typedef enum logic [2:0] {   // ring state encoded as {y3, y2, y1}
    ST0 = 3'b000, ST1 = 3'b001, ST2 = 3'b011,
    ST3 = 3'b111, ST4 = 3'b110, ST5 = 3'b100
  } ring_t;

  ring_t ring;
  logic  armed, finishing;

  assign ring   = ring_t'(y);
  assign clr    = start;
  assign cnt_en = busy && armed && (ring == ST0);
  assign sample = busy && armed && (ring == ST4 || ring == ST1);
  assign run    = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      armed     <= 1'b0;
      finishing <= 1'b0;
      done      <= 1'b0;
    end else if (start) begin
      busy      <= 1'b1;
      armed     <= 1'b0;
      finishing <= 1'b0;
      done      <= 1'b0;
    end else if (busy) begin
      if (ring == ST2) armed <= 1'b1;           // s rises at this edge
      if (cnt_en && last_comb) finishing <= 1'b1;
      if (sample && finishing) begin            // last test judged
        busy      <= 1'b0;
        armed     <= 1'b0;
        finishing <= 1'b0;
        done      <= 1'b1;
      end
    end
  end

  // The two strobes belong to different ring states.
  a_strobes: assert property (@(posedge clk) disable iff (!rst_n) !(cnt_en && sample));
endmodule
