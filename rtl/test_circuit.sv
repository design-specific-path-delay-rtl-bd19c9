// test_circuit: the test circuitry of one test configuration, built from
// FPGA resources that are not under test.
//
// It contains the sequence generator (drives every path source), the
// inversion counter (K bits, one per binate LUT level), the path selector
// (NSEL bits, one per side path to a destination; absent when NSEL = 0), the
// controller, and one response analyzer per destination whose error flags are
// ORed into err.  With NSEL = 0 and NDEST = 1 this is the single-path
// structure; with NSEL = 0 and several destinations it is the single-phase
// method (disjoint paths tested in parallel); with NSEL > 0 it is the
// multi-phase method, which runs NSEL+1 phases (main paths, then side path 1,
// 2, ... of every destination).
//
// Timing: a start pulse begins a session.  Each inversion combination takes
// six clock periods: rising transition at the sources, result captured one
// period later, judged one period after that; the same for the falling
// transition three periods later.  The counter advances while the falling
// transition propagates; after its last combination the path selector
// advances together with the counter's wrap, so both have two periods to
// settle before the next transition.  done rises 6 * 2^K * (NSEL+1) + 2 clock
// edges after the start edge; err is then final.  Structure and timing follow
// the method; the start/done handshake is this design's.
module test_circuit #(
  parameter int K     = 4,   // inversion counter bits (example: 4)
  parameter int NSEL  = 3,   // side paths per destination (example: 3)
  parameter int NDEST = 2,   // path destinations (example: y, z)
  localparam int SELW = (NSEL > 0) ? NSEL : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,     // begin a test session
  input  logic [NDEST-1:0] d,         // destination flip-flop outputs
  output logic             s_d,       // to the D inputs of all source flip-flops
  output logic [K-1:0]     p,         // inversion control, p[i] = level i+1
  output logic [SELW-1:0]  sel,       // path select, all 0 = main paths
  output logic [NDEST-1:0] err_dest,  // error flip-flop of each destination
  output logic             err,       // OR of all error flip-flops
  output logic             busy,
  output logic             done
);
  logic [2:0] y;
  logic       run, clr, cnt_en, sample;
  logic       cnt_last, sel_last, last_comb;

  sequence_generator u_seq (
    .clk, .rst_n, .clr, .run, .y, .s(), .s_next(s_d));

  inversion_counter #(.WIDTH(K)) u_cnt (
    .clk, .rst_n, .clr, .en(cnt_en), .q(p), .last(cnt_last));

  if (NSEL > 0) begin : g_sel
    path_selector #(.WIDTH(NSEL)) u_sel (
      .clk, .rst_n, .clr, .en(cnt_en && cnt_last), .sel, .last(sel_last));
  end else begin : g_nosel
    assign sel      = '0;
    assign sel_last = 1'b1;
  end

  assign last_comb = cnt_last && sel_last;

  test_controller u_ctl (
    .clk, .rst_n, .start, .y, .last_comb,
    .run, .clr, .cnt_en, .sample, .busy, .done);

  for (genvar i = 0; i < NDEST; i++) begin : g_ra
    response_analyzer u_ra (
      .clk, .rst_n, .clr, .d(d[i]), .sample, .err(err_dest[i]));
  end

  assign err = |err_dest;
endmodule
