// pdt_top: two path-delay test configurations side by side.
//
// sp_*: the single-path configuration.  One target path (path_under_test,
//   by default four LUTs of which two are binate) with its own test circuit:
//   2 x 2^NBINATE tests, one rising and one falling transition per
//   inversion combination.
// mp_*: the multi-phase configuration of the example circuit's first session
//   (example_session1_paths): eight target paths to destinations y and z, a
//   4-bit inversion counter and a 3-bit path selector, four phases of 32
//   tests each.
// Each side has its own start pulse, done flag and session error flag (1 if
// any test saw no transition at a destination).  One clock is shared; all
// flip-flops use its rising edge.  done rises 6 x 2^K x phases + 2 edges
// after the start edge: 26 edges for the single path (K = 2, one phase) and
// 386 for the multi-phase session (K = 4, four phases).
module pdt_top
  import pdt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // single-path configuration
  input  logic       sp_start,
  output logic       sp_busy,
  output logic       sp_done,
  output logic       sp_error,
  // multi-phase configuration
  input  logic       mp_start,
  output logic       mp_busy,
  output logic       mp_done,
  output logic       mp_error,
  output logic [1:0] mp_err_dest,  // per destination: [0] = y, [1] = z
  output logic [2:0] mp_sel        // current phase (path selector)
);
  // ---------------- single path ----------------
  // The target path: original LUT contents and on-path pins (LUT 0 in the
  // low bits): XOR on pin 0, AND on pin 2, NAND on pin 1, XOR on pin 3.
  localparam int              SP_NLUT = 4;
  localparam logic [4*16-1:0] SP_INIT = {16'h6996, 16'h7FFF, 16'h8000, 16'h6996};
  localparam logic [4*2-1:0]  SP_PIN  = {2'd3, 2'd1, 2'd2, 2'd0};
  // One counter bit per binate LUT on the path (here 2)
  localparam int SP_K = binate_before(256'(SP_INIT), 32'(SP_PIN), SP_NLUT);

  logic            sp_s_d, sp_d;
  logic [SP_K-1:0] sp_p;

  path_under_test #(.NLUT(SP_NLUT), .ORIG_INIT(SP_INIT), .ON_PIN(SP_PIN)) u_sp_path (
    .clk, .rst_n, .s_d(sp_s_d), .p(sp_p), .d_q(sp_d));

  test_circuit #(.K(SP_K), .NSEL(0), .NDEST(1)) u_sp_test (
    .clk, .rst_n, .start(sp_start), .d(sp_d), .s_d(sp_s_d), .p(sp_p),
    .sel(), .err_dest(), .err(sp_error),
    .busy(sp_busy), .done(sp_done));

  // ---------------- multi-phase, example session 1 ----------------
  logic       mp_s_d, mp_y, mp_z;
  logic [3:0] mp_p;

  example_session1_paths u_mp_paths (
    .clk, .rst_n, .s_d(mp_s_d), .p(mp_p), .sel(mp_sel), .y_q(mp_y), .z_q(mp_z));

  test_circuit #(.K(4), .NSEL(3), .NDEST(2)) u_mp_test (
    .clk, .rst_n, .start(mp_start), .d({mp_z, mp_y}), .s_d(mp_s_d), .p(mp_p),
    .sel(mp_sel), .err_dest(mp_err_dest), .err(mp_error),
    .busy(mp_busy), .done(mp_done));
endmodule
