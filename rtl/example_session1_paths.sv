// example_session1_paths: the eight target paths of the first test session of
// the example circuit, reprogrammed for the multi-phase method.
//
// Sources c d e f h j n q (flip-flops loaded from the sequence generator),
// twelve LUTs, destinations y and z.  Paths to y: main dAEJLy, side paths
// eAEJLy (joins at A), cEJLy (at E), fBFJLy (at J).  Paths to z: main hCGKMz,
// side paths jCGKMz (at C), nDGKMz (at G), qHKMz (at K).  2-path LUTs: A C E G
// J K; 1-path LUTs: B D F H L M.  Side path i of both destinations is
// selected by sel[i-1]: A and C by sel[0], E and G by sel[1], J and K by
// sel[2]; sel = 000 selects the two main paths.  Each LUT's inversion input is
// the counter bit of its level (A B C D H: p[0], E F G: p[1], J K: p[2],
// L M: p[3]), so no two LUTs on one path share a bit.  Inputs of these LUTs
// that carry no target path in session 1 (g, k, m and the thin connections
// of the circuit) are free inputs and are used for p and s.
//
// The paths, the selector sequence and the 4-bit levelized counter are the
// example's.  Which selector bit goes to which 2-path LUT follows the order in
// which the side paths were added; the level of H (its only target input comes
// straight from a source, so it is level 1) and the binate default of every
// LUT (the example assumes all LUT functions binate) complete the picture.
// ORIG_INIT gives the original contents of all twelve LUTs, on-path inputs on
// pin 0 (main) and pin 1 (side).
//
// Timing: y_q and z_q are the destination flip-flops; a source transition
// loaded at edge n reaches them at edge n+1.
module example_session1_paths #(
  // Original contents, LUT order A B C D E F G H J K L M (bits [15:0] = A)
  parameter logic [12*16-1:0] ORIG_INIT = {12{16'h6996}}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_d,    // sequence generator output to all sources
  input  logic [3:0] p,      // inversion control, p[i] = level i+1
  input  logic [2:0] sel,    // path select
  output logic       y_q,
  output logic       z_q
);
  typedef enum int {LA, LB, LC, LD, LE, LF, LG, LH, LJ, LK, LL, LM} lut_id_t;

  // Source flip-flops
  logic src_c, src_d, src_e, src_f, src_h, src_j, src_n, src_q;
  // LUT outputs
  logic o_a, o_b, o_c, o_d, o_e, o_f, o_g, o_h, o_j, o_k, o_l, o_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {src_c, src_d, src_e, src_f, src_h, src_j, src_n, src_q} <= '0;
      y_q <= 1'b0;
      z_q <= 1'b0;
    end else begin
      {src_c, src_d, src_e, src_f, src_h, src_j, src_n, src_q} <= {8{s_d}};
      y_q <= o_l;
      z_q <= o_m;
    end
  end

  // Level 1
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LA +: 16]), .A_PIN(0), .B_PIN(1))
    u_a (.a(src_d), .b(src_e), .p(p[0]), .s(sel[0]), .f(o_a));
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LB +: 16]), .A_PIN(0))
    u_b (.a(src_f), .b(1'b0), .p(p[0]), .s(1'b0), .f(o_b));
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LC +: 16]), .A_PIN(0), .B_PIN(1))
    u_c (.a(src_h), .b(src_j), .p(p[0]), .s(sel[0]), .f(o_c));
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LD +: 16]), .A_PIN(0))
    u_d (.a(src_n), .b(1'b0), .p(p[0]), .s(1'b0), .f(o_d));
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LH +: 16]), .A_PIN(0))
    u_h (.a(src_q), .b(1'b0), .p(p[0]), .s(1'b0), .f(o_h));
  // Level 2
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LE +: 16]), .A_PIN(0), .B_PIN(1))
    u_e (.a(o_a), .b(src_c), .p(p[1]), .s(sel[1]), .f(o_e));
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LF +: 16]), .A_PIN(0))
    u_f (.a(o_b), .b(1'b0), .p(p[1]), .s(1'b0), .f(o_f));
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LG +: 16]), .A_PIN(0), .B_PIN(1))
    u_g (.a(o_c), .b(o_d), .p(p[1]), .s(sel[1]), .f(o_g));
  // Level 3
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LJ +: 16]), .A_PIN(0), .B_PIN(1))
    u_j (.a(o_e), .b(o_f), .p(p[2]), .s(sel[2]), .f(o_j));
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LK +: 16]), .A_PIN(0), .B_PIN(1))
    u_k (.a(o_g), .b(o_h), .p(p[2]), .s(sel[2]), .f(o_k));
  // Level 4
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LL +: 16]), .A_PIN(0))
    u_l (.a(o_j), .b(1'b0), .p(p[3]), .s(1'b0), .f(o_l));
  test_lut #(.ORIG_INIT(ORIG_INIT[16*LM +: 16]), .A_PIN(0))
    u_m (.a(o_k), .b(1'b0), .p(p[3]), .s(1'b0), .f(o_m));
endmodule
