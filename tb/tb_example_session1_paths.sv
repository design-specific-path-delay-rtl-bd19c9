// tb_example_session1_paths: checks the session-1 path network of the example.
// For each phase the value at a destination must be the source value,
// inverted once per LUT on the selected path whose inversion control bit is
// set (binate LUTs) and once per negative-unate LUT.  The expected value is
// computed from a per-phase list of the counter bits and fixed inversions
// along the selected path, written out from the path names:
//   y: dAEJLy, eAEJLy, cEJLy, fBFJLy      z: hCGKMz, jCGKMz, nDGKMz, qHKMz
// Instance 1 keeps every LUT binate (the example's assumption).  Instance 2
// makes B positive unate and E and K negative unate in their side inputs, so
// that each phase's path has a distinct signature.
module tb_example_session1_paths;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_d;
  logic [3:0] p;
  logic [2:0] sel;
  logic y1, z1, y2, z2;
  int checks = 0, failures = 0;

  // (x0 ^ x2) & ~x1: binate in pin 0, negative unate in pin 1
  function automatic logic [15:0] bin_neg();
    logic [15:0] t;
    for (int m = 0; m < 16; m++) t[m] = (m[0] ^ m[2]) & ~m[1];
    return t;
  endfunction
  // LUT order A B C D E F G H J K L M, A in bits [15:0]
  localparam logic [12*16-1:0] INIT2 = {16'h6996, 16'h6996, bin_neg(), 16'h6996,
                                        16'h6996, 16'h6996, 16'h6996, bin_neg(),
                                        16'h6996, 16'h6996, 16'h8000, 16'h6996};

  example_session1_paths dut1 (.clk, .rst_n, .s_d, .p, .sel, .y_q(y1), .z_q(z1));
  example_session1_paths #(.ORIG_INIT(INIT2))
    dut2 (.clk, .rst_n, .s_d, .p, .sel, .y_q(y2), .z_q(z2));

  // [phase] = {inversion, mask of counter bits on the path}
  localparam logic [4:0] Y1 [4] = '{5'b0_1111, 5'b0_1111, 5'b0_1110, 5'b0_1111};
  localparam logic [4:0] Z1 [4] = '{5'b0_1111, 5'b0_1111, 5'b0_1111, 5'b0_1101};
  localparam logic [4:0] Y2 [4] = '{5'b0_1111, 5'b0_1111, 5'b1_1100, 5'b0_1110};
  localparam logic [4:0] Z2 [4] = '{5'b0_1111, 5'b0_1111, 5'b0_1111, 5'b1_1001};

  function automatic logic expect_d(input logic [4:0] e, input logic s, input logic [3:0] pp);
    return s ^ e[4] ^ (^(pp & e[3:0]));
  endfunction

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int ph = 0; ph < 4; ph++) begin
      sel = (ph == 0) ? 3'b000 : 3'(1 << (ph - 1));
      for (int k = 0; k < 32; k++) begin
        p   = 4'(k);
        s_d = k[4];
        repeat (2) @(posedge clk);
        #1;
        check(y1 == expect_d(Y1[ph], s_d, p), $sformatf("inst1 phase %0d p=%b y=%b", ph, p, y1));
        check(z1 == expect_d(Z1[ph], s_d, p), $sformatf("inst1 phase %0d p=%b z=%b", ph, p, z1));
        check(y2 == expect_d(Y2[ph], s_d, p), $sformatf("inst2 phase %0d p=%b y=%b", ph, p, y2));
        check(z2 == expect_d(Z2[ph], s_d, p), $sformatf("inst2 phase %0d p=%b z=%b", ph, p, z2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
