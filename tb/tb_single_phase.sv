// tb_single_phase: the single-phase method on three disjoint target paths.
//
// Three all-binate three-LUT paths share one sequence generator and one
// levelized 3-bit inversion counter (LUT level i uses counter bit i), and each
// destination has its own response analyzer, ORed into one error flag.  A
// session applies 2 x 2^3 tests to all paths at once and ends 6 x 8 + 2 edges
// after start.  Checked: no error without a fault; a delay fault on one
// inversion combination of path 2 (forced at its destination flip-flop) sets
// that path's error flag only and the ORed flag; a later fault-free session
// clears it again.
module tb_single_phase;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] d, err_dest;
  logic       s_d, err, busy, done;
  logic [2:0] p;
  logic [0:0] sel;
  int checks = 0, failures = 0;

  test_circuit #(.K(3), .NSEL(0), .NDEST(3)) dut (
    .clk, .rst_n, .start, .d, .s_d, .p, .sel, .err_dest, .err, .busy, .done);

  for (genvar i = 0; i < 3; i++) begin : g_path
    path_under_test #(.NLUT(3), .ORIG_INIT({3{16'h9696}}), .ON_PIN({2'd2, 2'd1, 2'd0}))
      u_path (.clk, .rst_n, .s_d, .p, .d_q(d[i]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slow destination of path 2 for one inversion combination
  bit   fault = 1'b0;
  logic node_dly, slow_d;
  always_ff @(posedge clk) begin
    node_dly <= g_path[2].u_path.node[3];
    slow_d   <= (fault && p == 3'b110) ? node_dly : g_path[2].u_path.node[3];
  end

  task automatic session(input bit exp_err, input logic [2:0] exp_dest);
    int edges, toggles;
    logic d0_prev;
    #1 start = 1'b1; @(posedge clk); #1 start = 1'b0;
    edges = 0; toggles = 0; d0_prev = d[0];
    while (!done && edges < 1000) begin
      @(posedge clk); #1;
      edges++;
      if (d[0] != d0_prev) toggles++;
      d0_prev = d[0];
    end
    check(edges == 6 * 8 + 2, $sformatf("done after %0d edges, expected 50", edges));
    check(toggles >= 16, $sformatf("path 0 destination toggled %0d times", toggles));
    check(err == exp_err, $sformatf("err %b expected %b", err, exp_err));
    check(err_dest == exp_dest, $sformatf("err_dest %b expected %b", err_dest, exp_dest));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    session(1'b0, 3'b000);
    force g_path[2].u_path.d_q = slow_d;
    fault = 1'b1;
    session(1'b1, 3'b100);
    fault = 1'b0;
    release g_path[2].u_path.d_q;
    session(1'b0, 3'b000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
