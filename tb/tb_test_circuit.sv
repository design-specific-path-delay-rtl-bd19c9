// tb_test_circuit: runs complete test sessions of the test circuitry against
// behavioural path models written in this testbench.
//
// Each model path is a source flip-flop (loaded from s_d), a combinational
// path that inverts once per set inversion bit, and a destination flip-flop.
// A delay fault is modelled by letting the destination flip-flop capture the
// path output of one cycle earlier (the transition arrives more than one clock
// period late) for one chosen inversion combination and, optionally, for one
// transition direction only.
//   A: K = 2, NSEL = 1, NDEST = 2 (multi-phase, two destinations, 2 phases)
//   B: K = 3, NSEL = 0, NDEST = 1 (single path)
// Checked: done exactly 6 * 2^K * phases + 2 edges after start; no error
// without a fault; every destination toggles once per test; every inversion
// combination is applied in every phase; the selector steps through its
// phases; a fault on one combination of one phase and one direction sets the
// error flag of that destination only.
module tb_test_circuit;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instance A ----------------
  logic       a_start = 1'b0;
  logic [1:0] a_d;
  logic       a_s_d;
  logic [1:0] a_p;
  logic [0:0] a_sel;
  logic [1:0] a_err_dest;
  logic       a_err, a_busy, a_done;

  test_circuit #(.K(2), .NSEL(1), .NDEST(2)) dut_a (
    .clk, .rst_n, .start(a_start), .d(a_d), .s_d(a_s_d), .p(a_p), .sel(a_sel),
    .err_dest(a_err_dest), .err(a_err), .busy(a_busy), .done(a_done));

  // fault control: destination, combination, phase, direction (0 both, 1 rise, 2 fall)
  bit       a_fault_on = 1'b0;
  int       a_fault_dest, a_fault_dir;
  logic [1:0] a_fault_p;
  logic       a_fault_sel;

  logic       a_src;
  logic [1:0] a_out, a_out_dly;
  always_comb
    for (int i = 0; i < 2; i++) a_out[i] = a_src ^ (^a_p) ^ (i == 1 ? a_sel[0] : 1'b0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_src <= 1'b0; a_d <= '0; a_out_dly <= '0;
    end else begin
      a_src     <= a_s_d;
      a_out_dly <= a_out;
      for (int i = 0; i < 2; i++) begin
        bit slow;
        slow = a_fault_on && (i == a_fault_dest) && (a_p == a_fault_p) && (a_sel[0] == a_fault_sel)
            && (a_fault_dir == 0 || (a_fault_dir == 1 &&  a_out[i] && !a_out_dly[i])
                                 || (a_fault_dir == 2 && !a_out[i] &&  a_out_dly[i]));
        a_d[i] <= slow ? a_out_dly[i] : a_out[i];
      end
    end
  end

  // ---------------- instance B ----------------
  logic       b_start = 1'b0;
  logic       b_d, b_s_d, b_err, b_busy, b_done;
  logic [2:0] b_p;
  logic [0:0] b_sel;
  logic [0:0] b_err_dest;
  bit         b_fault_on = 1'b0;
  logic [2:0] b_fault_p;
  logic       b_src, b_out, b_out_dly;

  test_circuit #(.K(3), .NSEL(0), .NDEST(1)) dut_b (
    .clk, .rst_n, .start(b_start), .d(b_d), .s_d(b_s_d), .p(b_p), .sel(b_sel),
    .err_dest(b_err_dest), .err(b_err), .busy(b_busy), .done(b_done));

  assign b_out = b_src ^ (^b_p);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_src <= 1'b0; b_d <= 1'b0; b_out_dly <= 1'b0;
    end else begin
      b_src     <= b_s_d;
      b_out_dly <= b_out;
      b_d       <= (b_fault_on && b_p == b_fault_p) ? b_out_dly : b_out;
    end
  end

  // ---------------- sessions ----------------
  task automatic run_a(input bit expect_err, input logic [1:0] expect_dest);
    int edges, toggles0, toggles1, sel_changes;
    bit seen [2][4];
    logic [1:0] d_prev;
    logic [0:0] sel_prev;
    foreach (seen[i, j]) seen[i][j] = 1'b0;
    #1 a_start = 1'b1; @(posedge clk); #1 a_start = 1'b0;
    edges = 0; toggles0 = 0; toggles1 = 0; sel_changes = 0;
    d_prev = a_d; sel_prev = a_sel;
    while (!a_done && edges < 1000) begin
      seen[a_sel][a_p] = 1'b1;
      @(posedge clk); #1;
      edges++;
      if (a_d[0] != d_prev[0]) toggles0++;
      if (a_d[1] != d_prev[1]) toggles1++;
      if (a_sel != sel_prev) sel_changes++;
      d_prev = a_d; sel_prev = a_sel;
    end
    check(edges == 6 * 4 * 2 + 2, $sformatf("A: done after %0d edges, expected 50", edges));
    foreach (seen[i, j]) check(seen[i][j], $sformatf("A: combination %0d applied in phase %0d", j, i));
    check(sel_changes == 2, $sformatf("A: selector changed %0d times, expected 2", sel_changes));
    check(a_sel == 1'b0, "A: selector back to the main paths");
    if (!expect_err) begin
      check(toggles0 >= 16 && toggles1 >= 16, $sformatf("A: toggles %0d %0d", toggles0, toggles1));
    end
    check(a_err == expect_err, $sformatf("A: err=%b expected %b", a_err, expect_err));
    check(a_err_dest == expect_dest, $sformatf("A: err_dest=%b expected %b", a_err_dest, expect_dest));
    check(!a_busy, "A: idle after done");
  endtask

  task automatic run_b(input bit expect_err);
    int edges;
    #1 b_start = 1'b1; @(posedge clk); #1 b_start = 1'b0;
    edges = 0;
    while (!b_done && edges < 1000) begin
      @(posedge clk); #1;
      edges++;
    end
    check(edges == 6 * 8 + 2, $sformatf("B: done after %0d edges, expected 50", edges));
    check(b_err == expect_err, $sformatf("B: err=%b expected %b", b_err, expect_err));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // fault-free
    run_a(1'b0, 2'b00);
    run_b(1'b0);
    // both transitions slow at destination 1, combination 2, side-path phase
    a_fault_on = 1'b1; a_fault_dest = 1; a_fault_p = 2'd2; a_fault_sel = 1'b1; a_fault_dir = 0;
    run_a(1'b1, 2'b10);
    // rising transition slow at destination 0, combination 3, main phase
    a_fault_dest = 0; a_fault_p = 2'd3; a_fault_sel = 1'b0; a_fault_dir = 1;
    run_a(1'b1, 2'b01);
    // falling transition slow at destination 1, combination 0, main phase
    a_fault_dest = 1; a_fault_p = 2'd0; a_fault_sel = 1'b0; a_fault_dir = 2;
    run_a(1'b1, 2'b10);
    // a fault-free session after faulty ones: error flags cleared at start
    a_fault_on = 1'b0;
    run_a(1'b0, 2'b00);
    // single path: one slow combination
    b_fault_on = 1'b1; b_fault_p = 3'd5;
    run_b(1'b1);
    b_fault_on = 1'b0;
    run_b(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
