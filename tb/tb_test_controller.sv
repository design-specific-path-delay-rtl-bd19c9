// tb_test_controller: drives the controller with an independent model of the
// six-state ring (advanced while run = 1) and checks, edge by edge after
// start, that the counter enable E is 1 only in the cycles before edges
// 7, 13, 19, ... (6m + 1), that sample is 1 only before edges 5, 8, 11, 14, ...
// (the rising and falling checks; the spurious one before edge 2 must be
// suppressed), and that done rises exactly 6N + 2 edges after the start edge
// for a session of N combinations, with the ring stopped afterwards.
module tb_test_controller;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] y;
  logic       last_comb;
  logic       run, clr, cnt_en, sample, busy, done;
  int checks = 0, failures = 0;

  localparam logic [2:0] SEQ [6] = '{3'b000, 3'b001, 3'b011, 3'b111, 3'b110, 3'b100};

  test_controller dut (.clk, .rst_n, .start, .y, .last_comb,
                       .run, .clr, .cnt_en, .sample, .busy, .done);

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

  // ring model
  int ring_n;     // edges since the start edge, while running
  int combs;      // E pulses seen
  int n_comb;     // session length under test
  assign y         = SEQ[ring_n % 6];
  assign last_comb = (combs == n_comb - 1);

  always_ff @(posedge clk) begin
    if (start)    ring_n <= 0;
    else if (run) ring_n <= ring_n + 1;
    if (start)       combs <= 0;
    else if (cnt_en) combs <= combs + 1;
  end

  task automatic session(input int n);
    int edges;
    n_comb = n;
    #1 start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    check(clr == 1'b0 && busy, "busy after start");
    edges = 0;
    while (!done && edges < 6 * n + 20) begin
      // values before edge edges+1
      int e = edges + 1;
      bit exp_e = (e >= 7) && (e % 6 == 1);
      bit exp_g = (e >= 5) && (e % 6 == 5 || e % 6 == 2) && (e >= 8 || e % 6 == 5);
      check(cnt_en == exp_e, $sformatf("E before edge %0d: %b", e, cnt_en));
      check(sample == exp_g, $sformatf("sample before edge %0d: %b", e, sample));
      @(posedge clk); #1;
      edges++;
    end
    check(done, "done reached");
    check(edges == 6 * n + 2, $sformatf("N=%0d done after %0d edges, expected %0d", n, edges, 6 * n + 2));
    check(combs == n, $sformatf("E pulses %0d, expected %0d", combs, n));
    begin
      int hold = ring_n;
      repeat (8) @(posedge clk);
      #1 check(ring_n == hold && !run && !cnt_en && !sample && done, "idle after done");
    end
  endtask

  initial begin
    n_comb = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(!busy && !run && !done, "idle after reset");
    start = 1'b1; #1 check(clr, "clr follows start"); start = 1'b0;
    session(1);
    session(4);
    session(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
