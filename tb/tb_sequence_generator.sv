// tb_sequence_generator: checks the twisted-ring sequence generator.
// After a clear the ring must step through 000, 100, 110, 111, 011, 001 (y1 y2
// y3) and repeat; s (= y3) must rise 3 edges and fall 6 edges after the clear
// (period 6 clock cycles); s_next must equal the following value of s; with
// run = 0 the state must hold.  Expected values come from a fixed table.
module tb_sequence_generator;
  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0, run = 1'b0;
  logic [2:0] y;
  logic       s, s_next;
  int checks = 0, failures = 0;

  // states as {y3, y2, y1}
  localparam logic [2:0] SEQ [6] = '{3'b000, 3'b001, 3'b011, 3'b111, 3'b110, 3'b100};

  sequence_generator dut (.clk, .rst_n, .clr, .run, .y, .s, .s_next);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_s_next;
    int rise_at, fall_at;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // wander to some state first
    run = 1'b1;
    repeat (4) @(posedge clk);
    #1 clr = 1'b1;
    @(posedge clk); #1 clr = 1'b0;
    check(y == 3'b000, "clear to 000");
    rise_at = -1; fall_at = -1;
    for (int n = 1; n <= 30; n++) begin
      prev_s_next = s_next;
      @(posedge clk); #1;
      check(y == SEQ[n % 6], $sformatf("state after edge %0d: %b", n, y));
      check(s == y[2], "s equals y3");
      check(s == prev_s_next, "s_next predicts s");
      if (n <= 6 && s && rise_at < 0) rise_at = n;
      if (n <= 6 && rise_at > 0 && !s && fall_at < 0) fall_at = n;
    end
    check(rise_at == 3, $sformatf("s rises at edge 3 (got %0d)", rise_at));
    check(fall_at == 6, $sformatf("s falls at edge 6 (got %0d)", fall_at));
    // hold
    begin
      logic [2:0] held;
      run = 1'b0;
      held = y;
      #1 check(s_next == s, "s_next holds when stopped");
      repeat (5) @(posedge clk);
      #1 check(y == held, "state holds with run = 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
