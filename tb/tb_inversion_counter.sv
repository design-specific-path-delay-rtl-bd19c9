// tb_inversion_counter: the de Bruijn counter must visit all 2^WIDTH states,
// the all-0 state included, exactly once in 2^WIDTH enabled steps, return to
// 0, raise last only in the state before the wrap, and hold when en = 0.
// Checked for several widths, including the 4-bit default.
module tb_inversion_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One counter instance per width under test, driven by a common stimulus.
  localparam int NW = 6;
  localparam int WS [NW] = '{1, 2, 3, 4, 8, 12};
  logic        clr = 1'b0;
  logic [NW-1:0] en = '0;
  logic [15:0] q    [NW];
  logic        last [NW];

  for (genvar g = 0; g < NW; g++) begin : g_dut
    logic [WS[g]-1:0] qq;
    inversion_counter #(.WIDTH(WS[g])) dut (
      .clk, .rst_n, .clr, .en(en[g]), .q(qq), .last(last[g]));
    assign q[g] = 16'(qq);
  end

  initial begin
    bit seen [65536];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NW; g++) begin
      int n, distinct, lasts;
      n = 1 << WS[g];
      distinct = 0;
      lasts = 0;
      foreach (seen[i]) seen[i] = 1'b0;
      #1 clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
      check(q[g] == 0, $sformatf("W=%0d cleared to 0", WS[g]));
      en[g] = 1'b1;
      for (int k = 0; k < n; k++) begin
        if (!seen[q[g]]) distinct++;
        seen[q[g]] = 1'b1;
        if (last[g]) begin
          lasts++;
          check(k == n - 1, $sformatf("W=%0d last at step %0d of %0d", WS[g], k, n));
        end
        @(posedge clk); #1;
      end
      en[g] = 1'b0;
      check(distinct == n, $sformatf("W=%0d visited %0d of %0d states", WS[g], distinct, n));
      check(lasts == 1, $sformatf("W=%0d last seen %0d times", WS[g], lasts));
      check(q[g] == 0, $sformatf("W=%0d back at 0 after 2^W steps", WS[g]));
      // hold with en = 0
      en[g] = 1'b1; @(posedge clk); #1 en[g] = 1'b0;
      begin
        logic [15:0] h;
        h = q[g];
        repeat (3) @(posedge clk);
        #1 check(q[g] == h && h != 0, $sformatf("W=%0d holds with en = 0", WS[g]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
