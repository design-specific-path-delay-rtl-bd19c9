// tb_response_analyzer: drives the destination value d with random
// sequences and random sample strobes.  The expected error flag is computed
// from the stimulus history: it is set after a sample cycle in which d equals
// the value d had one cycle earlier, stays set, and is cleared only by clr.
module tb_response_analyzer;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, d = 1'b0, sample = 1'b0;
  logic err;
  int checks = 0, failures = 0;

  response_analyzer dut (.clk, .rst_n, .clr, .d, .sample, .err);

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

  initial begin
    logic d_prev, exp_err;
    int sets = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
    d_prev = d;
    exp_err = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      // d is the destination flip-flop output: it changes just after an
      // edge; mostly a transition, sometimes none.  Sample and clear at random.
      d      = ($urandom_range(0, 7) == 0) ? d_prev : ~d_prev;
      sample = ($urandom_range(0, 2) == 0);
      clr    = ($urandom_range(0, 40) == 0);
      @(posedge clk); #1;
      // model: the sample judged the transition made at the previous edge
      if (clr) exp_err = 1'b0;
      else if (sample && (d == d_prev)) begin
        if (!exp_err) sets++;
        exp_err = 1'b1;
      end
      check(err == exp_err, $sformatf("step %0d: err=%b expected %b", i, err, exp_err));
      d_prev = d;
      sample = 1'b0;
      clr    = 1'b0;
    end
    check(sets > 5, "error flag was set several times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
