// tb_path_selector: the NOR-feedback shift register must produce 000, 100,
// 010, 001 (sel[0] first) and repeat, advance only when en = 1, and flag
// last only in the final phase.  Checked for the 3-bit example and 1 and 5
// bits.
module tb_path_selector;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [2:0] sel3; logic last3;
  logic [0:0] sel1; logic last1;
  logic [4:0] sel5; logic last5;
  int checks = 0, failures = 0;

  path_selector #(.WIDTH(3)) dut3 (.clk, .rst_n, .clr, .en, .sel(sel3), .last(last3));
  path_selector #(.WIDTH(1)) dut1 (.clk, .rst_n, .clr, .en, .sel(sel1), .last(last1));
  path_selector #(.WIDTH(5)) dut5 (.clk, .rst_n, .clr, .en, .sel(sel5), .last(last5));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected phase k of an n-bit selector: 0 for k = 0, else bit k-1 set
  function automatic logic [4:0] expect_sel(int k, int n);
    k = k % (n + 1);
    return (k == 0) ? 5'b0 : 5'(1) << (k - 1);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
    for (int k = 0; k < 13; k++) begin
      check(sel3 == expect_sel(k, 3)[2:0], $sformatf("3-bit phase %0d: %b", k, sel3));
      check(sel1 == expect_sel(k, 1)[0:0], $sformatf("1-bit phase %0d: %b", k, sel1));
      check(sel5 == expect_sel(k, 5),      $sformatf("5-bit phase %0d: %b", k, sel5));
      check(last3 == (k % 4 == 3), $sformatf("3-bit last in phase %0d", k));
      check(last5 == (k % 6 == 5), $sformatf("5-bit last in phase %0d", k));
      en = 1'b1; @(posedge clk); #1 en = 1'b0;
      // no change without enable
      repeat (2) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
