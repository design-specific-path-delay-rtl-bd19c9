// tb_path_under_test: the default path (XOR on pin 0, AND on pin 2, NAND on
// pin 1, XOR on pin 3) must become: inversion by p[0], buffer, inverter,
// inversion by p[1].  So the destination flip-flop must hold
// ~(s ^ p[0]) ^ p[1] two edges after s entered the source flip-flop, for
// every combination of p.  A second instance with a three-LUT all-binate path
// must invert the destination once per set control bit.
module tb_path_under_test;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_d;
  logic [1:0] p;
  logic [2:0] p3;
  logic d_q, d3_q;
  int checks = 0, failures = 0;

  path_under_test dut (.clk, .rst_n, .s_d, .p, .d_q);
  path_under_test #(.NLUT(3), .ORIG_INIT({3{16'h9696}}), .ON_PIN({2'd2, 2'd1, 2'd0}))
    dut3 (.clk, .rst_n, .s_d, .p(p3), .d_q(d3_q));

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
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      s_d = 1'($urandom);
      p   = 2'($urandom);
      p3  = 3'($urandom);
      repeat (2) @(posedge clk);
      #1;
      check(d_q == (~(s_d ^ p[0]) ^ p[1]), $sformatf("s=%b p=%b d=%b", s_d, p, d_q));
      check(d3_q == (s_d ^ (^p3)), $sformatf("s=%b p3=%b d3=%b", s_d, p3, d3_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
