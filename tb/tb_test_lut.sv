// tb_test_lut: checks the LUT rewrite rules on original functions whose
// unateness is known by construction, over all 16 input patterns:
//   AND4 in pin 2 (positive unate)        -> f = a
//   NAND4 in pin 1 (negative unate)       -> f = ~a
//   XOR4 in pin 3 (binate)                -> f = a ^ p
//   2:1 mux, select pin 3 (binate)        -> f = a ^ p
//   2:1 mux, data pin 0 (positive unate)  -> f = a
//   2-path XOR4, pins 0/1 (both binate)   -> f = s ? b ^ p : a ^ p
//   2-path (x0 ^ x2) & ~x1, pins 0/1      -> f = s ? ~b : a ^ p
//   2-path OR, pins 0/1 (both positive)   -> f = s ? b : a
module tb_test_lut;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic a, b, p, s;
  logic [7:0] f;

  // original truth tables, bit m = f(x3 x2 x1 x0 = m)
  function automatic logic [15:0] tt(input int which);
    logic [15:0] t;
    for (int m = 0; m < 16; m++) begin
      logic x0, x1, x2, x3;
      {x3, x2, x1, x0} = 4'(m);
      case (which)
        0: t[m] = x0 & x1 & x2 & x3;
        1: t[m] = ~(x0 & x1 & x2 & x3);
        2: t[m] = x0 ^ x1 ^ x2 ^ x3;
        3: t[m] = x3 ? x1 : x0;
        4: t[m] = (x0 ^ x2) & ~x1;
        default: t[m] = x0 | x1;
      endcase
    end
    return t;
  endfunction

  test_lut #(.ORIG_INIT(tt(0)), .A_PIN(2))             u0 (.a, .b, .p, .s, .f(f[0]));
  test_lut #(.ORIG_INIT(tt(1)), .A_PIN(1))             u1 (.a, .b, .p, .s, .f(f[1]));
  test_lut #(.ORIG_INIT(tt(2)), .A_PIN(3))             u2 (.a, .b, .p, .s, .f(f[2]));
  test_lut #(.ORIG_INIT(tt(3)), .A_PIN(3))             u3 (.a, .b, .p, .s, .f(f[3]));
  test_lut #(.ORIG_INIT(tt(3)), .A_PIN(0))             u4 (.a, .b, .p, .s, .f(f[4]));
  test_lut #(.ORIG_INIT(tt(2)), .A_PIN(0), .B_PIN(1))  u5 (.a, .b, .p, .s, .f(f[5]));
  test_lut #(.ORIG_INIT(tt(4)), .A_PIN(0), .B_PIN(1))  u6 (.a, .b, .p, .s, .f(f[6]));
  test_lut #(.ORIG_INIT(tt(5)), .A_PIN(0), .B_PIN(1))  u7 (.a, .b, .p, .s, .f(f[7]));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++) begin
      logic [7:0] e;
      {s, p, b, a} = 4'(m);
      #1;
      e[0] = a;
      e[1] = ~a;
      e[2] = a ^ p;
      e[3] = a ^ p;
      e[4] = a;
      e[5] = s ? (b ^ p) : (a ^ p);
      e[6] = s ? ~b : (a ^ p);
      e[7] = s ? b : a;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (f[k] !== e[k]) begin
          failures++;
          $display("FAIL: lut %0d pattern s p b a = %b: f=%b expected %b", k, 4'(m), f[k], e[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
