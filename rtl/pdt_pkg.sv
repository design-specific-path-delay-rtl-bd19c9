// pdt_pkg: shared types and elaboration-time functions for the path-delay
// test structures.
//
// The test method reprograms every LUT on a target path from its original
// function.  unateness() classifies the original 16-bit truth table in one
// input; test_lut_init() builds the truth table of the reprogrammed LUT.  The
// reprogrammed LUT always uses the same pin order: i[0] = a (on-path input,
// main path), i[1] = b (second on-path input, side path), i[2] = p (inversion
// control), i[3] = s (path select).  The rewrite rules are the method's own:
// positive unate -> a, negative unate -> ~a, binate -> a ^ p, and for a LUT
// with two target paths f = ~s.(term a) + s.(term b).  The pin order and the
// handling of a function that does not depend on the input at all (treated
// like positive unate) are this design's choices.
//
// lfsr_taps() gives feedback taps of maximal-length LFSRs (a common published
// table) for the inversion counter; the counter adds the all-0 state itself.
package pdt_pkg;

  typedef enum logic [1:0] {
    UNATE_NONE = 2'd0,   // output does not depend on the input
    UNATE_POS  = 2'd1,   // positive unate
    UNATE_NEG  = 2'd2,   // negative unate
    BINATE     = 2'd3
  } unate_t;

  // Unateness of a 4-input truth table in input `pin`.
  function automatic unate_t unateness(input logic [15:0] init, input int pin);
    bit can_rise = 1'b0;  // some cofactor pair goes 0 -> 1 as the input rises
    bit can_fall = 1'b0;  // some cofactor pair goes 1 -> 0
    for (int m = 0; m < 16; m++) begin
      if (((m >> pin) & 1) == 0) begin
        if (!init[m] &&  init[m | (1 << pin)]) can_rise = 1'b1;
        if ( init[m] && !init[m | (1 << pin)]) can_fall = 1'b1;
      end
    end
    if (can_rise && can_fall) return BINATE;
    if (can_fall)             return UNATE_NEG;
    if (can_rise)             return UNATE_POS;
    return UNATE_NONE;
  endfunction

  // Value propagated from one on-path input x under inversion control p.
  function automatic logic path_term(input unate_t u, input logic x, input logic p);
    case (u)
      BINATE:    return x ^ p;
      UNATE_NEG: return ~x;
      default:   return x;
    endcase
  endfunction

  // Truth table of a reprogrammed LUT (pins: 0=a, 1=b, 2=p, 3=s).
  function automatic logic [15:0] test_lut_init(input unate_t ua, input unate_t ub,
                                                input bit two_path);
    logic [15:0] t;
    for (int m = 0; m < 16; m++) begin
      logic a, b, p, s;
      a = m[0]; b = m[1]; p = m[2]; s = m[3];
      if (two_path && s) t[m] = path_term(ub, b, p);
      else               t[m] = path_term(ua, a, p);
    end
    return t;
  endfunction

  // Taps (bit positions, 1-based) of maximal-length Fibonacci LFSRs as a mask;
  // bit n-1 of the mask stands for tap n.
  function automatic logic [31:0] lfsr_taps(input int n);
    case (n)
      2:  return 32'h0000_0003;  // 2,1
      3:  return 32'h0000_0006;  // 3,2
      4:  return 32'h0000_000C;  // 4,3
      5:  return 32'h0000_0014;  // 5,3
      6:  return 32'h0000_0030;  // 6,5
      7:  return 32'h0000_0060;  // 7,6
      8:  return 32'h0000_00B8;  // 8,6,5,4
      9:  return 32'h0000_0110;  // 9,5
      10: return 32'h0000_0240;  // 10,7
      11: return 32'h0000_0500;  // 11,9
      12: return 32'h0000_0829;  // 12,6,4,1
      13: return 32'h0000_100D;  // 13,4,3,1
      14: return 32'h0000_2015;  // 14,5,3,1
      15: return 32'h0000_6000;  // 15,14
      16: return 32'h0000_D008;  // 16,15,13,4
      default: return 32'h0;
    endcase
  endfunction

  // Number of binate LUTs among the first `upto` LUTs of a chain (at most 16).
  // Bits [16k+15:16k] of init hold the original contents of LUT k, bits
  // [2k+1:2k] of pins the original pin of its on-path input.
  function automatic int binate_before(input logic [255:0] init, input logic [31:0] pins,
                                       input int upto);
    int c = 0;
    for (int k = 0; k < upto; k++)
      if (unateness(init[16*k +: 16], int'(pins[2*k +: 2])) == BINATE) c++;
    return c;
  endfunction

endpackage
