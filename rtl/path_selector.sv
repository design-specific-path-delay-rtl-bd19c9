// path_selector: selects which target path to each destination a test phase
// exercises in the multi-phase method.
//
// A WIDTH-bit shift register whose serial input is the NOR of all its bits.
// From the cleared state it produces 000, 100, 010, 001, 000, ... (written
// sel[0] sel[1] sel[2]): all zeros selects the main paths, a single 1 in
// position i selects side path i+1 of every destination.  The sequence, the
// shift register and the NOR follow the method (WIDTH = number of side paths
// per destination, 3 in its example).  The clear and the enable are this
// design's additions.
//
// Timing: sel changes on the rising edge where en = 1.  last is 1 while the
// final phase (sel[WIDTH-1] = 1) is selected.
module path_selector #(
  parameter int WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] sel,
  output logic             last
);
  logic             nor_fb;
  logic [WIDTH-1:0] sel_next;
  assign nor_fb = ~|sel;
  assign last   = sel[WIDTH-1];

  if (WIDTH == 1) begin : g_one
    assign sel_next = nor_fb;
  end else begin : g_shift
    assign sel_next = {sel[WIDTH-2:0], nor_fb};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sel <= '0;
    else if (clr) sel <= '0;
    else if (en)  sel <= sel_next;
  end

  // At most one path selector output is active in any phase.
  a_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));
endmodule
