// lut4: a 4-input lookup table, the FPGA logic element whose contents the
// test method rewrites.  o = INIT[i]: bit m of INIT is the output for the
// input pattern m.  Purely combinational; the delay through a real LUT does not
// depend on INIT, which is what lets the test method change the function
// without changing the path delay.
module lut4 #(
  parameter logic [15:0] INIT = 16'h6996   // default: 4-input XOR
) (
  input  logic [3:0] i,
  output logic       o
);
  assign o = INIT[i];
endmodule
