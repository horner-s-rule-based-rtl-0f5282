// csa_row: a row of W full adders used as a carry-save adder.
//
// Adds three W-bit operands in constant time: x + y + z = s + 2*c, with
// s_j = x_j ^ y_j ^ z_j and c_j = majority(x_j, y_j, z_j).  Bit c_j carries
// weight 2^(j+1).  Where an operand bit is a constant 0 the full adder
// degenerates into the half adder drawn in the iteration-stage diagrams;
// synthesis does that simplification.  Purely combinational.
module csa_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);
endmodule
