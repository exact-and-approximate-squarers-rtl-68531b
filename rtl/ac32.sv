// AC_32: approximate full adder (3-2 compressor) without carry output.
//
// S1 = x1 x2, S2 = (x1 + x2) x3, both at the weight of the input column. The
// output count is one less than the number of ones for every non-zero input.
// Purely combinational.
module ac32 (
  input  logic [2:0] x,   // x[0] = x1 .. x[2] = x3
  output logic       s1,
  output logic       s2
);
  assign s1 = x[0] & x[1];
  assign s2 = (x[0] | x[1]) & x[2];
endmodule
