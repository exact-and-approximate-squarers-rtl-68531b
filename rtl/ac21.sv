// AC_21: approximate half adder (2-1 compressor) without carry output.
//
// S = x1 x2 at the weight of the input column: one less than the number of ones
// whenever an input is set. Purely combinational.
module ac21 (
  input  logic [1:0] x,   // x[0] = x1, x[1] = x2
  output logic       s
);
  assign s = x[0] & x[1];
endmodule
