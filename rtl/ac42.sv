// AC_42: approximate 4-2 compressor without carry output.
//
// Both outputs keep the weight of the input column, so no carry travels to the
// next column: S1 = x1 x2 + x3 x4, S2 = (x1 + x2)(x3 + x4). The output count
// S1 + S2 is one less than the number of ones for every non-zero input (two less
// for 1111); the squarer adds a constant one above the compressed columns to
// offset this bias. Purely combinational.
module ac42 (
  input  logic [3:0] x,   // x[0] = x1 .. x[3] = x4
  output logic       s1,
  output logic       s2
);
  assign s1 = (x[0] & x[1]) | (x[2] & x[3]);
  assign s2 = (x[0] | x[1]) & (x[2] | x[3]);
endmodule
