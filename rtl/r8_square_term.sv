// Square term C_i = A_i * A_i of one Radix-8 digit.
//
// A digit square is one of 0, 1, 4, 9, 16, so bit 1 is always 0 and the other
// four bits are simple products of neighbour XORs of the group bits:
//   C0 = a[3i-1] ^ a[3i]                          (odd digit)
//   C2 = ~(a[3i-1] ^ a[3i]) & (a[3i] ^ a[3i+1])   (|A_i| = 2)
//   C3 = (a[3i-1] ^ a[3i]) & (a[3i+1] ^ a[3i+2])  (|A_i| = 3, 9 = 8 + 1)
//   C4 = ~(a[3i-1] ^ a[3i]) & ~(a[3i] ^ a[3i+1]) & (a[3i+1] ^ a[3i+2])  (|A_i| = 4)
// The square term is always exact, also inside the approximate squarers.
// Purely combinational.
module r8_square_term (
  input  logic [3:0] q,    // {a[3i+2], a[3i+1], a[3i], a[3i-1]}
  output logic [4:0] c     // A_i^2
);
  logic xa, xb, xc;

  always_comb begin
    xa   = q[0] ^ q[1];
    xb   = q[1] ^ q[2];
    xc   = q[2] ^ q[3];
    c[0] = xa;
    c[1] = 1'b0;
    c[2] = ~xa & xb;
    c[3] = xa & xc;
    c[4] = ~xa & ~xb & xc;
  end
endmodule
