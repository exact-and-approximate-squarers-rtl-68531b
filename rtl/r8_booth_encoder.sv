// Exact Radix-8 Booth encoder for one digit of the folded squarer.
//
// The group q = {a[3i+2], a[3i+1], a[3i], a[3i-1]} stands for the digit
// A_i = -4 a[3i+2] + 2 a[3i+1] + a[3i] + a[3i-1] in -4..4. The encoder gives the
// magnitude as a one-hot select (m1..m4 for |A_i| = 1..4, none for 0) and the
// negate flag, which is set for a negative digit: a[3i+2] and not all three
// lower bits set ('1111' is the digit 0). Three XORs of neighbouring bits decide
// the magnitude. The mapping is the digit table of the folded Radix-8 recoding;
// the particular gate decomposition is this design's own.
// Purely combinational.
module r8_booth_encoder
  import r8sq_pkg::*;
(
  input  logic [3:0]  q,    // {a[3i+2], a[3i+1], a[3i], a[3i-1]}
  output booth_sel_t  sel
);
  logic xa, xb, xc;

  always_comb begin
    xa = q[0] ^ q[1];  // a[3i-1] ^ a[3i]
    xb = q[1] ^ q[2];  // a[3i]   ^ a[3i+1]
    xc = q[2] ^ q[3];  // a[3i+1] ^ a[3i+2]
    sel.m1  = xa & ~xc;
    sel.m3  = xa & xc;
    sel.m2  = ~xa & xb;
    sel.m4  = ~xa & ~xb & xc;
    sel.neg = q[3] & ~(q[2] & q[1] & q[0]);
  end
endmodule
