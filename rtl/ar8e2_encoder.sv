// AR8E2: approximate Radix-8 Booth encoder with magnitudes 3 and 4 folded onto 2.
//
// Only the x1 and x2 multiples remain, as in a Radix-4 selector: digits +-3 and
// +-4 become +-2 and every other digit is exact. The digit magnitude is never
// larger than the exact one, so this encoder only ever makes a partial product
// smaller in magnitude. m3 and m4 are always 0; they stay in the select struct
// so all encoders share one interface. The negate flag is the exact one.
// Purely combinational.
module ar8e2_encoder
  import r8sq_pkg::*;
(
  input  logic [3:0]  q,    // {a[3i+2], a[3i+1], a[3i], a[3i-1]}
  output booth_sel_t  sel
);
  logic xa, xb, xc;

  always_comb begin
    xa = q[0] ^ q[1];
    xb = q[1] ^ q[2];
    xc = q[2] ^ q[3];
    sel.m1  = xa & ~xc;
    // magnitude 2, 3 or 4: not magnitude 1 and not zero
    sel.m2  = (~xa & xb) | (xa & xc) | (~xa & ~xb & xc);
    sel.m3  = 1'b0;
    sel.m4  = 1'b0;
    sel.neg = q[3] & ~(q[2] & q[1] & q[0]);
  end
endmodule
