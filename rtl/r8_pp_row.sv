// Decoder of one folded partial-product row P_i of the Radix-8 Booth squarer.
//
// P_i = A_i * (B_i + a[3i+2]) with B_i = signed a[N-1:3i+3] (W-2 bits). For a
// non-negative digit this is |A_i| * B_i; for a negative digit it equals
// |A_i| * ~B_i exactly, since -|A_i| (B_i + 1) = |A_i| (-B_i - 1). The row thus
// inverts B_i when the digit is negative, forms the multiples x1 = B, x2 = 2B,
// x3 = 3B (one adder) and x4 = 4B of the possibly inverted B_i, and picks one per
// bit with the one-hot select. Bits below APPROX_BITS use the select of an
// approximate encoder, the others the exact select, so one row can straddle the
// approximate and the exact part of the squarer.
// Two more things are folded into the row: C_i4 (the 16 of A_i^2 = 16, same weight
// as bit 0, where P_i is always 0 when |A_i| = 4) is placed in bit 0, and the row's
// sign bit is inverted; the squarer adds the matching sign-extension constant.
// Output: W bits, bit j has weight 2^(6i+4+j) in the squarer. Combinational.
module r8_pp_row
  import r8sq_pkg::*;
#(
  parameter int W           = 15,  // row width N-3i-1 (15 for N = 16, i = 0)
  parameter int APPROX_BITS = 0    // low bits that use sel_approx
) (
  input  logic [W-3:0] b,          // B_i, two's complement
  input  booth_sel_t   sel_exact,
  input  booth_sel_t   sel_approx,
  input  logic         c4,         // C_i4 folded into bit 0
  output logic [W-1:0] pp          // row bits, sign bit inverted
);
  logic [W-1:0] bx, x1, x2, x3, x4, raw;
  booth_sel_t   s;

  always_comb begin
    bx = {{2{b[W-3]}}, b} ^ {W{sel_exact.neg}};
    x1 = bx;
    x2 = bx << 1;
    x4 = bx << 2;
    x3 = x1 + x2;
    for (int j = 0; j < W; j++) begin
      s      = (j < APPROX_BITS) ? sel_approx : sel_exact;
      raw[j] = (s.m1 & x1[j]) | (s.m2 & x2[j]) | (s.m3 & x3[j]) | (s.m4 & x4[j]);
    end
    pp        = raw;
    pp[0]     = raw[0] | c4;
    pp[W-1]   = ~raw[W-1];
  end
endmodule
