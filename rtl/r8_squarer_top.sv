// The four Radix-8 Booth-folding squarers side by side on one operand.
//
// The exact squarer and the approximate R8AS1, R8AS2 and R8AS3 all square the
// same N-bit two's complement operand, so their results can be compared or one
// of them picked by the surrounding design. Each output is the 2N-bit square.
// Placing the four in one top is this design's own packaging; each squarer is
// the published scheme. Purely combinational, no clock or reset.
module r8_squarer_top
  import r8sq_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  output logic [2*N-1:0] sq_exact,
  output logic [2*N-1:0] sq_r8as1,
  output logic [2*N-1:0] sq_r8as2,
  output logic [2*N-1:0] sq_r8as3
);
  r8_booth_squarer #(.N(N), .ENC(ENC_EXACT)) u_exact (.a(a), .sq(sq_exact));
  r8as1 #(.N(N)) u_r8as1 (.a(a), .sq(sq_r8as1));
  r8as2 #(.N(N)) u_r8as2 (.a(a), .sq(sq_r8as2));
  r8as3 #(.N(N)) u_r8as3 (.a(a), .sq(sq_r8as3));
endmodule
