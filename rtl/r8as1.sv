// R8AS1: Radix-8 Booth-folding squarer whose partial-product bits in the N
// low columns come from the AR8E1 encoder (digits +-3 recoded to +-2 or +-4, so
// positive and negative digit errors partly cancel). The square terms, the upper
// bits and the whole reduction and final addition are exact. Of the three
// approximate squarers it has the smallest error.
// Built as a configuration of r8_booth_squarer. Interface: N-bit two's complement
// operand in, 2N-bit approximate square out. Purely combinational.
module r8as1
  import r8sq_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  output logic [2*N-1:0] sq
);
  r8_booth_squarer #(.N(N), .ENC(ENC_AR8E1), .ACOMP(1'b0), .TRUNC(6)) u_sq (
    .a  (a),
    .sq (sq)
  );
endmodule
