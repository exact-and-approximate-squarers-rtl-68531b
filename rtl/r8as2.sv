// R8AS2: Radix-8 Booth-folding squarer whose partial-product bits in the N
// low columns come from the AR8E2 encoder (digits +-3 and +-4 recoded to +-2, a
// Radix-4-like selector without the x3 adder and x4 shift). Digit errors are
// one-sided (the result is never larger in magnitude per row). Square terms,
// upper bits, reduction and final addition are exact.
// Built as a configuration of r8_booth_squarer. Interface: N-bit two's complement
// operand in, 2N-bit approximate square out. Purely combinational.
module r8as2
  import r8sq_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  output logic [2*N-1:0] sq
);
  r8_booth_squarer #(.N(N), .ENC(ENC_AR8E2), .ACOMP(1'b0), .TRUNC(6)) u_sq (
    .a  (a),
    .sq (sq)
  );
endmodule
