// R8AS3: R8AS2's AR8E2 encoders plus carry-free approximate compressors
// (AC_21, AC_32, AC_42) on the N low columns. The bits of the six lowest columns
// are dropped, and a single one added at column N offsets the roughly one unit per
// column that the compressors lose. Columns N and up are reduced and added
// exactly. The smallest and lowest-power of the three, with the largest error.
// Built as a configuration of r8_booth_squarer. Interface: N-bit two's complement
// operand in, 2N-bit approximate square out. Purely combinational.
module r8as3
  import r8sq_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  output logic [2*N-1:0] sq
);
  r8_booth_squarer #(.N(N), .ENC(ENC_AR8E2), .ACOMP(1'b1), .TRUNC(6)) u_sq (
    .a  (a),
    .sq (sq)
  );
endmodule
