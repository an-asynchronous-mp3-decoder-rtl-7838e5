// fras: the arithmetic core of the requantizer, eq. (1):
//   xr = sign(is) * |is|^(4/3) * 2^(C/4)
// p43 is |is|^(4/3) from pow43_rom (Q18.14). C is the exponent in quarter
// steps computed by the requantizer controller from the global gain, the
// scalefactors and the subblock gains. 2^(C/4) is split into
// 2^floor(C/4), a shift, and 2^((C mod 4)/4), one of four Q2.30 constants.
// The result is Q4.28, saturated to the 32-bit range. Purely combinational.
module fras
  import pamp3_pkg::*;
(
  input  logic [31:0]        p43,
  input  logic               neg,
  input  logic signed [11:0] c,
  output sample_t            xr
);
  logic [31:0]        frac;
  logic [63:0]        prod;
  logic signed [11:0] e;
  logic [63:0]        mag;
  int                 sh;

  always_comb begin
    case (c[1:0])
      2'd0: frac = 32'h4000_0000;   // 2^0
      2'd1: frac = 32'h4C1B_F829;   // 2^0.25
      2'd2: frac = 32'h5A82_799A;   // 2^0.5
      default: frac = 32'h6BA2_7E65; // 2^0.75
    endcase
    prod = 64'(p43) * 64'(frac);          // Q20.44
    e    = c >>> 2;
    sh   = 16 - int'(e);                  // Q20.44 -> Q4.28 is >> 16
    if (sh >= 64)      mag = '0;
    else if (sh >= 0)  mag = prod >> sh;
    else if (sh < -30 || (prod >> (64 + sh)) != 0) mag = 64'h7FFF_FFFF;
    else               mag = prod << (-sh);
    if (mag > 64'h7FFF_FFFF) mag = 64'h7FFF_FFFF;
    xr = neg ? -sample_t'(mag[31:0]) : sample_t'(mag[31:0]);
  end
endmodule
