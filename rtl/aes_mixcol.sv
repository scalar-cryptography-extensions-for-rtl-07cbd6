// aes_mixcol: partial MixColumns for the RV32 AES middle-round instructions.
//
// aes32esmi and aes32dsmi handle one S-box output byte b per instruction, so
// only one column of the (inverse) MixColumns matrix is applied to it:
//   forward: col = {3*b, 1*b, 1*b, 2*b}          (byte 3 .. byte 0)
//   inverse: col = {11*b, 13*b, 9*b, 14*b}
// Products are in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1. Doubling (xtime) is
// a left shift by one with a conditional XOR of 0x1b; 3b = 2b ^ b,
// 9b = 8b ^ b, 11b = 8b ^ 2b ^ b, 13b = 8b ^ 4b ^ b and 14b = 8b ^ 4b ^ 2b,
// with 4b and 8b obtained by repeated doubling. The rotation by bs and the XOR
// with rs1 that follow are done in aes32_unit. Combinational.
module aes_mixcol (
  input  logic [7:0]  b,
  input  logic        inv,   // 0 = forward column, 1 = inverse column
  output logic [31:0] col
);

  function automatic logic [7:0] xtime(input logic [7:0] v);
    return {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);
  endfunction

  logic [7:0] b2, b4, b8;
  assign b2 = xtime(b);
  assign b4 = xtime(b2);
  assign b8 = xtime(b4);

  logic [31:0] col_fwd, col_inv;
  assign col_fwd = {b2 ^ b, b, b, b2};
  assign col_inv = {b8 ^ b2 ^ b, b8 ^ b4 ^ b, b8 ^ b, b8 ^ b4 ^ b2};

  assign col = inv ? col_inv : col_fwd;

endmodule
