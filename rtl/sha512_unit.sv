// sha512_unit: one datapath for the six RV32 Zknh SHA-512 instructions.
//
// A 64-bit SHA-512 word lives in two 32-bit registers, so each 64-bit
// function is split in two instructions that each produce one half:
//
//   sha512sig0h rd = rs1>>1  ^ rs1>>7  ^ rs1>>8  ^ rs2<<31 ^ rs2<<24
//   sha512sig0l rd = rs1>>1  ^ rs1>>7  ^ rs1>>8  ^ rs2<<31 ^ rs2<<25 ^ rs2<<24
//   sha512sig1h rd = rs1<<3  ^ rs1>>6  ^ rs1>>19 ^ rs2>>29 ^ rs2<<13
//   sha512sig1l rd = rs1<<3  ^ rs1>>6  ^ rs1>>19 ^ rs2>>29 ^ rs2<<26 ^ rs2<<13
//   sha512sum0r rd = rs1<<25 ^ rs1<<30 ^ rs1>>28 ^ rs2>>7  ^ rs2>>2  ^ rs2<<4
//   sha512sum1r rd = rs1<<23 ^ rs1>>14 ^ rs1>>18 ^ rs2>>9  ^ rs2<<18 ^ rs2<<14
//
// (all shifts logical, on 32 bits). For sig*h/sig*l, rs1 holds the half being
// produced and rs2 the other half; sum*r is issued twice with the registers
// swapped, which amounts to a 32-bit rotation of the 64-bit word.
//
// Six constant shifters, each a small multiplexer selected by l (00 = high
// half, 01 = low half, 10 = sum), f (0 = sigma, 1 = sum) and n (function 0 or
// 1), feed a balanced XOR tree ((a^b)^(c^d))^(e^f) rather than one six-input
// XOR. The l/f/n control and the XOR tree follow the unified SHA-512 path of
// the source design; the encoding of l is this design's choice. The sixth
// term is zero for the high-half instructions. Combinational EX-stage logic.
module sha512_unit
  import cx_pkg::*;
(
  input  logic [31:0] rs1,
  input  logic [31:0] rs2,
  input  logic [1:0]  l,
  input  logic        f,
  input  logic        n,
  output logic [31:0] rd
);

  logic [31:0] t0, t1, t2, t3, t4, t5;
  logic        sum;

  assign sum = f || (l == SHA512_L_SUM);

  always_comb begin
    if (!sum && !n) begin          // Sigma0 halves
      t0 = rs1 >> 1;  t1 = rs1 >> 7;  t2 = rs1 >> 8;
      t3 = rs2 << 31; t4 = rs2 << 24;
      t5 = (l == SHA512_L_LOW) ? (rs2 << 25) : '0;
    end else if (!sum && n) begin  // Sigma1 halves
      t0 = rs1 << 3;  t1 = rs1 >> 6;  t2 = rs1 >> 19;
      t3 = rs2 >> 29; t4 = rs2 << 13;
      t5 = (l == SHA512_L_LOW) ? (rs2 << 26) : '0;
    end else if (!n) begin         // Sum0
      t0 = rs1 << 25; t1 = rs1 << 30; t2 = rs1 >> 28;
      t3 = rs2 >> 7;  t4 = rs2 >> 2;  t5 = rs2 << 4;
    end else begin                 // Sum1
      t0 = rs1 << 23; t1 = rs1 >> 14; t2 = rs1 >> 18;
      t3 = rs2 >> 9;  t4 = rs2 << 18; t5 = rs2 << 14;
    end
  end

  logic [31:0] x01, x23, x45;
  assign x01 = t0 ^ t1;
  assign x23 = t2 ^ t3;
  assign x45 = t4 ^ t5;
  assign rd  = (x01 ^ x23) ^ x45;

endmodule
