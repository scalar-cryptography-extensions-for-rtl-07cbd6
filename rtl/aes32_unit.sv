// aes32_unit: one datapath for the four RV32 AES instructions.
//
//   aes32esi  rs1 ^ rol({24'b0, SBOX(rs2.byte[bs])}, 8*bs)      final encrypt round
//   aes32esmi rs1 ^ rol(MixCol(SBOX(rs2.byte[bs])), 8*bs)       middle encrypt round
//   aes32dsi  rs1 ^ rol({24'b0, INVSBOX(rs2.byte[bs])}, 8*bs)   final decrypt round
//   aes32dsmi rs1 ^ rol(InvMixCol(INVSBOX(rs2.byte[bs])), 8*bs) middle decrypt round
//
// The byte selected by bs goes through one S-box (aes_sbox, forward or
// inverse by box), then, when mix is set, through one column of the forward or
// inverse MixColumns matrix (aes_mixcol); otherwise it is zero-extended. The
// 32-bit word is rotated left by 8*bs so that the byte returns to its column
// position (the ShiftRows step) and is XORed into rs1 (AddRoundKey or the
// running accumulator). Sixteen such instructions make one AES round on a
// 128-bit state. The box/mix controls follow the unified aes32 path of the
// source design. Combinational EX-stage logic; bs arrives already registered
// from the DOF stage.
module aes32_unit (
  input  logic [31:0] rs1,
  input  logic [31:0] rs2,
  input  logic [1:0]  bs,
  input  logic        box,   // 0 = encrypt (forward), 1 = decrypt (inverse)
  input  logic        mix,   // 1 = middle round (apply partial MixColumns)
  output logic [31:0] rd
);

  logic [7:0]  sel, sb;
  logic [31:0] col, word, rot;

  assign sel = rs2[8*bs +: 8];

  aes_sbox   u_sbox (.x(sel), .inv(box), .y(sb));
  aes_mixcol u_mix  (.b(sb),  .inv(box), .col(col));

  assign word = mix ? col : {24'b0, sb};

  always_comb begin
    unique case (bs)
      2'd0: rot = word;
      2'd1: rot = {word[23:0], word[31:24]};
      2'd2: rot = {word[15:0], word[31:16]};
      default: rot = {word[7:0], word[31:8]};
    endcase
  end

  assign rd = rs1 ^ rot;

endmodule
