// cx_decoder: recognises the 21 scalar-crypto instructions in an RV32 word.
//
// Combinational decoder used in the DOF stage. It compares the major opcode,
// funct3 and the upper instruction bits with the encodings of the extension:
//   OP-IMM (0010011): brev8, zip, unzip (12-bit immediate field fixed),
//                     sha256sig0/sig1/sum0/sum1 (funct7 0001000, rs2 field
//                     selects the function)
//   OP     (0110011): pack, packh (funct7 0000100), xperm8, xperm4
//                     (funct7 0010100), sha512* (funct3 000, funct7 01xxxxx),
//                     aes32* (funct3 000, bits 29:25 = 1xxx1, bits 31:30 = bs)
// The encodings are those of the RISC-V scalar cryptography specification.
// Output dec.hit is low and dec.op is CX_NONE for every other word, which the
// host decoder handles. The register fields and bs are always extracted;
// they are plain wiring from the instruction bits, so 17 of the 23 output bits
// carry no logic. The opcode choice table is this design's own; the encodings
// are the ones printed for each instruction.
module cx_decoder
  import cx_pkg::*;
(
  input  logic [31:0] instr,
  output cx_dec_t     dec
);

  logic [6:0]  opc;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [11:0] imm;
  logic [4:0]  f5;     // instr[29:25] for the AES group
  cx_op_e      op;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];
  assign imm = instr[31:20];
  assign f5  = instr[29:25];

  always_comb begin
    op = CX_NONE;
    if (opc == OPC_OP_IMM) begin
      unique case ({f3, imm})
        {3'b101, 12'b0110_1000_0111}: op = CX_BREV8;
        {3'b001, 12'b0000_1000_1111}: op = CX_ZIP;
        {3'b101, 12'b0000_1000_1111}: op = CX_UNZIP;
        {3'b001, 12'b0001_0000_0010}: op = CX_SHA256SIG0;
        {3'b001, 12'b0001_0000_0011}: op = CX_SHA256SIG1;
        {3'b001, 12'b0001_0000_0000}: op = CX_SHA256SUM0;
        {3'b001, 12'b0001_0000_0001}: op = CX_SHA256SUM1;
        default: op = CX_NONE;
      endcase
    end else if (opc == OPC_OP) begin
      if (f3 == 3'b000 && f7[6:5] == 2'b01) begin
        unique case (f5)
          5'b01110: op = CX_SHA512SIG0H;
          5'b01010: op = CX_SHA512SIG0L;
          5'b01111: op = CX_SHA512SIG1H;
          5'b01011: op = CX_SHA512SIG1L;
          5'b01000: op = CX_SHA512SUM0R;
          5'b01001: op = CX_SHA512SUM1R;
          default:  op = CX_NONE;
        endcase
      end
      // aes32*: bits 31:30 are bs and take any value
      if (f3 == 3'b000) begin
        unique case (f5)
          5'b10001: op = CX_AES32ESI;
          5'b10011: op = CX_AES32ESMI;
          5'b10101: op = CX_AES32DSI;
          5'b10111: op = CX_AES32DSMI;
          default: ;
        endcase
      end
      unique case ({f7, f3})
        {7'b0000100, 3'b100}: op = CX_PACK;
        {7'b0000100, 3'b111}: op = CX_PACKH;
        {7'b0010100, 3'b100}: op = CX_XPERM8;
        {7'b0010100, 3'b010}: op = CX_XPERM4;
        default: ;
      endcase
    end
  end

  always_comb begin
    dec.hit = (op != CX_NONE);
    dec.op  = op;
    dec.bs  = instr[31:30];
    dec.rd  = instr[11:7];
    dec.rs1 = instr[19:15];
    dec.rs2 = instr[24:20];
  end

endmodule
